// tb_out_shift_reg: random words are loaded and shifted out bit 0 first; a
// load in the middle of a word restarts the output.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_out_shift_reg;
  localparam int W = 31;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load, shift, sout;
  logic [W-1:0] d;
  out_shift_reg dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    load = 1'b0; shift = 1'b0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      logic [W-1:0] word;
      int stop;
      word = W'({$urandom, $urandom});
      stop = (k % 5 == 4) ? 10 : W;
      d = word; load = 1'b1; @(negedge clk); load = 1'b0; d = '0;
      for (int i = 0; i < stop; i++) begin
        chk(sout == word[i], $sformatf("word %0d bit %0d", k, i));
        shift = 1'b1; @(negedge clk); shift = 1'b0;
        if (i % 7 == 3) begin
          @(negedge clk);
          chk(sout == word[i + 1], "hold without shift");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
