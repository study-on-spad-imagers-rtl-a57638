// tb_cl_readout_unit: the pixel DFF samples the SPAD state only at capture,
// holds it whatever the SPAD does afterwards, and is cleared by DFF_RST.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_cl_readout_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic capture, dff_rst, state, q;
  cl_readout_unit dut (.*);

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
    bit exp;
    capture = 1'b0; dff_rst = 1'b0; state = 1'b0; exp = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      state = $urandom_range(1);
      capture = ($urandom_range(15) == 0);
      dff_rst = ($urandom_range(31) == 0);
      if (dff_rst) exp = 1'b0; else if (capture) exp = state;
      @(negedge clk);
      chk(q == exp, "stored state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
