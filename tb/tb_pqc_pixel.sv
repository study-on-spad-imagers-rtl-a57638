// tb_pqc_pixel: the PQC state DFF records a breakdown only while WIN is low,
// keeps it, and is cleared by RST.
module tb_pqc_pixel;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic win, rst, spad_bd, qc_out;
  pqc_pixel dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    win = 1'b1; rst = 1'b0; spad_bd = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // breakdown with WIN high: ignored
    spad_bd = 1'b1; @(negedge clk); spad_bd = 1'b0;
    chk(qc_out == 1'b0, "breakdown ignored while WIN high");
    // WIN low, no breakdown
    win = 1'b0; repeat (3) @(negedge clk);
    chk(qc_out == 1'b0, "no breakdown, no state");
    spad_bd = 1'b1; @(negedge clk); spad_bd = 1'b0;
    chk(qc_out == 1'b1, "breakdown recorded while WIN low");
    win = 1'b1; repeat (3) @(negedge clk);
    chk(qc_out == 1'b1, "state kept after the window");
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    chk(qc_out == 1'b0, "RST clears the state");
    // random sequences against a reference
    for (int k = 0; k < 300; k++) begin
      bit exp;
      exp = qc_out;
      win = $urandom_range(1); rst = ($urandom_range(9) == 0); spad_bd = $urandom_range(1);
      if (rst) exp = 1'b0; else if (spad_bd && !win) exp = 1'b1;
      @(negedge clk);
      chk(qc_out == exp, "random sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
