// tb_vhaqc: free-running quenching model. A breakdown starts a hold-off of the
// set length, breakdowns during hold-off are ignored, the SPAD fires again
// after recharge, Force_off blocks breakdowns and ends a running hold-off.
// Random stimulus is compared with an independent reference.
module tb_vhaqc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic spad_bd, force_off, off;
  logic [7:0] holdoff;
  vhaqc dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int left = 0, width = 0;
  initial begin
    spad_bd = 1'b0; force_off = 1'b0; holdoff = 8'd5;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed: hold-off of 5 cycles
    spad_bd = 1'b1; @(negedge clk); spad_bd = 1'b0;
    width = 0;
    while (off && width < 100) begin width++; spad_bd = 1'b1; @(negedge clk); spad_bd = 1'b0; end
    chk(width == 5, $sformatf("hold-off %0d cycles, expected 5", width));
    // random against the reference model
    left = 0;
    for (int k = 0; k < 5000; k++) begin
      chk(off == (left != 0), "Output vs reference");
      spad_bd = ($urandom_range(3) == 0);
      force_off = ((k / 200) % 5 == 4);
      if (k % 500 == 0) holdoff = 8'($urandom_range(1, 40));
      if (force_off)      left = 0;
      else if (left != 0) left--;
      else if (spad_bd)   left = holdoff;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
