// tb_aqc_pixel: gated active quenching model. A breakdown inside the window is
// written at Write; breakdowns during Charge, Write or with WIN low are not;
// the memory holds the previous frame while the next one is exposed.
module tb_aqc_pixel;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic win, charge, write, spad_bd, fired, mem;
  aqc_pixel dut (.*);

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

  // One frame: holdoff, charge, 6 window cycles, write. bd_at: cycle index
  // (0 = holdoff, 1 = charge, 2..7 = window, 8 = write) with a breakdown, -1 none.
  task automatic frame(input int bd_at, input bit exp_mem, input bit prev_mem);
    for (int k = 0; k <= 8; k++) begin
      win = (k != 0); charge = (k == 1); write = (k == 8);
      spad_bd = (k == bd_at);
      @(negedge clk);
      if (k < 8) chk(mem == prev_mem, $sformatf("memory keeps the previous frame (cycle %0d)", k));
    end
    chk(mem == exp_mem, $sformatf("breakdown at %0d stored as %0b", bd_at, mem));
    chk(fired == exp_mem, "fired state held until recharge");
  endtask

  initial begin
    win = 1'b0; charge = 1'b0; write = 1'b0; spad_bd = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame(3, 1'b1, 1'b0);   // in window
    frame(-1, 1'b0, 1'b1);  // no breakdown
    frame(0, 1'b0, 1'b0);   // WIN low
    frame(1, 1'b0, 1'b0);   // during Charge
    frame(8, 1'b0, 1'b0);   // during Write
    frame(7, 1'b1, 1'b0);   // last window cycle
    frame(2, 1'b1, 1'b1);   // first window cycle
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
