// tb_cl_comparator: CMP_out_pre follows V_SPAD < V_ref; CMP_out latches the
// first rise and keeps it when V_SPAD recovers, until DFF_RST; capture is a
// single-cycle pulse at the latching edge.
module tb_cl_comparator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic signed [31:0] v_spad, v_ref;
  logic dff_rst, cmp_out_pre, cmp_out, capture;
  cl_comparator dut (.*);

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
    v_spad = 18000; v_ref = 16050; dff_rst = 1'b0; exp = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      int n;
      n = (k % 50 < 40) ? $urandom_range(0, 15) : $urandom_range(15, 30);
      v_spad = 18000 - 100 * n;
      dff_rst = ($urandom_range(40) == 0);
      #1;
      chk(cmp_out_pre == (n > 19), "CMP_out_pre");
      chk(capture == (n > 19 && !exp && !dff_rst), "capture pulse");
      chk(cmp_out == exp, "CMP_out latched");
      if (dff_rst) exp = 1'b0; else if (n > 19) exp = 1'b1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
