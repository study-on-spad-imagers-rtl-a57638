// tb_cl_ctrl: raster readout sequencing. Idle while CMP_out is low; after
// CMP_out, Force_off and Readout rise at the next edge, each of the 32 rows
// gets Load then 32 shift cycles with Row counting up, then one DFF_RST cycle
// and Force_off falls. An external reset request gives a DFF_RST pulse when
// idle.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_cl_ctrl;
  localparam int R = 32, C = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cmp_out, ext_rst, force_off, load, shift, dff_rst, readout, out_valid;
  logic [4:0] row;
  cl_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic event_readout();
    cmp_out = 1'b1;
    @(negedge clk);
    for (int r = 0; r < R; r++) begin
      chk(force_off && readout && load && !shift && row == 5'(r), $sformatf("Load of row %0d", r));
      @(negedge clk);
      for (int c = 0; c < C; c++) begin
        chk(force_off && readout && shift && out_valid && !load && row == 5'(r), $sformatf("shift row %0d col %0d", r, c));
        @(negedge clk);
      end
    end
    chk(dff_rst && force_off && !readout, "DFF_RST at the end with Force_off");
    cmp_out = 1'b0;
    @(negedge clk);
    chk(!force_off && !dff_rst && !readout, "back to idle");
  endtask

  initial begin
    cmp_out = 1'b0; ext_rst = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) begin
      @(negedge clk);
      chk(!force_off && !readout && !load && !shift && !dff_rst, "idle without CMP_out");
    end
    ext_rst = 1'b1; #1;
    chk(dff_rst, "external reset gives DFF_RST");
    @(negedge clk); ext_rst = 1'b0;
    event_readout();
    repeat (5) @(negedge clk);
    event_readout();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
