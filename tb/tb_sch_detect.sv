// tb_sch_detect: the completion AND tree over 31 rows, for all-done, each row
// missing alone, and random flag patterns.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_sch_detect;
  localparam int R = 31;
  logic [R-1:0] row_fin;
  logic sch_fin;
  sch_detect dut (.row_fin(row_fin), .sch_fin(sch_fin));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    row_fin = '1; #1; chk(sch_fin == 1'b1, "all rows finished");
    for (int r = 0; r < R; r++) begin
      row_fin = '1; row_fin[r] = 1'b0; #1;
      chk(sch_fin == 1'b0, $sformatf("row %0d unfinished", r));
    end
    for (int k = 0; k < 200; k++) begin
      row_fin = R'({$urandom, $urandom});
      if (k % 4 == 0) row_fin = '1;
      #1;
      chk(sch_fin == (row_fin == '1), "random pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
