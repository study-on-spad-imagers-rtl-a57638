// tb_ucc_sum: V_SPAD falls by one unit step (10 mV) per conducting unit
// current cell, for random sets of cells of a 1024-pixel array.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_ucc_sum;
  localparam int N = 1024;
  logic [N-1:0] on;
  logic signed [31:0] v_spad;
  ucc_sum dut (.on(on), .v_spad(v_spad));

  int checks = 0, failures = 0;
  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 100; k++) begin
      int n;
      on = '0; n = 0;
      for (int i = 0; i < (k % 10) * 70; i++) on[$urandom_range(N-1)] = 1'b1;
      for (int i = 0; i < N; i++) if (on[i]) n++;
      #1;
      checks++;
      if (v_spad != 18000 - 100 * n) begin
        failures++; $display("FAIL: %0d cells on, V_SPAD %0d", n, v_spad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
