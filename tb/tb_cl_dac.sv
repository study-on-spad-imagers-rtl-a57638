// tb_cl_dac: all 64 codes of the 6-bit DAC give VDD - (code + 1/2) unit steps,
// monotonically decreasing.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_cl_dac;
  logic [5:0] code;
  logic signed [31:0] v_ref;
  cl_dac dut (.code(code), .v_ref(v_ref));

  int checks = 0, failures = 0;
  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int prev;
    prev = 100000;
    for (int c = 0; c < 64; c++) begin
      code = 6'(c); #1;
      checks += 2;
      if (v_ref != 18000 - 100 * c - 50) begin failures++; $display("FAIL: code %0d gives %0d", c, v_ref); end
      if (!(v_ref < prev)) begin failures++; $display("FAIL: not monotonic at %0d", c); end
      prev = v_ref;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
