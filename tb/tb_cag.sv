// tb_cag: every one-hot word-line setting of the 31-column address generator
// gives bit b of the 1-based column number on every column; no word line, no
// address.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_cag;
  localparam int C = 31, AB = 5;
  logic [AB-1:0] wl;
  logic [C-1:0]  addr;
  cag dut (.wl(wl), .addr(addr));

  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wl = '0; #1;
    checks++; if (addr != '0) begin failures++; $display("FAIL: address without word line"); end
    for (int b = 0; b < AB; b++) begin
      wl = AB'(1) << b; #1;
      for (int c = 0; c < C; c++) begin
        checks++;
        if (addr[c] != (((c + 1) >> b) & 1)) begin
          failures++; $display("FAIL: column %0d bit %0d = %0b", c, b, addr[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
