// tb_bpe_cell: directed test of one BPE pixel: pass when not fired, block when
// fired, Next selects (Mask, address drive, search resumes), second Next
// releases and the pixel stays transparent, Search low (clr) re-arms it.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_bpe_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, state, search_in, next, addr_bit, search_out, mask, addr_drive;

  bpe_cell dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cyc(); @(negedge clk); #1; endtask

  initial begin
    clr = 1'b1; state = 1'b0; search_in = 1'b0; next = 1'b0; addr_bit = 1'b1;
    cyc(); rst_n = 1'b1; cyc();
    clr = 1'b0;
    // not fired: search passes straight through
    search_in = 1'b1; #1;
    chk(search_out == 1'b1, "stable pixel must pass the search");
    search_in = 1'b0; #1;
    chk(search_out == 1'b0, "no search in, no search out");
    // fired: search blocked
    state = 1'b1; search_in = 1'b1; #1;
    chk(search_out == 1'b0, "fired pixel must block the search");
    chk(mask == 1'b0 && addr_drive == 1'b0, "no Mask before Next");
    // Next selects the pixel
    next = 1'b1; cyc(); next = 1'b0; #1;
    chk(mask == 1'b1, "Mask after first Next");
    chk(search_out == 1'b1, "search resumes once Mask is set");
    chk(addr_drive == 1'b1, "address bit 1 driven");
    addr_bit = 1'b0; #1;
    chk(addr_drive == 1'b0, "address bit 0 driven");
    addr_bit = 1'b1;
    // idle cycles keep Mask
    cyc(); cyc();
    chk(mask == 1'b1, "Mask held without Next");
    // second Next releases the pixel, it stays transparent
    next = 1'b1; cyc(); next = 1'b0; #1;
    chk(mask == 1'b0 && addr_drive == 1'b0, "Mask released by second Next");
    chk(search_out == 1'b1, "read pixel stays transparent");
    next = 1'b1; cyc(); next = 1'b0; #1;
    chk(mask == 1'b0, "read pixel not selected again");
    // Next while no search reaches the pixel: nothing selected
    clr = 1'b1; cyc(); clr = 1'b0; search_in = 1'b0; #1;
    next = 1'b1; cyc(); next = 1'b0; #1;
    chk(mask == 1'b0, "Next without search must not select");
    // after clr the fired pixel blocks again
    search_in = 1'b1; #1;
    chk(search_out == 1'b0, "clr re-arms the pixel");
    next = 1'b1; cyc(); next = 1'b0; #1;
    chk(mask == 1'b1, "selected again after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
