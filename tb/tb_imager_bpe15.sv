// tb_imager_bpe15: self-checking test of the 15x15 BPE imager.
//
// The bench plays the external controller of the test chip: per frame it
// pulses RST, holds WIN low for an exposure window while injecting SPAD
// breakdowns (and injects more while WIN is high, which must be ignored),
// then raises Search[0], waits one cycle, and issues Next followed by four
// address-bit cycles (WL one-hot, MSB first) until SCH_fin is high after the
// last bit. It decodes the 15 row outputs and checks them against the
// injected pattern and the readout length against Max(N_BD,i) * 5 + 1. The
// first frame reproduces the measured example: pixels 2 and 11 of a row, 11
// cycles.
module tb_imager_bpe15;
  localparam int R = 15, C = 15, AB = 4, NF = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic win, rst, search, next;
  logic [AB-1:0] wl;
  logic [R-1:0][C-1:0] spad_bd;
  logic [R-1:0] addr_out;
  logic sch_fin;

  imager_bpe15 dut (
    .clk(clk), .rst_n(rst_n), .win(win), .rst(rst), .search(search), .next(next),
    .wl(wl), .spad_bd(spad_bd), .addr_out(addr_out), .sch_fin(sch_fin)
  );

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [R-1:0][C-1:0] pat;
  int n_empty = 0, n_multi = 0;

  task automatic run_frame(input int f);
    int m, cycles, rounds;
    logic [AB-1:0] acc [R];
    int got [R][$];
    m = 0;
    for (int r = 0; r < R; r++) if ($countones(pat[r]) > m) m = $countones(pat[r]);
    // frame reset
    rst = 1'b1; win = 1'b1; search = 1'b0; next = 1'b0; wl = '0; spad_bd = '0;
    @(negedge clk);
    rst = 1'b0;
    // exposure: WIN low for 8 cycles
    for (int k = 0; k < 8; k++) begin
      win = 1'b0;
      spad_bd = '0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          if (pat[r][c] && ((r + c) % 8 == k)) spad_bd[r][c] = 1'b1;
      @(negedge clk);
    end
    // WIN high again: breakdowns now must be ignored
    win = 1'b1;
    spad_bd = '1;
    @(negedge clk);
    spad_bd = '0;
    // BPE readout
    search = 1'b1;
    #1;
    cycles = 1;
    rounds = 0;
    if (!sch_fin) begin
      forever begin
        @(negedge clk);  // after the search cycle / last bit: Next
        next = 1'b1; cycles++;
        @(negedge clk);
        next = 1'b0;
        for (int b = AB - 1; b >= 0; b--) begin
          wl = AB'(1) << b;
          #1;
          for (int r = 0; r < R; r++) acc[r][b] = addr_out[r];
          cycles++;
          if (b != 0) @(negedge clk);
        end
        rounds++;
        for (int r = 0; r < R; r++) if (acc[r] != 0) got[r].push_back(int'(acc[r]));
        wl = '0;
        if (sch_fin) break;
        if (rounds > C) break;
      end
    end
    chk(cycles == m * (AB + 1) + 1, $sformatf("frame %0d: T_readout %0d cycles, expected %0d", f, cycles, m * (AB + 1) + 1));
    chk(rounds == m, $sformatf("frame %0d: %0d rounds, expected %0d", f, rounds, m));
    for (int r = 0; r < R; r++) begin
      int exp_l[$];
      for (int c = 0; c < C; c++) if (pat[r][c]) exp_l.push_back(c + 1);
      chk(got[r] == exp_l, $sformatf("frame %0d row %0d addresses differ", f, r));
    end
    if (m == 0) n_empty++;
    if (m > 1) n_multi++;
    @(negedge clk);
    search = 1'b0;
  endtask

  initial begin
    win = 1'b1; rst = 1'b0; search = 1'b0; next = 1'b0; wl = '0; spad_bd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Measured example: 2nd and 11th pixel of a row, readout in 11 cycles.
    pat = '0;
    pat[6][1] = 1'b1; pat[6][10] = 1'b1; pat[2][4] = 1'b1;
    run_frame(0);
    for (int f = 1; f < NF; f++) begin
      pat = '0;
      if (f % 4 != 1)
        for (int k = 0; k < f * 4; k++) pat[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      run_frame(f);
    end
    // full frame: every pixel fired
    pat = '1;
    run_frame(NF);
    chk(n_empty > 0, "no empty frame");
    chk(n_multi > 0, "no frame with several pixels per row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
