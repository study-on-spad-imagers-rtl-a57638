// tb_bg31_laser_run: pulsed-laser recording with the 31x31 background-readout
// imager at its operating point: 50 MHz clock, T_win = 200 ns (10 cycles,
// WIN width 12), a 100 ns laser pulse (5 cycles) through a pinhole.
//
// Twelve frames: two dark frames with Max(N_BD,i) = 1 (in the second, row 15
// holds only its first pixel and must read out address 00001), then the laser
// frame, in which a disc of radius 6 pixels around the array centre fires
// with probability 1/2 and row 15 holds exactly 6 fired pixels, then dark
// frames again. The first two frames must keep the 3-cycle dead time, the
// laser frame must be read completely (T_readout = 1 + Max * 6 cycles) and
// the frames that arrive during its readout must be dropped. The checking
// (WIN waveform, drop prediction, address decoding, readout length) is the
// same as in the imager bench.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_bg31_laser_run;
  localparam int R = 31, C = 31, AB = 5, WW = 12, TWIN = WW - 2, P = WW + 1;
  localparam int NF = 12, LASER = 2, T_PULSE = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [R-1:0][C-1:0] spad_bd;
  logic [R-1:0] addr_out;
  logic addr_valid, sch_fin, frame_start, frame_drop, win, busy;
  logic [2:0] addr_bit;

  imager_bg31 dut (
    .clk(clk), .rst_n(rst_n), .win_width(5'(WW)), .spad_bd(spad_bd),
    .addr_out(addr_out), .addr_valid(addr_valid), .addr_bit(addr_bit),
    .sch_fin(sch_fin), .frame_start(frame_start), .frame_drop(frame_drop),
    .win(win), .busy(busy)
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

  // Frame patterns.
  logic [R-1:0][C-1:0] pat [NF];
  function automatic int max_row(input logic [R-1:0][C-1:0] p);
    int m = 0;
    for (int r = 0; r < R; r++) if ($countones(p[r]) > m) m = $countones(p[r]);
    return m;
  endfunction

  initial begin
    for (int n = 0; n < NF; n++) begin
      pat[n] = '0;
      if (n == LASER) begin
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            if ((r - 15) * (r - 15) + (c - 15) * (c - 15) <= 36 && $urandom_range(1) == 1) pat[n][r][c] = 1'b1;
        pat[n][15] = '0;
        for (int k = 0; k < 6; k++) pat[n][15][10 + 2 * k] = 1'b1;
      end else begin
        // dark frame: a few dark counts, at most one per row (Max = 1)
        for (int k = 0; k < 3; k++) pat[n][$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
        pat[n][15] = '0;
        if (n == 1) pat[n][15][0] = 1'b1;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            if (pat[n][r][c]) for (int c2 = c + 1; c2 < C; c2++) pat[n][r][c2] = 1'b0;
      end
    end
  end

  // Queue of written frames waiting for their readout.
  int wq[$];
  int n_safe = 0, n_drop = 0, n_empty = 0, n_heavy = 0, n_read = 0;

  // Readout decoder state.
  bit collecting = 0;
  int cur, rd_cycles, rounds;
  logic [AB-1:0] acc [R];
  int got [R][$];

  task automatic finish_frame();
    int m = max_row(pat[cur]);
    chk(rd_cycles == 1 + m * (AB + 1), $sformatf("frame %0d readout %0d cycles, expected %0d", cur, rd_cycles, 1 + m * (AB + 1)));
    chk(rounds == m, $sformatf("frame %0d: %0d Next rounds, expected %0d", cur, rounds, m));
    for (int r = 0; r < R; r++) begin
      int exp_l[$];
      for (int c = 0; c < C; c++) if (pat[cur][r][c]) exp_l.push_back(c + 1);
      chk(got[r] == exp_l, $sformatf("frame %0d row %0d addresses differ", cur, r));
    end
    if (m == 0) n_empty++;
    if (m > 1) n_heavy++;
    n_read++;
  endtask

  int ph = 0, frame = 0, t = 0, busy_until = -1;
  initial begin
    spad_bd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!win) @(negedge clk);
    forever begin
      // ---- observe this cycle ----
      chk(win == (ph != P - 1), $sformatf("WIN at frame phase %0d", ph));
      if (ph == WW - 1) begin
        bit exp_drop;
        exp_drop = (t <= busy_until);
        chk(frame_drop == exp_drop, $sformatf("frame %0d drop=%0b expected %0b", frame, frame_drop, exp_drop));
        if (!exp_drop) begin
          int m;
          m = max_row(pat[frame]);
          wq.push_back(frame);
          busy_until = t + 1 + m * (AB + 1);
          if (1 + m * (AB + 1) <= TWIN + 2) n_safe++;
        end else n_drop++;
      end
      if (frame_start) begin
        chk(wq.size() > 0, "readout without a written frame");
        if (wq.size() > 0) cur = wq.pop_front();
        collecting = 1; rd_cycles = 0; rounds = 0;
        for (int r = 0; r < R; r++) got[r].delete();
      end
      if (collecting) begin
        if (busy) rd_cycles++;
        if (addr_valid) begin
          for (int r = 0; r < R; r++) acc[r][addr_bit] = addr_out[r];
          if (addr_bit == 0) begin
            rounds++;
            for (int r = 0; r < R; r++) if (acc[r] != 0) got[r].push_back(int'(acc[r]));
          end
        end
        if (!busy) begin
          collecting = 0;
          finish_frame();
        end
      end
      // ---- drive this cycle's breakdowns (sampled at its closing edge) ----
      spad_bd = '0;
      if (ph >= 1 && ph <= WW - 2) begin
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            if (pat[frame][r][c] && (ph == 1 + (frame == LASER ? 2 + (r + c) % T_PULSE : (r + c) % TWIN))) spad_bd[r][c] = 1'b1;
      end else begin
        // outside the window: noise that must not be recorded
        for (int k = 0; k < 20; k++) spad_bd[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      end
      ph = (ph + 1) % P;
      if (ph == 0) frame++;
      t++;
      if (frame >= NF) break;
      @(negedge clk);
    end
    while (collecting) begin
      @(negedge clk);
      if (addr_valid) begin
        for (int r = 0; r < R; r++) acc[r][addr_bit] = addr_out[r];
        if (addr_bit == 0) begin
          rounds++;
          for (int r = 0; r < R; r++) if (acc[r] != 0) got[r].push_back(int'(acc[r]));
        end
      end
      if (busy) rd_cycles++; else begin collecting = 0; finish_frame(); end
    end
    $display("frames read %0d, in safety zone %0d, dropped %0d, empty %0d, beyond safety zone %0d",
             n_read, n_safe, n_drop, n_empty, n_heavy);
    chk(n_safe > 0, "no frame in the safety zone");
    chk(n_drop > 0, "no frame dropped");
    chk(n_heavy == 1, "expected exactly the laser frame beyond the safety zone");
    chk(n_read + n_drop == NF, "frame bookkeeping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
