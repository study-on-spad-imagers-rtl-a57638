// tb_spad_imagers_top: end-to-end test of all four imagers at their full size
// (15x15, 31x31, 31x31, 32x32), run concurrently through spad_imagers_top.
//
// Each imager gets its own self-checking scenario with an independent
// reference model (the same methods as the per-imager benches, shorter):
//   15x15 BPE       - external control; a frame with pixels 2 and 11 of a row
//                     (11-cycle readout), a dense random frame, an empty one;
//   31x31 background - 30 frames, empty / sparse (safety zone) / heavy frames
//                     that force frame dropping; addresses and T_readout;
//   31x31 event disc.- 110 frames, dark frames discarded, one event frame read
//                     serially, dropped frames during its readout;
//   32x32 current    - dark counts, a sub-threshold burst and an event burst;
//                     the recorded frame is read by raster scan.
// Every mechanism (multi-round extraction, empty frame, safety zone, frame
// drop, dark-frame discard, event readout, below-threshold burst, current
// logic event, Force_off) is counted and must have happened at least once.
module tb_spad_imagers_top;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- DUT ports ----
  logic [4:0]        ed_win_width, ed_nth, bg_win_width;
  logic [30:0][30:0] ed_spad_bd, bg_spad_bd;
  logic              ed_address_output, ed_out_state, ed_out_start, ed_sch_fin;
  logic [5:0]        ed_cnt;
  logic              ed_dark_frame, ed_frame_drop, ed_win, ed_busy;
  logic [30:0]       bg_addr_out;
  logic              bg_addr_valid, bg_sch_fin, bg_frame_start, bg_frame_drop, bg_win, bg_busy;
  logic [2:0]        bg_addr_bit;
  logic              p15_win, p15_rst, p15_search, p15_next, p15_sch_fin;
  logic [3:0]        p15_wl;
  logic [14:0][14:0] p15_spad_bd;
  logic [14:0]       p15_addr_out;
  logic [7:0]        cl_holdoff;
  logic [5:0]        cl_thr;
  logic              cl_ext_rst, cl_sensor_out, cl_out_valid, cl_readout, cl_force_off, cl_cmp_out;
  logic [31:0][31:0] cl_spad_bd;
  logic [4:0]        cl_row;

  spad_imagers_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_multi = 0, m_empty = 0, m_safe = 0, m_drop = 0, m_dark = 0, m_event = 0,
      m_below = 0, m_cl_event = 0, m_forced = 0;

  // =====================================================================
  // 15x15 BPE imager
  // =====================================================================
  task automatic run15(input logic [14:0][14:0] pat);
    int m, cycles, rounds;
    logic [3:0] acc [15];
    int got [15][$];
    m = 0;
    for (int r = 0; r < 15; r++) if ($countones(pat[r]) > m) m = $countones(pat[r]);
    p15_rst = 1'b1; p15_win = 1'b1; p15_search = 1'b0; p15_next = 1'b0; p15_wl = '0;
    @(negedge clk);
    p15_rst = 1'b0;
    for (int k = 0; k < 6; k++) begin
      p15_win = 1'b0;
      p15_spad_bd = '0;
      for (int r = 0; r < 15; r++) for (int c = 0; c < 15; c++)
        if (pat[r][c] && ((r * 2 + c) % 6 == k)) p15_spad_bd[r][c] = 1'b1;
      @(negedge clk);
    end
    p15_win = 1'b1; p15_spad_bd = '1;
    @(negedge clk);
    p15_spad_bd = '0;
    p15_search = 1'b1;
    #1;
    cycles = 1; rounds = 0;
    if (!p15_sch_fin) begin
      forever begin
        @(negedge clk);
        p15_next = 1'b1; cycles++;
        @(negedge clk);
        p15_next = 1'b0;
        for (int b = 3; b >= 0; b--) begin
          p15_wl = 4'(1) << b;
          #1;
          for (int r = 0; r < 15; r++) acc[r][b] = p15_addr_out[r];
          cycles++;
          if (b != 0) @(negedge clk);
        end
        rounds++;
        for (int r = 0; r < 15; r++) if (acc[r] != 0) got[r].push_back(int'(acc[r]));
        p15_wl = '0;
        if (p15_sch_fin || rounds > 15) break;
      end
    end
    chk(cycles == m * 5 + 1, $sformatf("15x15: T_readout %0d, expected %0d", cycles, m * 5 + 1));
    for (int r = 0; r < 15; r++) begin
      int exp_l[$];
      for (int c = 0; c < 15; c++) if (pat[r][c]) exp_l.push_back(c + 1);
      chk(got[r] == exp_l, $sformatf("15x15: row %0d addresses differ", r));
    end
    if (m > 1) m_multi++;
    if (m == 0) m_empty++;
    @(negedge clk);
    p15_search = 1'b0;
  endtask

  task automatic scenario15();
    logic [14:0][14:0] pat;
    pat = '0; pat[6][1] = 1'b1; pat[6][10] = 1'b1;
    run15(pat);
    pat = '0;
    for (int k = 0; k < 50; k++) pat[$urandom_range(14)][$urandom_range(14)] = 1'b1;
    run15(pat);
    run15('0);
  endtask

  // =====================================================================
  // 31x31 background-readout imager (T_win = 10)
  // =====================================================================
  function automatic int max31(input logic [30:0][30:0] p);
    int m = 0;
    for (int r = 0; r < 31; r++) if ($countones(p[r]) > m) m = $countones(p[r]);
    return m;
  endfunction

  task automatic scenario_bg();
    localparam int WW = 12, P = 13, NF = 30;
    logic [30:0][30:0] pat [NF];
    int wq[$];
    int ph, frame, t, busy_until, cur, rd_cycles;
    bit collecting;
    logic [4:0] acc [31];
    int got [31][$];
    for (int n = 0; n < NF; n++) begin
      pat[n] = '0;
      if (n % 3 == 1) begin
        for (int k = 0; k < 10; k++) pat[n][$urandom_range(30)][$urandom_range(30)] = 1'b1;
        for (int r = 0; r < 31; r++) while ($countones(pat[n][r]) > 1) pat[n][r][$urandom_range(30)] = 1'b0;
      end else if (n % 3 == 2) begin
        for (int k = 0; k < 30; k++) pat[n][$urandom_range(30)][$urandom_range(30)] = 1'b1;
        pat[n][4][0] = 1'b1; pat[n][4][15] = 1'b1; pat[n][4][30] = 1'b1;
      end
    end
    ph = 0; frame = 0; t = 0; busy_until = -1; collecting = 0; cur = 0; rd_cycles = 0;
    while (!bg_win) @(negedge clk);
    while (frame < NF || collecting) begin
      if (frame < NF) chk(bg_win == (ph != P - 1), "bg31: WIN waveform");
      if (ph == WW - 1 && frame < NF) begin
        bit exp_drop;
        exp_drop = (t <= busy_until);
        chk(bg_frame_drop == exp_drop, $sformatf("bg31: frame %0d drop=%0b expected %0b", frame, bg_frame_drop, exp_drop));
        if (exp_drop) m_drop++;
        else begin
          int m;
          m = max31(pat[frame]);
          wq.push_back(frame);
          busy_until = t + 1 + m * 6;
          if (1 + m * 6 <= WW) m_safe++;
        end
      end
      if (bg_frame_start) begin
        chk(wq.size() > 0, "bg31: readout without a written frame");
        if (wq.size() > 0) cur = wq.pop_front();
        collecting = 1; rd_cycles = 0;
        for (int r = 0; r < 31; r++) got[r].delete();
      end
      if (collecting) begin
        if (bg_busy) rd_cycles++;
        if (bg_addr_valid) begin
          for (int r = 0; r < 31; r++) acc[r][bg_addr_bit] = bg_addr_out[r];
          if (bg_addr_bit == 0)
            for (int r = 0; r < 31; r++) if (acc[r] != 0) got[r].push_back(int'(acc[r]));
        end
        if (!bg_busy) begin
          int m;
          m = max31(pat[cur]);
          collecting = 0;
          chk(rd_cycles == 1 + m * 6, $sformatf("bg31: frame %0d T_readout %0d expected %0d", cur, rd_cycles, 1 + m * 6));
          for (int r = 0; r < 31; r++) begin
            int exp_l[$];
            for (int c = 0; c < 31; c++) if (pat[cur][r][c]) exp_l.push_back(c + 1);
            chk(got[r] == exp_l, $sformatf("bg31: frame %0d row %0d addresses", cur, r));
          end
          if (m == 0) m_empty++;
          if (m > 1) m_multi++;
        end
      end
      bg_spad_bd = '0;
      if (frame < NF) begin
        if (ph >= 1 && ph <= WW - 2) begin
          for (int r = 0; r < 31; r++) for (int c = 0; c < 31; c++)
            if (pat[frame][r][c] && (ph == 1 + (r + 2 * c) % (WW - 2))) bg_spad_bd[r][c] = 1'b1;
        end else
          for (int k = 0; k < 10; k++) bg_spad_bd[$urandom_range(30)][$urandom_range(30)] = 1'b1;
      end
      ph = (ph + 1) % P;
      if (ph == 0) frame++;
      t++;
      @(negedge clk);
    end
  endtask

  // =====================================================================
  // 31x31 event-discriminator imager (T_win = 10, N_th = 3)
  // =====================================================================
  task automatic scenario_ed();
    localparam int WW = 12, P = 13, NF = 110, NTH = 3;
    logic [30:0][30:0] pat [NF];
    int ph, frame, t, wr_t, busy_until, cur, nbits;
    logic [4:0] acc [31];
    int got [31][$];
    for (int n = 0; n < NF; n++) begin
      pat[n] = '0;
      if (n == 4) begin
        for (int k = 0; k < 40; k++) pat[n][$urandom_range(30)][$urandom_range(30)] = 1'b1;
        pat[n][9] = '0;
        for (int k = 0; k < 5; k++) pat[n][9][k * 6 + 1] = 1'b1;
        for (int r = 0; r < 31; r++) while ($countones(pat[n][r]) > 5) pat[n][r][$urandom_range(30)] = 1'b0;
      end else if (n % 2 == 1) begin
        for (int k = 0; k < 12; k++) pat[n][$urandom_range(30)][$urandom_range(30)] = 1'b1;
        for (int r = 0; r < 31; r++) while ($countones(pat[n][r]) > NTH) pat[n][r][$urandom_range(30)] = 1'b0;
      end
    end
    ph = 0; frame = 0; t = 0; wr_t = -1; busy_until = -1; cur = -1; nbits = 0;
    while (!ed_win) @(negedge clk);
    while (frame < NF) begin
      chk(ed_win == (ph != P - 1), "ed31: WIN waveform");
      chk(ed_busy == (t > wr_t && t <= busy_until), $sformatf("ed31: busy at t=%0d", t));
      if (ph == WW - 1) begin
        bit exp_drop;
        exp_drop = (t <= busy_until);
        chk(ed_frame_drop == exp_drop, $sformatf("ed31: frame %0d drop", frame));
        if (exp_drop) m_drop++;
        else begin
          int m, len;
          m = max31(pat[frame]);
          cur = frame; wr_t = t; nbits = 0;
          len = (m == 0) ? 1 : (m <= NTH) ? m + 2 : 1 + (NTH + 1) + 1 + 1 + m * (1 + 5 * 32);
          busy_until = t + len;
          if (m <= NTH) m_dark++; else m_event++;
        end
      end
      if (ed_out_start) chk(ed_cnt == 6'(NTH + 1) && max31(pat[cur]) > NTH, "ed31: Out_start");
      if (ed_out_state) begin
        int r, b;
        r = nbits % 31;
        b = 4 - (nbits / 31) % 5;
        acc[r][b] = ed_address_output;
        nbits++;
        if (nbits % 155 == 0)
          for (int k = 0; k < 31; k++) if (acc[k] != 0) got[k].push_back(int'(acc[k]));
        if (!ed_busy || nbits == max31(pat[cur]) * 155) begin
          for (int rr = 0; rr < 31; rr++) begin
            int exp_l[$];
            for (int c = 0; c < 31; c++) if (pat[cur][rr][c]) exp_l.push_back(c + 1);
            if (nbits == max31(pat[cur]) * 155)
              chk(got[rr] == exp_l, $sformatf("ed31: event frame row %0d addresses", rr));
          end
        end
      end
      ed_spad_bd = '0;
      if (ph >= 1 && ph <= WW - 2) begin
        for (int r = 0; r < 31; r++) for (int c = 0; c < 31; c++)
          if (pat[frame][r][c] && (ph == 1 + (r + c) % (WW - 2))) ed_spad_bd[r][c] = 1'b1;
      end
      ph = (ph + 1) % P;
      if (ph == 0) frame++;
      t++;
      @(negedge clk);
    end
  endtask

  // =====================================================================
  // 32x32 current-logic imager (hold-off 10, threshold 20)
  // =====================================================================
  task automatic scenario_cl();
    localparam int HO = 10, THR = 20, RD_LEN = 32 * 33 + 1;
    int left [32][32];
    logic [31:0][31:0] frame_q;
    int ev_t, nbit, max_dark;
    bit exp_cmp;
    foreach (left[r, c]) left[r][c] = 0;
    ev_t = -100000; nbit = 0; exp_cmp = 0; max_dark = 0;
    for (int t = 0; t < 2400; t++) begin
      int n_off, dt;
      bit exp_force;
      n_off = 0;
      foreach (left[r, c]) if (left[r][c] != 0) n_off++;
      dt = t - ev_t;
      exp_force = (dt >= 2 && dt < 2 + RD_LEN);
      chk(cl_cmp_out == exp_cmp, $sformatf("cl32: CMP_out at t=%0d", t));
      chk(cl_force_off == exp_force, $sformatf("cl32: Force_off at t=%0d", t));
      if (cl_out_valid) begin
        chk(cl_row == 5'(nbit / 32) && cl_sensor_out == frame_q[nbit / 32][nbit % 32],
            $sformatf("cl32: pixel %0d", nbit));
        nbit++;
      end
      if (!exp_cmp && n_off > THR) begin
        foreach (left[r, c]) frame_q[r][c] = (left[r][c] != 0);
        ev_t = t; exp_cmp = 1; nbit = 0;
        m_cl_event++;
      end else if (!exp_cmp && n_off > max_dark) max_dark = n_off;
      if (exp_cmp && dt == 1 + RD_LEN) begin
        exp_cmp = 0;
        chk(nbit == 1024, "cl32: pixels read");
      end
      cl_spad_bd = '0;
      if ($urandom_range(3) == 0) cl_spad_bd[$urandom_range(31)][$urandom_range(31)] = 1'b1;
      if (t == 200) begin
        for (int k = 0; k < 12; k++) cl_spad_bd[k + 5][k] = 1'b1;
        m_below++;
      end
      if (t == 500) for (int k = 0; k < 40; k++) cl_spad_bd[$urandom_range(31)][$urandom_range(31)] = 1'b1;
      if (exp_force && $urandom_range(3) == 0) begin
        cl_spad_bd[$urandom_range(31)][$urandom_range(31)] = 1'b1;
        m_forced++;
      end
      foreach (left[r, c]) begin
        if (exp_force)            left[r][c] = 0;
        else if (left[r][c] != 0) left[r][c]--;
        else if (cl_spad_bd[r][c]) left[r][c] = HO;
      end
      @(negedge clk);
    end
    if (max_dark < 12) m_below = 0;
  endtask

  initial begin
    ed_win_width = 5'd12; ed_nth = 5'd3; bg_win_width = 5'd12;
    ed_spad_bd = '0; bg_spad_bd = '0; p15_spad_bd = '0; cl_spad_bd = '0;
    p15_win = 1'b1; p15_rst = 1'b0; p15_search = 1'b0; p15_next = 1'b0; p15_wl = '0;
    cl_holdoff = 8'd10; cl_thr = 6'd20; cl_ext_rst = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      scenario15();
      scenario_bg();
      scenario_ed();
      scenario_cl();
    join
    $display("multi-round rows %0d, empty frames %0d, safety-zone frames %0d, dropped %0d",
             m_multi, m_empty, m_safe, m_drop);
    $display("dark frames discarded %0d, event frames read %0d, sub-threshold bursts %0d, current-logic events %0d, breakdowns under Force_off %0d",
             m_dark, m_event, m_below, m_cl_event, m_forced);
    chk(m_multi > 0, "no multi-round extraction");
    chk(m_empty > 0, "no empty frame");
    chk(m_safe > 0, "no safety-zone frame");
    chk(m_drop > 0, "no dropped frame");
    chk(m_dark > 0, "no dark frame discarded");
    chk(m_event > 0, "no event frame read");
    chk(m_below > 0, "no sub-threshold burst");
    chk(m_cl_event > 0, "no current-logic event");
    chk(m_forced > 0, "no breakdown under Force_off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
