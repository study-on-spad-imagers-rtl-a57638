// tb_imager_ed31: self-checking test of the 31x31 event-discriminator imager.
//
// T_win = 10 cycles (WIN width 12), N_th = 3. Frames carry empty, sparse
// (Max(N_BD,i) <= 2) and Max = 3 patterns, which are dark frames and must be
// discarded without readout, and two event frames with Max = 6, which must be
// read out serially. The bench predicts, cycle by cycle, when the control
// block is busy (count: 1 + Max + 1 cycles for a dark frame; 1 + (N_th+1) + 1
// cycles to the decision plus 1 + Max * (1 + 5 * (1 + 31)) readout cycles for
// an event frame), which Write cycles are dropped, the counter value when
// Out_start rises, and decodes Address_Output (per round, per address bit
// MSB first, 31 rows) against the injected pattern.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_imager_ed31;
  localparam int R = 31, C = 31, AB = 5, WW = 12, TWIN = WW - 2, P = WW + 1;
  localparam int NTH = 3;
  localparam int NF = 190;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [R-1:0][C-1:0] spad_bd;
  logic address_output, out_state, out_start, sch_fin, dark_frame, frame_drop, win, busy;
  logic [5:0] cnt;

  imager_ed31 dut (
    .clk(clk), .rst_n(rst_n), .win_width(5'(WW)), .nth(5'(NTH)), .spad_bd(spad_bd),
    .address_output(address_output), .out_state(out_state), .out_start(out_start),
    .sch_fin(sch_fin), .cnt(cnt), .dark_frame(dark_frame), .frame_drop(frame_drop),
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [R-1:0][C-1:0] pat [NF];
  function automatic int max_row(input logic [R-1:0][C-1:0] p);
    int m = 0;
    for (int r = 0; r < R; r++) if ($countones(p[r]) > m) m = $countones(p[r]);
    return m;
  endfunction
  function automatic int busy_len(input int m);
    if (m == 0)   return 1;
    if (m <= NTH) return m + 2;
    return 1 + (NTH + 1) + 1 + 1 + m * (1 + AB * (1 + R));
  endfunction

  initial begin
    for (int n = 0; n < NF; n++) begin
      pat[n] = '0;
      if (n == 3 || n == 100) begin
        for (int k = 0; k < 60; k++) pat[n][$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
        pat[n][20] = '0;
        for (int k = 0; k < 6; k++) pat[n][20][k * 5] = 1'b1;
        for (int r = 0; r < R; r++) while ($countones(pat[n][r]) > 6) pat[n][r][$urandom_range(C-1)] = 1'b0;
      end else begin
        case (n % 3)
          0: ;
          1: for (int k = 0; k < 8; k++) pat[n][$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
          default: begin
            for (int k = 0; k < 10; k++) pat[n][$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
            pat[n][5][1] = 1'b1; pat[n][5][9] = 1'b1; pat[n][5][30] = 1'b1;
          end
        endcase
        for (int r = 0; r < R; r++) while ($countones(pat[n][r]) > NTH) pat[n][r][$urandom_range(C-1)] = 1'b0;
      end
    end
  end

  int n_dark = 0, n_event = 0, n_drop = 0, n_empty = 0;
  int ph = 0, frame = 0, t = 0, wr_t = -1, busy_until = -1, cur = -1;
  int nbits = 0;
  logic [AB-1:0] acc [R];
  int got [R][$];

  task automatic check_event();
    for (int r = 0; r < R; r++) begin
      int exp_l[$];
      for (int c = 0; c < C; c++) if (pat[cur][r][c]) exp_l.push_back(c + 1);
      chk(got[r] == exp_l, $sformatf("frame %0d row %0d addresses differ", cur, r));
      got[r].delete();
    end
  endtask

  initial begin
    spad_bd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!win) @(negedge clk);
    forever begin
      chk(win == (ph != P - 1), $sformatf("WIN at frame phase %0d", ph));
      chk(busy == (t > wr_t && t <= busy_until), $sformatf("busy=%0b at t=%0d (write %0d, until %0d)", busy, t, wr_t, busy_until));
      if (ph == WW - 1) begin
        bit exp_drop;
        exp_drop = (t <= busy_until);
        chk(frame_drop == exp_drop, $sformatf("frame %0d drop=%0b expected %0b", frame, frame_drop, exp_drop));
        if (exp_drop) n_drop++;
        else begin
          int m;
          if (cur >= 0 && max_row(pat[cur]) > NTH) check_event();
          m = max_row(pat[frame]);
          cur = frame;
          wr_t = t;
          busy_until = t + busy_len(m);
          if (m == 0) n_empty++;
          if (m <= NTH) n_dark++; else n_event++;
          nbits = 0;
        end
      end
      if (out_start) begin
        chk(max_row(pat[cur]) > NTH, $sformatf("Out_start for frame %0d with Max %0d", cur, max_row(pat[cur])));
        chk(cnt == 6'(NTH + 1), $sformatf("CNT=%0d at Out_start", cnt));
      end
      if (dark_frame) chk(max_row(pat[cur]) <= NTH, "dark frame flagged for an event frame");
      if (out_state) begin
        int r, b;
        r = nbits % R;
        b = AB - 1 - (nbits / R) % AB;
        acc[r][b] = address_output;
        nbits++;
        if (nbits % (R * AB) == 0)
          for (int k = 0; k < R; k++) if (acc[k] != 0) got[k].push_back(int'(acc[k]));
      end
      spad_bd = '0;
      if (ph >= 1 && ph <= WW - 2) begin
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            if (pat[frame][r][c] && (ph == 1 + (r * 3 + c) % TWIN)) spad_bd[r][c] = 1'b1;
      end else begin
        for (int k = 0; k < 20; k++) spad_bd[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      end
      ph = (ph + 1) % P;
      if (ph == 0) frame++;
      t++;
      if (frame >= NF) break;
      @(negedge clk);
    end
    if (cur >= 0 && max_row(pat[cur]) > NTH) check_event();
    $display("dark frames %0d (empty %0d), event frames %0d, dropped %0d", n_dark, n_empty, n_event, n_drop);
    chk(n_dark > 0, "no dark frame");
    chk(n_empty > 0, "no empty frame");
    chk(n_event == 2, "expected two event frames");
    chk(n_drop > 0, "no frame dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
