// tb_ed_ctrl: control block of the event-discriminator imager against a model
// of the BPE array (SCH_fin once Search is up and Max(N_BD,i) Next pulses have
// been given). N_th = 3, WIN width 12, ROWS = 31. For dark frames (Max <= 3)
// it checks the count length 1 + Max (+1 cycle to see SCH_fin), the counter
// value, and that no readout follows; for event frames it checks that the
// count stops at CNT = N_th + 1, Out_start, the restart of Search, and the
// readout with Max rounds of Next, 5 Out_write loads and 31 shift cycles per
// load; and it checks Write suppression while busy.
module tb_ed_ctrl;
  localparam int AB = 5, R = 31, WW = 12, P = WW + 1, NTH = 3, NF = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sch_fin, win, charge, write, frame_drop, search, next, out_write, shift,
        out_start, out_state, dark_frame, event_frame, busy;
  logic [AB-1:0] wl;
  logic [5:0] cnt;

  ed_ctrl dut (.clk(clk), .rst_n(rst_n), .win_width(5'(WW)), .nth(5'(NTH)), .*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int kmax = 0, nx = 0;
  assign sch_fin = search && (nx >= kmax);
  always @(posedge clk) if (!search) nx <= 0; else if (next) nx <= nx + 1;

  function automatic int busy_len(input int m);
    if (m == 0)   return 1;
    if (m <= NTH) return m + 2;
    return 1 + (NTH + 1) + 1 + 1 + m * (1 + AB * (1 + R));
  endfunction

  int kpat [NF];
  initial for (int n = 0; n < NF; n++) kpat[n] = (n == 5) ? 4 : (n == 58) ? 5 : n % 4;

  int ph = 0, frame = 0, t = 0, wr_t = -1, busy_until = -1, cur_k = 0;
  int n_loads = 0, n_shifts = 0, n_next_rd = 0, n_dark = 0, n_event = 0, n_drop = 0;
  bit reading = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!win) @(negedge clk);
    while (frame < NF) begin
      #1;
      chk(win == (ph != P - 1), "WIN");
      chk(busy == (t > wr_t && t <= busy_until), $sformatf("busy at t=%0d", t));
      if (ph == WW - 1) begin
        bit exp_drop;
        exp_drop = (t <= busy_until);
        chk(write == !exp_drop && frame_drop == exp_drop, $sformatf("Write/drop frame %0d", frame));
        if (exp_drop) n_drop++;
        else begin
          if (reading) begin
            chk(n_next_rd == cur_k, $sformatf("%0d readout Next pulses, expected %0d", n_next_rd, cur_k));
            chk(n_loads == cur_k * AB, $sformatf("%0d Out_write loads, expected %0d", n_loads, cur_k * AB));
            chk(n_shifts == cur_k * AB * R, $sformatf("%0d shift cycles, expected %0d", n_shifts, cur_k * AB * R));
          end
          cur_k = kpat[frame];
          kmax = cur_k;
          wr_t = t;
          busy_until = t + busy_len(cur_k);
          reading = 0; n_loads = 0; n_shifts = 0; n_next_rd = 0;
          if (cur_k <= NTH) n_dark++; else n_event++;
        end
      end
      if (dark_frame) chk(cur_k <= NTH && int'(cnt) == cur_k, $sformatf("dark frame with CNT %0d, Max %0d", cnt, cur_k));
      if (out_start) begin
        chk(cur_k > NTH && int'(cnt) == NTH + 1 && !search, "Out_start with CNT = N_th + 1 and Search low");
        reading = 1;
      end
      if (reading) begin
        if (next) n_next_rd++;
        if (out_write) begin
          chk($onehot(wl), "one word line during Out_write");
          n_loads++;
        end
        if (shift) begin
          n_shifts++;
          chk(out_state, "Out_state while shifting");
        end
      end else chk(!out_write && !shift, "no output activity for a dark frame");
      ph = (ph + 1) % P;
      if (ph == 0) frame++;
      t++;
      @(negedge clk);
    end
    $display("dark %0d, event %0d, dropped %0d", n_dark, n_event, n_drop);
    chk(n_dark > 0 && n_event == 2 && n_drop > 0, "dark, event and dropped frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
