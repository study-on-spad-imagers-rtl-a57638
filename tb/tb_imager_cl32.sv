// tb_imager_cl32: self-checking test of the 32x32 current-logic imager.
//
// Hold-off = 10 cycles, DAC threshold = 20. The bench keeps its own model of
// every pixel's hold-off timer and of the number of SPADs in hold-off. It
// injects dark counts (at most one per cycle, one in four cycles on average), a burst of 12 breakdowns that
// stays below the threshold, and two bursts of 45 breakdowns that are events.
// It checks that CMP_out rises exactly when more than 20 SPADs are in hold-off,
// that Force_off and Readout follow one and two cycles later, that the 32
// rows are read in order with Load + 32 shift cycles each, that Sensor_out
// carries the SPAD states recorded at the event, that breakdowns during
// Force_off are not recorded, and that DFF_RST returns the imager to idle.
module tb_imager_cl32;
  localparam int R = 32, C = 32, HO = 10, THR = 20;
  localparam int RD_LEN = R * (1 + C) + 1;  // Force_off cycles per event

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [R-1:0][C-1:0] spad_bd;
  logic sensor_out, out_valid, readout, force_off, cmp_out;
  logic [4:0] row;
  logic ext_rst;

  imager_cl32 dut (
    .clk(clk), .rst_n(rst_n), .holdoff(8'(HO)), .thr(6'(THR)), .ext_rst(ext_rst),
    .spad_bd(spad_bd), .sensor_out(sensor_out), .out_valid(out_valid), .row(row),
    .readout(readout), .force_off(force_off), .cmp_out(cmp_out)
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

  int left [R][C];
  logic [R-1:0][C-1:0] frame_q;
  int t = 0, ev_t = -100000, n_events = 0, n_below = 0, n_forced_bd = 0, nbit = 0, max_dark = 0;
  bit exp_cmp = 0;

  initial begin
    spad_bd = '0; ext_rst = 1'b0;
    foreach (left[r, c]) left[r][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (t = 0; t < 4600; t++) begin
      int n_off, dt;
      bit exp_force;
      n_off = 0;
      foreach (left[r, c]) if (left[r][c] != 0) n_off++;
      dt = t - ev_t;
      exp_force = (dt >= 2 && dt < 2 + RD_LEN);
      // ---- checks of the current cycle ----
      chk(cmp_out == exp_cmp, $sformatf("CMP_out=%0b expected %0b (t=%0d)", cmp_out, exp_cmp, t));
      chk(force_off == exp_force, $sformatf("Force_off=%0b expected %0b (t=%0d)", force_off, exp_force, t));
      chk(readout == (dt >= 2 && dt < 1 + RD_LEN), $sformatf("Readout wrong at t=%0d", t));
      if (out_valid) begin
        int rr, cc;
        rr = nbit / C; cc = nbit % C;
        chk(row == 5'(rr), $sformatf("Row=%0d expected %0d", row, rr));
        chk(sensor_out == frame_q[rr][cc], $sformatf("pixel (%0d,%0d) read %0b expected %0b", rr, cc, sensor_out, frame_q[rr][cc]));
        nbit++;
      end
      if (!exp_cmp && n_off > THR) begin
        // event detected in this cycle: DFFs record the SPAD states
        foreach (left[r, c]) frame_q[r][c] = (left[r][c] != 0);
        ev_t = t;
        exp_cmp = 1;
        n_events++;
        nbit = 0;
      end else if (!exp_cmp && n_off > max_dark) max_dark = n_off;
      if (exp_cmp && dt == 1 + RD_LEN) begin
        exp_cmp = 0;
        chk(nbit == R * C, $sformatf("%0d pixels read, expected %0d", nbit, R * C));
      end
      // ---- breakdowns for this cycle ----
      spad_bd = '0;
      if ($urandom_range(3) == 0) spad_bd[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      if (t == 300) begin
        for (int k = 0; k < 12; k++) spad_bd[k][k + 3] = 1'b1;
        n_below++;
      end
      if (t == 700 || t == 2900)
        for (int k = 0; k < 45; k++) spad_bd[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      if (exp_force && $urandom_range(3) == 0) begin
        spad_bd[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
        n_forced_bd++;
      end
      // ---- reference model update at the closing edge ----
      foreach (left[r, c]) begin
        if (exp_force)            left[r][c] = 0;
        else if (left[r][c] != 0) left[r][c]--;
        else if (spad_bd[r][c])   left[r][c] = HO;
      end
      @(negedge clk);
    end
    $display("events %0d, sub-threshold bursts %0d, breakdowns under Force_off %0d, max dark SPADs in hold-off %0d",
             n_events, n_below, n_forced_bd, max_dark);
    chk(n_events == 2, "expected two events");
    chk(n_below == 1 && max_dark >= 12, "sub-threshold burst not seen");
    chk(n_forced_bd > 0, "no breakdown under Force_off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
