// tb_cl32_laser_run: one 17 us measurement of the 32x32 current-logic imager
// at its operating point: 80 MHz clock (1360 cycles), pulsed laser triggered
// at 1 us (cycle 80) with a 62.5 ns pulse (5 cycles).
//
// Dark counts arrive at about 10 kHz per pixel (one breakdown somewhere in
// the array with probability 1/8 per cycle). The laser lights a disc of
// radius 6 pixels through a pinhole, each pixel with probability 1/2, spread
// over the 5 pulse cycles. Hold-off is 10 cycles and the DAC code 10. The
// bench models every pixel's hold-off timer as the imager bench does and
// checks CMP_out, Force_off, Readout, Row and Sensor_out cycle by cycle. It
// requires that Readout stays low before the laser, that exactly one event
// is seen, and that the complete raster readout (R * (1 + C) + 1 cycles of
// Force_off) ends inside the 17 us window.
module tb_cl32_laser_run;
  localparam int R = 32, C = 32, HO = 10, THR = 10;
  localparam int T_RUN = 1360, T_LASER = 80, T_PULSE = 5;
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
    for (t = 0; t < T_RUN; t++) begin
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
      if ($urandom_range(7) == 0) spad_bd[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      if (t < T_LASER) chk(!readout, "Readout before the laser");
      if (t >= T_LASER && t < T_LASER + T_PULSE)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            if ((r - 16) * (r - 16) + (c - 16) * (c - 16) <= 36 && ((r * 7 + c * 3) % T_PULSE) == t - T_LASER
                && $urandom_range(1) == 1) spad_bd[r][c] = 1'b1;
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
    $display("event at cycle %0d, readout ends at cycle %0d of %0d", ev_t, ev_t + 2 + RD_LEN, T_RUN);
    chk(n_events == 1, "expected exactly one event");
    chk(ev_t >= T_LASER && ev_t < T_LASER + T_PULSE, $sformatf("event at cycle %0d", ev_t));
    chk(ev_t + 2 + RD_LEN <= T_RUN, "readout did not end inside the measurement");
    chk(nbit == R * C, "frame not completely read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
