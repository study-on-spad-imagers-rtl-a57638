// tb_bg_ctrl: control block of the background-readout imager against a model
// of the BPE array: the array's SCH_fin is high once Search is up and as many
// Next pulses as the frame's Max(N_BD,i) have been given. With WIN width 8
// (T_win = 6) the bench checks the WIN/Charge/Write waveform, the Search,
// Next and word-line sequence (one-hot, MSB first), T_readout = 1 + Max * 6,
// and that Write is suppressed (frame dropped) exactly when the previous
// readout is still running.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_bg_ctrl;
  localparam int AB = 5, WW = 8, P = WW + 1, NF = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sch_fin, win, charge, write, frame_drop, search, next, addr_valid, frame_start, busy;
  logic [AB-1:0] wl;
  logic [2:0] addr_bit;

  bg_ctrl dut (.clk(clk), .rst_n(rst_n), .win_width(5'(WW)), .*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // array model
  int kmax = 0, nx = 0;
  assign sch_fin = search && (nx >= kmax);
  always @(posedge clk) if (!search) nx <= 0; else if (next) nx <= nx + 1;

  int kq[$];
  int ph = 0, frame = 0, t = 0, busy_until = -1, exp_bit = AB - 1, rd = 0, n_drop = 0, n_safe = 0;
  int kpat [NF];
  initial for (int n = 0; n < NF; n++) kpat[n] = (n % 4 == 3) ? 4 : (n % 4 == 2) ? 0 : 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!win) @(negedge clk);
    while (frame < NF) begin
      chk(win == (ph != P - 1), "WIN");
      chk(charge == (ph == 0), "Charge");
      chk(busy == (t <= busy_until), $sformatf("busy at t=%0d", t));
      if (ph == WW - 1) begin
        bit exp_drop;
        exp_drop = (t <= busy_until);
        chk(write == !exp_drop && frame_drop == exp_drop, $sformatf("Write/drop frame %0d", frame));
        if (exp_drop) n_drop++;
        else begin
          busy_until = t + 1 + kpat[frame] * (AB + 1);
          if (1 + kpat[frame] * (AB + 1) <= WW) n_safe++;
          kq.push_back(kpat[frame]);
        end
      end else chk(write == 1'b0 && frame_drop == 1'b0, "Write outside the write slot");
      if (frame_start) begin
        kmax = kq.pop_front();
        exp_bit = AB - 1;
        chk(search && !next && !addr_valid, "first readout cycle is a search cycle");
      end
      if (addr_valid) begin
        chk(int'(addr_bit) == exp_bit && wl == (AB'(1) << exp_bit), "word line order");
        exp_bit = (exp_bit == 0) ? AB - 1 : exp_bit - 1;
      end else chk(wl == '0, "word lines idle");
      chk(!(next && addr_valid), "Next and address bit in one cycle");
      ph = (ph + 1) % P;
      if (ph == 0) frame++;
      t++;
      @(negedge clk); #1;
    end
    $display("safety-zone frames %0d, dropped %0d", n_safe, n_drop);
    chk(n_safe > 0 && n_drop > 0, "both kept and dropped frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
