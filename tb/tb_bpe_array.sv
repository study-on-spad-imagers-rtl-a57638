// tb_bpe_array: BPE readout of random 31x31 stored frames of increasing
// density. The bench sequences Search, Next and WL like the control block,
// decodes every row's serial address and checks it against the frame, and
// checks T_readout = 1 + Max(N_BD,i) * 6 cycles, the Mask positions and the
// end-of-row flags.
//
// Stimulus sizes and random patterns are this bench's own choice; the
// expected values follow the behaviour described in the design's headers.
module tb_bpe_array;
  localparam int R = 31, C = 31, AB = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [R-1:0][C-1:0] state, mask;
  logic search, next, sch_fin;
  logic [AB-1:0] wl;
  logic [R-1:0] addr_out, row_fin;

  bpe_array dut (.*);

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

  task automatic read_frame(input int f);
    int m, cycles, rounds;
    logic [AB-1:0] acc [R];
    int got [R][$];
    m = 0;
    for (int r = 0; r < R; r++) if ($countones(state[r]) > m) m = $countones(state[r]);
    search = 1'b1; #1;
    cycles = 1; rounds = 0;
    for (int r = 0; r < R; r++)
      chk(row_fin[r] == (state[r] == '0), $sformatf("frame %0d row %0d end flag after search", f, r));
    if (!sch_fin) begin
      forever begin
        @(negedge clk); next = 1'b1; cycles++;
        @(negedge clk); next = 1'b0;
        // exactly one Mask per row that still had an unread pixel
        for (int r = 0; r < R; r++)
          chk($countones(mask[r]) == ($countones(state[r]) > rounds ? 1 : 0), $sformatf("row %0d mask count", r));
        for (int b = AB - 1; b >= 0; b--) begin
          wl = AB'(1) << b; #1;
          for (int r = 0; r < R; r++) acc[r][b] = addr_out[r];
          cycles++;
          if (b != 0) @(negedge clk);
        end
        rounds++;
        for (int r = 0; r < R; r++) if (acc[r] != 0) got[r].push_back(int'(acc[r]));
        wl = '0;
        if (sch_fin || rounds > C) break;
      end
    end
    chk(cycles == 1 + m * (AB + 1), $sformatf("frame %0d: %0d cycles, expected %0d", f, cycles, 1 + m * (AB + 1)));
    for (int r = 0; r < R; r++) begin
      int exp_l[$];
      for (int c = 0; c < C; c++) if (state[r][c]) exp_l.push_back(c + 1);
      chk(got[r] == exp_l, $sformatf("frame %0d row %0d addresses", f, r));
    end
    @(negedge clk); search = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    state = '0; search = 1'b0; next = 1'b0; wl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 12; f++) begin
      state = '0;
      for (int k = 0; k < f * f * 4; k++) state[$urandom_range(R-1)][$urandom_range(C-1)] = 1'b1;
      read_frame(f);
    end
    state = '1;
    read_frame(99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
