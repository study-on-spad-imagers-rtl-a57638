// imager_ed31: 31x31 SPAD imager with an event discriminator built from the
// breakdown-pixel-extraction (BPE) logic.
//
// The pixel array (aqc_pixel + bpe_array) is that of the background-readout
// imager. After every exposure window the control block (ed_ctrl) first lets
// the BPE search count Max(N_BD,i), the largest number of fired pixels in any
// row, which grows with the total number of fired pixels. Frames with
// Max(N_BD,i) <= N_th are dark frames and are discarded without readout, so
// the dead time stays at 3 cycles. A frame with Max(N_BD,i) > N_th is an
// event frame: its fired-pixel addresses are extracted row-parallel and sent
// off chip serially through a 31-bit shift register.
//
// Interface: spad_bd[r][c] SPAD breakdowns; win_width (WIN width = T_win + 2)
// and nth (N_th) are 5-bit settings; address_output is the serial output,
// valid while out_state is high: per Next round and per address bit (MSB
// first) 31 bits, row 0 first. out_start marks an accepted event frame,
// cnt the counter, dark_frame a discarded frame, frame_drop a dropped one.
//
// The per-pixel fired flags, Mask flags and row end flags stay inside the
// chip, as on the real die, and ed_ctrl's event_frame is not a pin (out_start
// carries the same information); lint reports those nets as unused.
module imager_ed31 #(
  parameter int unsigned ROWS  = 31,
  parameter int unsigned COLS  = 31,
  parameter int unsigned ABITS = spad_pkg::addr_bits(COLS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [4:0]                win_width,
  input  logic [4:0]                nth,
  input  logic [ROWS-1:0][COLS-1:0] spad_bd,
  output logic                      address_output,
  output logic                      out_state,
  output logic                      out_start,
  output logic                      sch_fin,
  output logic [5:0]                cnt,
  output logic                      dark_frame,
  output logic                      frame_drop,
  output logic                      win,
  output logic                      busy
);

  logic charge, write, search, next, out_write, shift, event_frame;
  logic [ABITS-1:0] wl;
  logic [ROWS-1:0][COLS-1:0] mem, fired, mask;
  logic [ROWS-1:0] row_fin, addr_out;

  ed_ctrl #(.ROWS(ROWS), .ABITS(ABITS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .win_width   (win_width),
    .nth         (nth),
    .sch_fin     (sch_fin),
    .win         (win),
    .charge      (charge),
    .write       (write),
    .frame_drop  (frame_drop),
    .search      (search),
    .next        (next),
    .wl          (wl),
    .out_write   (out_write),
    .shift       (shift),
    .out_start   (out_start),
    .out_state   (out_state),
    .cnt         (cnt),
    .dark_frame  (dark_frame),
    .event_frame (event_frame),
    .busy        (busy)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      aqc_pixel u_px (
        .clk     (clk),
        .rst_n   (rst_n),
        .win     (win),
        .charge  (charge),
        .write   (write),
        .spad_bd (spad_bd[r][c]),
        .fired   (fired[r][c]),
        .mem     (mem[r][c])
      );
    end
  end

  bpe_array #(.ROWS(ROWS), .COLS(COLS), .ABITS(ABITS)) u_bpe (
    .clk      (clk),
    .rst_n    (rst_n),
    .state    (mem),
    .search   (search),
    .next     (next),
    .wl       (wl),
    .addr_out (addr_out),
    .row_fin  (row_fin),
    .mask     (mask),
    .sch_fin  (sch_fin)
  );

  out_shift_reg #(.W(ROWS)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (out_write),
    .shift (shift),
    .d     (addr_out),
    .sout  (address_output)
  );

endmodule
