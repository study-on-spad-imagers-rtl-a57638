// imager_bg31: 31x31 SPAD imager with breakdown-pixel-extraction (BPE)
// readout and background readout.
//
// Every pixel has a gated active quenching circuit and a 1-bit memory
// (aqc_pixel). At the end of each exposure window the SPAD states are written
// into the memories, and the BPE array extracts the addresses of the
// breakdown pixels of that frame row-parallel while the next frame is already
// being exposed. Only the addresses of fired pixels leave the chip: each row
// outputs, one bit per cycle (MSB first), the 5-bit 1-based column address of
// one fired pixel per Next round, or 0. A frame whose readout does not finish
// before the next Write causes the following frames to be dropped.
//
// Interface: spad_bd[r][c] breakdown events of the SPADs; win_width sets the
// WIN pulse width (T_win + 2 cycles); addr_out[r] are the 31 row-parallel
// serial address outputs, valid when addr_valid, bit index addr_bit;
// sch_fin is the global search completion; frame_start/frame_drop mark the
// start of a stored frame's readout and each dropped frame.
//
// The per-pixel fired flags, Mask flags and row end flags stay inside the
// chip, as on the real die; lint reports those nets as unused.
module imager_bg31 #(
  parameter int unsigned ROWS  = 31,
  parameter int unsigned COLS  = 31,
  parameter int unsigned ABITS = spad_pkg::addr_bits(COLS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [4:0]                win_width,
  input  logic [ROWS-1:0][COLS-1:0] spad_bd,
  output logic [ROWS-1:0]           addr_out,
  output logic                      addr_valid,
  output logic [$clog2(ABITS)-1:0]  addr_bit,
  output logic                      sch_fin,
  output logic                      frame_start,
  output logic                      frame_drop,
  output logic                      win,
  output logic                      busy
);

  logic charge, write, search, next;
  logic [ABITS-1:0] wl;
  logic [ROWS-1:0][COLS-1:0] mem, fired, mask;
  logic [ROWS-1:0] row_fin;

  bg_ctrl #(.ABITS(ABITS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .win_width   (win_width),
    .sch_fin     (sch_fin),
    .win         (win),
    .charge      (charge),
    .write       (write),
    .frame_drop  (frame_drop),
    .search      (search),
    .next        (next),
    .wl          (wl),
    .addr_valid  (addr_valid),
    .addr_bit    (addr_bit),
    .frame_start (frame_start),
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

endmodule
