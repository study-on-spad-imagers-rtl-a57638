// imager_bpe15: 15x15 SPAD imager, proof of concept of breakdown-pixel-
// extraction (BPE) readout.
//
// Each pixel holds a SPAD with a passive quenching circuit whose DFF records
// a breakdown in the exposure window (pqc_pixel). After the window the BPE
// array extracts the addresses of the fired pixels row-parallel: all 15 rows
// output, on their own pins, the 4-bit 1-based column address of one fired
// pixel per Next round, one bit per cycle selected by the one-hot word lines
// WL. SCH_fin, the AND of all rows' end-of-search flags, reports that every
// fired pixel has been read. The frame readout takes Max(N_BD,i) * 5 + 1
// cycles.
//
// All control (WIN, RST, Search[0], Next, WL[0:3]) comes from outside the
// chip, as in the original test chip. Interface: spad_bd[r][c] SPAD breakdowns;
// output[r] row address outputs; sch_fin completion flag.
//
// The Mask flags and row end flags stay inside the chip, as on the real die;
// lint reports those nets as unused.
module imager_bpe15 #(
  parameter int unsigned ROWS  = 15,
  parameter int unsigned COLS  = 15,
  parameter int unsigned ABITS = spad_pkg::addr_bits(COLS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      win,      // WIN (breakdowns recorded while low)
  input  logic                      rst,      // RST: clear pixel DFFs for a new frame
  input  logic                      search,   // Search[0]
  input  logic                      next,     // Next
  input  logic [ABITS-1:0]          wl,       // WL, one-hot address bit select
  input  logic [ROWS-1:0][COLS-1:0] spad_bd,
  output logic [ROWS-1:0]           addr_out, // Output[0:14]
  output logic                      sch_fin   // SCH_fin
);

  logic [ROWS-1:0][COLS-1:0] qc_out, mask;
  logic [ROWS-1:0] row_fin;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      pqc_pixel u_px (
        .clk     (clk),
        .rst_n   (rst_n),
        .win     (win),
        .rst     (rst),
        .spad_bd (spad_bd[r][c]),
        .qc_out  (qc_out[r][c])
      );
    end
  end

  // RST also clears the BPE flip-flops; a low Search does the same.
  bpe_array #(.ROWS(ROWS), .COLS(COLS), .ABITS(ABITS)) u_bpe (
    .clk      (clk),
    .rst_n    (rst_n),
    .state    (qc_out),
    .search   (search & ~rst),
    .next     (next),
    .wl       (wl),
    .addr_out (addr_out),
    .row_fin  (row_fin),
    .mask     (mask),
    .sch_fin  (sch_fin)
  );

endmodule
