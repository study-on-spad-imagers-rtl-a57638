// bpe_array: row-parallel breakdown-pixel-extraction readout of an ROWS x COLS
// array of stored SPAD states.
//
// Each row is a chain of bpe_cell instances fed by the common Search signal.
// Within one clock cycle each row's search runs from the left to its first
// breakdown pixel that has not yet been read and stops there. Each global Next
// then selects that pixel (Mask) and lets the search continue to the next one,
// so every row presents one breakdown pixel per Next. While a pixel is
// selected its row address line carries the address bit chosen by the
// one-hot word lines WL, read out serially over ABITS cycles. A row whose
// search reaches the rightmost pixel raises its end flag, and the AND tree
// (sch_detect) turns all flags into SCH_fin.
//
// Readout of one frame therefore takes 1 + Max(N_BD,i) * (ABITS + 1) cycles:
// one search cycle, then for each round a Next cycle and ABITS address-bit
// cycles. Rows without a pixel in a round output address 0.
//
// Interface: state[r][c] are the pixel memories; search (level, low clears
// all Mask/read flags), next and wl come from the control block; addr_out[r]
// is row r's address line, row_fin[r] its end flag, mask[r][c] the selected
// pixels. Combinational from state/search/wl to the outputs, registered Mask.
module bpe_array #(
  parameter int unsigned ROWS  = 31,
  parameter int unsigned COLS  = 31,
  parameter int unsigned ABITS = spad_pkg::addr_bits(COLS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [ROWS-1:0][COLS-1:0]  state,
  input  logic                       search,
  input  logic                       next,
  input  logic [ABITS-1:0]           wl,
  output logic [ROWS-1:0]            addr_out,
  output logic [ROWS-1:0]            row_fin,
  output logic [ROWS-1:0][COLS-1:0]  mask,
  output logic                       sch_fin
);

  logic [COLS-1:0] col_addr;

  cag #(.COLS(COLS), .ABITS(ABITS)) u_cag (
    .wl   (wl),
    .addr (col_addr)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [COLS:0]   chain;
    logic [COLS-1:0] drive;

    assign chain[0] = search;

    for (genvar c = 0; c < COLS; c++) begin : g_col
      bpe_cell u_cell (
        .clk        (clk),
        .rst_n      (rst_n),
        .clr        (~search),
        .state      (state[r][c]),
        .search_in  (chain[c]),
        .next       (next),
        .addr_bit   (col_addr[c]),
        .search_out (chain[c+1]),
        .mask       (mask[r][c]),
        .addr_drive (drive[c])
      );
    end

    assign addr_out[r] = |drive;
    assign row_fin[r]  = chain[COLS];
  end

  sch_detect #(.ROWS(ROWS)) u_sch (
    .row_fin (row_fin),
    .sch_fin (sch_fin)
  );

endmodule
