// bpe_cell: breakdown-pixel-extraction logic of one pixel.
//
// The search signal of a row enters at the left and passes a pixel whose
// stored SPAD state is 0 without delay. A pixel with a stored breakdown blocks
// the search until the global Next pulse: Next sets its Mask flip-flop, which
// lets the search go on to the right and connects the pixel's column address
// bit (from the column address generator) to the row's address line. The next
// Next clears Mask again; the pixel is then marked read and stays transparent,
// so the following Next selects the next breakdown pixel of the row.
//
// Interface: search_in/search_out form the row chain (combinational, as the
// pass transistor chain of the original pixel); next is sampled on clk; clr
// (Search low, or reset) returns the pixel to "not read". addr_drive is this
// pixel's contribution to the wired-OR row address line.
//
// Timing: a search settles in the cycle it is applied; Mask changes on the
// rising clk edge in which next is high, so the address bit is valid from the
// following cycle.
//
// The pass/block/Mask behaviour follows the described pixel logic. The "read"
// flag that keeps a pixel transparent after its Mask falls is this design's
// way of expressing that a pixel is extracted only once per search.
module bpe_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,         // Search low: clear Mask and read flags
  input  logic state,       // stored SPAD state, 1 = breakdown in this frame
  input  logic search_in,   // Search[i]
  input  logic next,        // global Next
  input  logic addr_bit,    // Address[i] for the bit now on the word lines
  output logic search_out,  // Search[i+1]
  output logic mask,        // Mask[i]: pixel selected for address readout
  output logic addr_drive   // drive onto the row address line
);

  logic mask_q, read_q;

  // Pass the search if there is nothing to extract here.
  assign search_out = search_in & (~state | mask_q | read_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q <= 1'b0;
      read_q <= 1'b0;
    end else if (clr) begin
      mask_q <= 1'b0;
      read_q <= 1'b0;
    end else if (next) begin
      if (mask_q) begin
        mask_q <= 1'b0;
        read_q <= 1'b1;
      end else if (search_in && state && !read_q) begin
        mask_q <= 1'b1;
      end
    end
  end

  assign mask       = mask_q;
  assign addr_drive = mask_q & addr_bit;

endmodule
