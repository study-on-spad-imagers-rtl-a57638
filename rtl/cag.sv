// cag: column address generator of a BPE pixel array.
//
// Each pixel of a row reads its column address one bit at a time. The word
// lines WL are one-hot and select which address bit is placed on every
// column's Address line; the column address is the 1-based column number, so
// a row whose address line stays 0 has no breakdown pixel selected.
//
// Interface: wl (one-hot, ABITS wide) in, addr[c] out for each column c.
// Purely combinational. The one-hot word-line input follows the described
// externally driven WL[0:3] / WL[0:4] signals; the 1-based numbering is this
// design's reading of "address 0 = no pixel".
//
// The columns with addresses 1, 2, 4, 8 and 16 are plain copies of one word
// line, so synthesis leaves them as wires.
module cag #(
  parameter int unsigned COLS  = 31,
  parameter int unsigned ABITS = spad_pkg::addr_bits(COLS)
) (
  input  logic [ABITS-1:0] wl,
  output logic [COLS-1:0]  addr
);

  always_comb begin
    for (int unsigned c = 0; c < COLS; c++) begin
      logic [ABITS-1:0] col_addr;
      col_addr = ABITS'(c + 1);
      addr[c]  = |(wl & col_addr);
    end
  end

endmodule
