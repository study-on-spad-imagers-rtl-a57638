// out_shift_reg: parallel-load, serial-out output shift register.
//
// load copies the W-bit word d into the register; each cycle with shift set
// moves it one place towards bit 0, and sout always shows bit 0. Bit 0 (row 0
// or column 0) therefore leaves the chip first. Used as the 31-bit address
// shift register of the event-discriminator imager and as the 32-bit row
// register of the current-logic imager. load has priority over shift; zeros
// are shifted in. Registered on the rising clk edge.
//
// The register widths follow the described chips; the shift direction and
// the load priority are this design's choice.
module out_shift_reg #(
  parameter int unsigned W = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] d,
  output logic         sout
);

  logic [W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {1'b0, q[W-1:1]};
  end

  assign sout = q[0];

endmodule
