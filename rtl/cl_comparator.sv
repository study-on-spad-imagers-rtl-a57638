// cl_comparator: behavioural model of the event comparator of the
// current-logic imager.
//
// A folded-cascode comparator (analog in the original) compares V_SPAD with
// V_ref; its inverted output CMP_out_pre goes high when V_SPAD falls below
// V_ref, i.e. when more pixels than the threshold are in hold-off at the same
// time. CMP_out_pre clocks a DFF whose output CMP_out then stays high through
// the readout and the global recharge, until DFF_RST clears it. Here the DFF
// samples on clk; capture is high in the cycle in which CMP_out is set (the
// moment the pixel DFFs must record the SPAD states).
//
// The comparison and the latching DFF follow the described circuit; sampling
// it once per clock instead of on the analog edge is this model's choice.
module cl_comparator (
  input  logic clk,
  input  logic rst_n,
  input  logic signed [31:0] v_spad, // V_SPAD (0.1 mV units)
  input  logic signed [31:0] v_ref,  // V_ref (0.1 mV units)
  input  logic dff_rst,     // DFF_RST
  output logic cmp_out_pre, // CMP_out_pre
  output logic cmp_out,     // CMP_out (latched)
  output logic capture      // rising edge of CMP_out
);

  assign cmp_out_pre = (v_spad < v_ref);
  assign capture     = cmp_out_pre & ~cmp_out & ~dff_rst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cmp_out <= 1'b0;
    else if (dff_rst)     cmp_out <= 1'b0;
    else if (cmp_out_pre) cmp_out <= 1'b1;
  end

endmodule
