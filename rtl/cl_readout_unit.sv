// cl_readout_unit: readout DFF of a current-logic imager pixel.
//
// The comparator output CMP_out clocks this flip-flop, so the state of the
// pixel's SPAD (in hold-off or not) at the moment an event is detected is
// stored and kept while the rows are read out. DFF_RST clears it after the
// readout. In this synchronous model the capture happens on the clk edge at
// which the comparator decision is taken (capture high for one cycle).
// Interface: capture, state in; q out to the row readout.
//
// The DFF and its reset follow the described pixel; the clk-synchronous
// capture is this design's choice.
module cl_readout_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic capture,  // rising CMP_out
  input  logic dff_rst,  // DFF_RST
  input  logic state,    // VHAQC Output: SPAD fired within the hold-off time
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 1'b0;
    else if (dff_rst) q <= 1'b0;
    else if (capture) q <= state;
  end

endmodule
