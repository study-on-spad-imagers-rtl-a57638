// vhaqc: behavioural model of the variable hold-off active quenching circuit
// (VHAQC) of the current-logic imager pixel.
//
// The real circuit is analog: a breakdown pulls the cathode node low, a
// feedback transistor holds the SPAD below breakdown, and a current-starved
// delay (set by the bias voltage VBias) decides when the SPAD is recharged.
// This model keeps that behaviour at clock level. The SPAD is free-running:
// while ready, a breakdown (spad_bd) starts a hold-off of holdoff cycles, during
// which 'Output' (off) is high, the unit current cell of the pixel conducts and
// the SPAD cannot fire again. Then the SPAD is recharged and ready again.
// Force_off holds the SPAD off through its own transistors: a ready SPAD
// cannot fire, a running hold-off timer is cleared (its unit current cell
// stops), and when Force_off falls every SPAD is recharged at once (global
// recharge).
//
// Interface: holdoff is the hold-off length in clock cycles, standing in for
// the analog VBias setting (at least 1 cycle is used); off is 'Output'.
module vhaqc #(
  parameter int unsigned HW = 8   // width of the hold-off setting
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          spad_bd,    // breakdown of the SPAD in this cycle
  input  logic          force_off,  // Force_Off
  input  logic [HW-1:0] holdoff,    // hold-off length in cycles (VBias)
  output logic          off         // Output: SPAD in hold-off, UCC on
);

  logic [HW-1:0] left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q <= '0;
    end else if (force_off) begin
      left_q <= '0;
    end else if (left_q != '0) begin
      left_q <= left_q - 1'b1;
    end else if (spad_bd) begin
      left_q <= (holdoff == '0) ? HW'(1) : holdoff;
    end
  end

  assign off = (left_q != '0);

endmodule
