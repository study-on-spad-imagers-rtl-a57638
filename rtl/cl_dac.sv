// cl_dac: behavioural model of the 6-bit threshold DAC of the current-logic
// imager.
//
// The DAC is built from the same unit current cells as the pixels and drives
// a resistor equal to the pixel-sum load, so code k gives the voltage that k
// fired pixels would give. Half an LSB is added so that V_SPAD < V_ref holds
// exactly when more than k pixels are in hold-off:
//   V_ref = VDD - (code + 0.5) * I_unit * R_load.
// Voltages are signed integers in units of 0.1 mV, as in ucc_sum. The
// half-LSB offset is this model's choice; continuous-time, no clock.
module cl_dac #(
  parameter int VDD_DMV  = 18000,
  parameter int STEP_DMV = 100
) (
  input  logic [5:0]         code,   // 6-b external threshold input
  output logic signed [31:0] v_ref   // V_ref in 0.1 mV
);

  assign v_ref = VDD_DMV - int'(code) * STEP_DMV - STEP_DMV / 2;

endmodule
