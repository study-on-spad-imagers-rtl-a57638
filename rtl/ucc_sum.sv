// ucc_sum: behavioural model of the unit current cells (UCC) of all pixels and
// the common load resistor that form the current-logic adder.
//
// Each pixel's UCC sinks a unit current while its SPAD is in hold-off. All
// cell outputs are tied to one node pulled up to VDD through a load resistor,
// so the node voltage V_SPAD = VDD - n * I_unit * R_load falls linearly with
// the number n of SPADs in hold-off. The analog voltage is represented as a
// signed integer in units of 0.1 mV; VDD_DMV is VDD and STEP_DMV the drop per
// conducting cell (I_unit * R_load), both set by bias voltages in the original
// and chosen here (1.8 V, 10 mV per cell). Continuous-time, no clock.
//
// The linear current summation follows the described circuit; the voltage
// scale is this model's own choice.
module ucc_sum #(
  parameter int unsigned NPIX     = 1024,
  parameter int          VDD_DMV  = 18000,  // VDD in 0.1 mV
  parameter int          STEP_DMV = 100     // I_unit * R_load in 0.1 mV
) (
  input  logic [NPIX-1:0]    on,      // UCC enables (VHAQC Output of each pixel)
  output logic signed [31:0] v_spad   // V_SPAD in 0.1 mV
);

  always_comb begin
    int n;
    n = 0;
    for (int unsigned i = 0; i < NPIX; i++) n += int'(on[i]);
    v_spad = VDD_DMV - n * STEP_DMV;
  end

endmodule
