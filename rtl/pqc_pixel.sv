// pqc_pixel: behavioural model of the passive quenching circuit (PQC) and its
// state DFF in a pixel of the 15x15 BPE imager.
//
// The SPAD is free-running: a quenching resistor quenches each avalanche and
// the diode recharges by itself, with no hold-off. Each breakdown produces a
// pulse on the inverter output which reaches the DFF through a NOR gate gated
// by WIN. As described for this circuit, the NOR output is held low while WIN
// is high, so breakdowns are only recorded while WIN is low. QC_out goes high
// at the first recorded breakdown and stays high until RST.
//
// The real pulse clocks the DFF asynchronously; this model samples spad_bd on
// clk. Interface: win, rst (frame reset) from outside, spad_bd from the SPAD,
// qc_out to the BPE logic.
module pqc_pixel (
  input  logic clk,
  input  logic rst_n,
  input  logic win,      // WIN: breakdowns blocked while high
  input  logic rst,      // RST: clear QC_out for a new frame
  input  logic spad_bd,  // breakdown pulse of the SPAD
  output logic qc_out    // QC_out: breakdown seen in this window
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    qc_out <= 1'b0;
    else if (rst)                  qc_out <= 1'b0;
    else if (spad_bd && !win)      qc_out <= 1'b1;
  end

endmodule
