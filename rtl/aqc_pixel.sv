// aqc_pixel: behavioural model of the gated active quenching circuit (AQC) and
// the 1-bit frame memory of a background-readout BPE pixel.
//
// The real circuit is analog (four transistors and an inverter on the SPAD
// cathode); this cycle-level model reproduces its logic behaviour. Charge
// recharges the SPAD to its excess bias. While WIN is high and neither Charge
// nor Write is active the SPAD is sensitive: a breakdown (spad_bd, one pulse
// from the SPAD) pulls the cathode low, the inverter output goes high and the
// feedback transistor holds the cathode low, so the SPAD stays off and the
// "fired" state is kept (hold-off starts at the breakdown). Write copies the
// fired state into the pixel DFF (mem), which the BPE logic reads while the
// next frame is exposed (background readout). WIN low forces the SPAD off.
//
// Interface: win, charge, write from the control block; spad_bd from the
// SPAD; mem to the BPE logic; fired is the inverter output. All state changes
// on the rising clk edge; the breakdown is assumed to be sampled by clk.
module aqc_pixel (
  input  logic clk,
  input  logic rst_n,
  input  logic win,      // WIN: SPAD biased above breakdown when high
  input  logic charge,   // Charge: recharge the SPAD (start of window)
  input  logic write,    // Write: store this frame's state in the DFF
  input  logic spad_bd,  // avalanche breakdown of the SPAD in this cycle
  output logic fired,    // cathode held low after a breakdown (inverter out)
  output logic mem       // 1-bit frame memory read by the BPE logic
);

  logic sensitive;
  assign sensitive = win & ~charge & ~write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fired <= 1'b0;
      mem   <= 1'b0;
    end else begin
      if (charge)                   fired <= 1'b0;
      else if (sensitive && spad_bd) fired <= 1'b1;
      if (write) mem <= fired;
    end
  end

endmodule
