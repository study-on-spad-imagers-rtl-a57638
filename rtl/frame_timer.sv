// frame_timer: frame sequencing of the gated 31x31 BPE imagers.
//
// A frame lasts win_width + 1 cycles. WIN is high for win_width cycles: one
// Charge cycle that recharges the SPADs, win_width - 2 cycles of exposure
// window T_win, and one Write cycle in which the exposure result is stored in
// each pixel's 1-bit memory. WIN is then low for one cycle, which forces every
// SPAD off and gives at least one cycle of hold-off. The dead time between
// two windows is therefore three cycles (Write, hold-off, Charge).
//
// The Write pulse is only issued when write_ok is high (the pixel memories
// are not being read); otherwise the frame is dropped and frame_drop pulses
// in that cycle. win_width is the 5-bit external setting, sampled at the start
// of each frame and raised to 3 if lower (T_win of at least one cycle).
//
// Follows the described frame timing (T_win = WIN width - 2, T_dead = 3
// cycles); the clamping of small settings is this design's choice.
module frame_timer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] win_width,   // WIN pulse width in cycles (T_win + 2)
  input  logic       write_ok,    // pixel memories free for this frame's data
  output logic       win,         // WIN
  output logic       charge,      // Charge
  output logic       write,       // Write (gated by write_ok)
  output logic       write_slot,  // Write cycle of the frame, gated or not
  output logic       frame_drop,  // this frame's data is dropped
  output spad_pkg::frame_phase_e phase
);
  import spad_pkg::*;

  logic [4:0] cnt_q, width_q;
  logic [4:0] width_in;

  assign width_in = (win_width < 5'd3) ? 5'd3 : win_width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= 5'd3;   // start in a hold-off cycle; the first frame
      width_q <= 5'd3;   // then takes its width from win_width
    end else if (cnt_q == width_q) begin
      cnt_q   <= '0;
      width_q <= width_in;
    end else begin
      cnt_q   <= cnt_q + 5'd1;
    end
  end

  always_comb begin
    if (cnt_q == 5'd0)               phase = PH_CHARGE;
    else if (cnt_q == width_q - 5'd1) phase = PH_WRITE;
    else if (cnt_q == width_q)        phase = PH_HOLDOFF;
    else                              phase = PH_WINDOW;
  end

  assign win        = (phase != PH_HOLDOFF);
  assign charge     = (phase == PH_CHARGE);
  assign write_slot = (phase == PH_WRITE);
  assign write      = write_slot & write_ok;
  assign frame_drop = write_slot & ~write_ok;

endmodule
