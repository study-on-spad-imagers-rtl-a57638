// bg_ctrl: control block of the 31x31 BPE imager with background readout.
//
// It runs the frame sequence (frame_timer: Charge, T_win, Write, one hold-off
// cycle with WIN low) and, after every Write, reads the stored frame out of
// the BPE array while the SPADs already expose the next frame:
//
//   Search rises (1 cycle) -> if SCH_fin: done
//   Next (1 cycle) -> ABITS address-bit cycles, WL one-hot, MSB first
//   -> after the last bit: done if SCH_fin, otherwise Next again
//
// so T_readout = 1 + Max(N_BD,i) * (ABITS + 1) cycles. The readout starts in
// the hold-off cycle after Write; if it is still running at the next Write,
// that Write is suppressed and the frame is dropped (frame_drop). A frame is
// thus kept with the minimum dead time of 3 cycles whenever
// T_readout <= T_win + 2.
//
// Interface: win_width (5-bit external WIN width = T_win + 2); sch_fin from
// the array; win, charge, write, search, next, wl to the pixels; addr_valid
// marks cycles in which the row address lines carry address bit addr_bit;
// frame_start pulses in the first readout cycle of a stored frame.
//
// The sequence and its cycle counts follow the described timing diagram; the
// MSB-first bit order and the exact readout start cycle are this design's.
//
// frame_timer's write_slot and phase outputs are not needed here and are
// left unread (lint reports them as unused).
module bg_ctrl #(
  parameter int unsigned ABITS = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [4:0]                 win_width,
  input  logic                       sch_fin,
  output logic                       win,
  output logic                       charge,
  output logic                       write,
  output logic                       frame_drop,
  output logic                       search,
  output logic                       next,
  output logic [ABITS-1:0]           wl,
  output logic                       addr_valid,
  output logic [$clog2(ABITS)-1:0]   addr_bit,
  output logic                       frame_start,
  output logic                       busy
);
  import spad_pkg::*;

  bpe_rd_state_e state_q;
  logic [$clog2(ABITS)-1:0] bit_q;
  logic write_slot;
  frame_phase_e phase;

  frame_timer u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .win_width  (win_width),
    .write_ok   (state_q == RD_IDLE),
    .win        (win),
    .charge     (charge),
    .write      (write),
    .write_slot (write_slot),
    .frame_drop (frame_drop),
    .phase      (phase)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= RD_IDLE;
      bit_q   <= '0;
    end else begin
      unique case (state_q)
        RD_IDLE:   if (write) state_q <= RD_SEARCH;
        RD_SEARCH: state_q <= sch_fin ? RD_IDLE : RD_NEXT;
        RD_NEXT: begin
          state_q <= RD_BITS;
          bit_q   <= ($clog2(ABITS))'(ABITS - 1);
        end
        RD_BITS: begin
          if (bit_q != '0)  bit_q   <= bit_q - 1'b1;
          else if (sch_fin) state_q <= RD_IDLE;
          else              state_q <= RD_NEXT;
        end
      endcase
    end
  end

  assign search      = (state_q != RD_IDLE);
  assign next        = (state_q == RD_NEXT);
  assign addr_valid  = (state_q == RD_BITS);
  assign addr_bit    = bit_q;
  assign wl          = addr_valid ? (ABITS'(1) << bit_q) : '0;
  assign frame_start = (state_q == RD_SEARCH);
  assign busy        = (state_q != RD_IDLE);

endmodule
