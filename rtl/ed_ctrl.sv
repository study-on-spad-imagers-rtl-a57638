// ed_ctrl: control block of the 31x31 BPE imager with event discriminator.
//
// Same frame sequence as the background-readout imager (frame_timer). After
// each Write the BPE array is first used as a counter of Max(N_BD,i), the
// largest number of fired pixels in any row: Search rises, then one Next per
// cycle is issued while SCH_fin is low, and CNT counts the Nexts. When SCH_fin
// rises with CNT <= N_th the frame is a dark frame: Search falls and nothing is
// read out. When CNT becomes N_th + 1 the frame is an event frame: Search
// falls for one cycle (Out_start high), rises again, and a normal BPE readout
// follows. Because the addresses leave the chip serially, every address bit
// round is written into a ROWS-bit shift register (Out_write) holding that
// bit of all rows, then shifted out on Address_Output (Out_state high), row 0
// first, address MSB first:
//
//   Search, then per Next round: Next, and per address bit
//   Out_write (1 cycle) + ROWS shift cycles
//
// While the count or readout runs, Write is suppressed and frames are
// dropped; a dark frame whose count ends before the next Write keeps the dead
// time at 3 cycles.
//
// Interface: win_width and nth are the 5-bit external settings; sch_fin from
// the array; win, charge, write, search, next, wl to the array; out_write,
// shift to the shift register; out_start, out_state, cnt, event_frame,
// dark_frame and frame_drop as status.
//
// frame_timer's write_slot and phase outputs are not needed here and are
// left unread (lint reports them as unused).
module ed_ctrl #(
  parameter int unsigned ROWS  = 31,
  parameter int unsigned ABITS = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [4:0]                 win_width,
  input  logic [4:0]                 nth,
  input  logic                       sch_fin,
  output logic                       win,
  output logic                       charge,
  output logic                       write,
  output logic                       frame_drop,
  output logic                       search,
  output logic                       next,
  output logic [ABITS-1:0]           wl,
  output logic                       out_write,
  output logic                       shift,
  output logic                       out_start,
  output logic                       out_state,
  output logic [5:0]                 cnt,
  output logic                       dark_frame,
  output logic                       event_frame,
  output logic                       busy
);
  import spad_pkg::*;

  ed_state_e state_q;
  logic [5:0] cnt_q;
  logic [$clog2(ABITS)-1:0] bit_q;
  logic [$clog2(ROWS+1)-1:0] sh_q;
  logic write_slot;
  frame_phase_e phase;

  frame_timer u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .win_width  (win_width),
    .write_ok   (state_q == ED_IDLE),
    .win        (win),
    .charge     (charge),
    .write      (write),
    .write_slot (write_slot),
    .frame_drop (frame_drop),
    .phase      (phase)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ED_IDLE;
      cnt_q   <= '0;
      bit_q   <= '0;
      sh_q    <= '0;
    end else begin
      unique case (state_q)
        ED_IDLE: if (write) begin
          state_q <= ED_CSEARCH;
          cnt_q   <= '0;
        end
        ED_CSEARCH: state_q <= sch_fin ? ED_IDLE : ED_COUNT;
        ED_COUNT: begin
          if (sch_fin) begin
            state_q <= ED_IDLE;
          end else begin
            cnt_q <= cnt_q + 6'd1;
            if (cnt_q + 6'd1 > {1'b0, nth}) state_q <= ED_SUSPEND;
          end
        end
        ED_SUSPEND: state_q <= ED_RSEARCH;
        ED_RSEARCH: state_q <= sch_fin ? ED_IDLE : ED_RNEXT;
        ED_RNEXT: begin
          state_q <= ED_LOAD;
          bit_q   <= ($clog2(ABITS))'(ABITS - 1);
        end
        ED_LOAD: begin
          state_q <= ED_SHIFT;
          sh_q    <= '0;
        end
        ED_SHIFT: begin
          if (sh_q != ($clog2(ROWS+1))'(ROWS - 1)) begin
            sh_q <= sh_q + 1'b1;
          end else if (bit_q != '0) begin
            bit_q   <= bit_q - 1'b1;
            state_q <= ED_LOAD;
          end else begin
            state_q <= sch_fin ? ED_IDLE : ED_RNEXT;
          end
        end
      endcase
    end
  end

  assign search      = (state_q == ED_CSEARCH) || (state_q == ED_COUNT) ||
                       (state_q == ED_RSEARCH) || (state_q == ED_RNEXT) ||
                       (state_q == ED_LOAD)    || (state_q == ED_SHIFT);
  assign next        = ((state_q == ED_COUNT) && !sch_fin) || (state_q == ED_RNEXT);
  assign out_write   = (state_q == ED_LOAD);
  assign shift       = (state_q == ED_SHIFT);
  assign out_state   = (state_q == ED_SHIFT);
  assign out_start   = (state_q == ED_SUSPEND);
  assign wl          = (state_q == ED_LOAD) ? (ABITS'(1) << bit_q) : '0;
  assign cnt         = cnt_q;
  assign dark_frame  = ((state_q == ED_CSEARCH) || (state_q == ED_COUNT)) && sch_fin;
  assign event_frame = out_start;
  assign busy        = (state_q != ED_IDLE);

endmodule
