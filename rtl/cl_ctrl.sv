// cl_ctrl: control block of the 32x32 current-logic event-discriminator
// imager (raster readout).
//
// All outputs stay idle while CMP_out is low. At the first rising clk edge
// with CMP_out high, Force_off rises (every SPAD held off) and Readout rises.
// Each row is then read: Load (one cycle) copies the selected row Row of pixel
// DFFs into the COLS-bit shift register, and COLS shift cycles put it out on
// Sensor_out. After the last row a one-cycle DFF_RST pulse clears the pixel
// DFFs and the comparator, and Force_off falls to start the global recharge.
// An external reset request (ext_rst) also produces a DFF_RST pulse.
//
// One event frame takes 1 + ROWS * (1 + COLS) + 1 cycles of Readout.
// Interface: cmp_out in; force_off, row, load, shift, dff_rst, readout,
// out_valid (Sensor_out carries a pixel) out.
//
// The signal set and their order follow the described timing diagram; the
// exact cycle counts (one Load cycle, one DFF_RST cycle) are this design's
// choice.
module cl_ctrl #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmp_out,
  input  logic                      ext_rst,
  output logic                      force_off,
  output logic [$clog2(ROWS)-1:0]   row,
  output logic                      load,
  output logic                      shift,
  output logic                      dff_rst,
  output logic                      readout,
  output logic                      out_valid
);
  import spad_pkg::*;

  cl_state_e state_q;
  logic [$clog2(ROWS)-1:0] row_q;
  logic [$clog2(COLS)-1:0] col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CL_IDLE;
      row_q   <= '0;
      col_q   <= '0;
    end else begin
      unique case (state_q)
        CL_IDLE: if (cmp_out) begin
          state_q <= CL_LOAD;
          row_q   <= '0;
        end
        CL_LOAD: begin
          state_q <= CL_SHIFT;
          col_q   <= '0;
        end
        CL_SHIFT: begin
          if (col_q != ($clog2(COLS))'(COLS - 1)) col_q <= col_q + 1'b1;
          else if (row_q != ($clog2(ROWS))'(ROWS - 1)) begin
            row_q   <= row_q + 1'b1;
            state_q <= CL_LOAD;
          end else state_q <= CL_RST;
        end
        CL_RST: state_q <= CL_IDLE;
      endcase
    end
  end

  assign force_off = (state_q != CL_IDLE);
  assign readout   = (state_q == CL_LOAD) || (state_q == CL_SHIFT);
  assign load      = (state_q == CL_LOAD);
  assign shift     = (state_q == CL_SHIFT);
  assign out_valid = (state_q == CL_SHIFT);
  assign dff_rst   = (state_q == CL_RST) || (ext_rst && state_q == CL_IDLE);
  assign row       = row_q;

endmodule
