// imager_cl32: 32x32 SPAD imager with a real-time current-logic event
// discriminator and zero dead time.
//
// The SPADs are free-running; after each breakdown the pixel's variable
// hold-off quenching circuit (vhaqc) keeps the SPAD off for a set time, and
// during that time the pixel's unit current cell conducts. All cells share one
// load resistor (ucc_sum), so the node voltage V_SPAD drops in proportion to
// the number of SPADs that fired within the last hold-off time. A comparator
// (cl_comparator) checks V_SPAD against V_ref from a 6-bit DAC (cl_dac): when
// more pixels than the DAC code are in hold-off at once, CMP_out rises, every
// pixel's readout DFF (cl_readout_unit) stores its SPAD state, and the control
// block (cl_ctrl) forces all SPADs off and reads the stored frame out row by
// row (raster scan) through a 32-bit shift register on Sensor_out.
//
// Interface: spad_bd[r][c] SPAD breakdowns; holdoff (cycles, for the analog
// VBias) and thr (6-bit DAC input); ext_rst external reset of the pixel DFFs;
// sensor_out valid while out_valid, row gives the row being read (column 0
// first); readout, force_off, cmp_out as status.
//
// CMP_out_pre is the comparator's internal node and is not a pin; lint
// reports it as unused.
module imager_cl32 #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [7:0]                holdoff,
  input  logic [5:0]                thr,
  input  logic                      ext_rst,
  input  logic [ROWS-1:0][COLS-1:0] spad_bd,
  output logic                      sensor_out,
  output logic                      out_valid,
  output logic [$clog2(ROWS)-1:0]   row,
  output logic                      readout,
  output logic                      force_off,
  output logic                      cmp_out
);

  logic [ROWS-1:0][COLS-1:0] off, ro_q;
  logic load, shift, dff_rst, cmp_out_pre, capture;
  logic signed [31:0] v_spad, v_ref;  // analog node voltages, 0.1 mV units

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      vhaqc #(.HW(8)) u_aqc (
        .clk       (clk),
        .rst_n     (rst_n),
        .spad_bd   (spad_bd[r][c]),
        .force_off (force_off),
        .holdoff   (holdoff),
        .off       (off[r][c])
      );
      cl_readout_unit u_ro (
        .clk     (clk),
        .rst_n   (rst_n),
        .capture (capture),
        .dff_rst (dff_rst),
        .state   (off[r][c]),
        .q       (ro_q[r][c])
      );
    end
  end

  ucc_sum #(.NPIX(ROWS * COLS)) u_sum (
    .on     (off),
    .v_spad (v_spad)
  );

  cl_dac u_dac (
    .code  (thr),
    .v_ref (v_ref)
  );

  cl_comparator u_cmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .v_spad      (v_spad),
    .v_ref       (v_ref),
    .dff_rst     (dff_rst),
    .cmp_out_pre (cmp_out_pre),
    .cmp_out     (cmp_out),
    .capture     (capture)
  );

  cl_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmp_out   (cmp_out),
    .ext_rst   (ext_rst),
    .force_off (force_off),
    .row       (row),
    .load      (load),
    .shift     (shift),
    .dff_rst   (dff_rst),
    .readout   (readout),
    .out_valid (out_valid)
  );

  out_shift_reg #(.W(COLS)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .shift (shift),
    .d     (ro_q[row]),
    .sout  (sensor_out)
  );

endmodule
