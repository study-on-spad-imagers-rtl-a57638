// spad_imagers_top: the four SPAD imagers side by side.
//
// The designs are independent chips sharing only clock and reset here:
//   * imager_ed31  - 31x31 BPE imager with Max(N_BD,i) event discriminator
//                    and serial address output (the most complete design),
//   * imager_bg31  - 31x31 BPE imager with background readout and 31
//                    row-parallel address outputs,
//   * imager_bpe15 - 15x15 BPE proof-of-concept imager, externally controlled,
//   * imager_cl32  - 32x32 free-running imager with current-logic real-time
//                    event discriminator and raster readout.
// The SPAD devices themselves are analog and are not modelled: each imager's
// breakdown inputs (one bit per pixel and cycle) are brought out as ports.
// Every port is named after its imager (ed_, bg_, p15_, cl_).
module spad_imagers_top (
  input  logic              clk,
  input  logic              rst_n,
  // 31x31 event-discriminator imager
  input  logic [4:0]        ed_win_width,
  input  logic [4:0]        ed_nth,
  input  logic [30:0][30:0] ed_spad_bd,
  output logic              ed_address_output,
  output logic              ed_out_state,
  output logic              ed_out_start,
  output logic              ed_sch_fin,
  output logic [5:0]        ed_cnt,
  output logic              ed_dark_frame,
  output logic              ed_frame_drop,
  output logic              ed_win,
  output logic              ed_busy,
  // 31x31 background-readout imager
  input  logic [4:0]        bg_win_width,
  input  logic [30:0][30:0] bg_spad_bd,
  output logic [30:0]       bg_addr_out,
  output logic              bg_addr_valid,
  output logic [2:0]        bg_addr_bit,
  output logic              bg_sch_fin,
  output logic              bg_frame_start,
  output logic              bg_frame_drop,
  output logic              bg_win,
  output logic              bg_busy,
  // 15x15 BPE imager (external control)
  input  logic              p15_win,
  input  logic              p15_rst,
  input  logic              p15_search,
  input  logic              p15_next,
  input  logic [3:0]        p15_wl,
  input  logic [14:0][14:0] p15_spad_bd,
  output logic [14:0]       p15_addr_out,
  output logic              p15_sch_fin,
  // 32x32 current-logic imager
  input  logic [7:0]        cl_holdoff,
  input  logic [5:0]        cl_thr,
  input  logic              cl_ext_rst,
  input  logic [31:0][31:0] cl_spad_bd,
  output logic              cl_sensor_out,
  output logic              cl_out_valid,
  output logic [4:0]        cl_row,
  output logic              cl_readout,
  output logic              cl_force_off,
  output logic              cl_cmp_out
);

  imager_ed31 u_ed31 (
    .clk            (clk),
    .rst_n          (rst_n),
    .win_width      (ed_win_width),
    .nth            (ed_nth),
    .spad_bd        (ed_spad_bd),
    .address_output (ed_address_output),
    .out_state      (ed_out_state),
    .out_start      (ed_out_start),
    .sch_fin        (ed_sch_fin),
    .cnt            (ed_cnt),
    .dark_frame     (ed_dark_frame),
    .frame_drop     (ed_frame_drop),
    .win            (ed_win),
    .busy           (ed_busy)
  );

  imager_bg31 u_bg31 (
    .clk         (clk),
    .rst_n       (rst_n),
    .win_width   (bg_win_width),
    .spad_bd     (bg_spad_bd),
    .addr_out    (bg_addr_out),
    .addr_valid  (bg_addr_valid),
    .addr_bit    (bg_addr_bit),
    .sch_fin     (bg_sch_fin),
    .frame_start (bg_frame_start),
    .frame_drop  (bg_frame_drop),
    .win         (bg_win),
    .busy        (bg_busy)
  );

  imager_bpe15 u_bpe15 (
    .clk      (clk),
    .rst_n    (rst_n),
    .win      (p15_win),
    .rst      (p15_rst),
    .search   (p15_search),
    .next     (p15_next),
    .wl       (p15_wl),
    .spad_bd  (p15_spad_bd),
    .addr_out (p15_addr_out),
    .sch_fin  (p15_sch_fin)
  );

  imager_cl32 u_cl32 (
    .clk        (clk),
    .rst_n      (rst_n),
    .holdoff    (cl_holdoff),
    .thr        (cl_thr),
    .ext_rst    (cl_ext_rst),
    .spad_bd    (cl_spad_bd),
    .sensor_out (cl_sensor_out),
    .out_valid  (cl_out_valid),
    .row        (cl_row),
    .readout    (cl_readout),
    .force_off  (cl_force_off),
    .cmp_out    (cl_cmp_out)
  );

endmodule
