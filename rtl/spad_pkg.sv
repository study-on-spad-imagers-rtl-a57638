// spad_pkg: types and helper functions shared by the SPAD imager designs.
//
// The breakdown-pixel-extraction (BPE) imagers address a row of N pixels with
// the 1-based column number, so address 0 means "no breakdown pixel"; a row of
// 2^k-1 pixels therefore needs k address bits (15 pixels: 4 bits, 31: 5 bits).
// The control-block state encodings of the imagers are also kept here.
package spad_pkg;

  // Address width of a BPE row of n pixels (1-based column addresses, 0 = none).
  function automatic int unsigned addr_bits(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Phase of one frame of the gated (time-window) imagers.
  typedef enum logic [1:0] {
    PH_CHARGE  = 2'd0,  // SPADs recharged to the excess bias, WIN high
    PH_WINDOW  = 2'd1,  // T_win: SPADs sensitive, WIN high
    PH_WRITE   = 2'd2,  // frame written into the 1-b pixel memory, WIN high
    PH_HOLDOFF = 2'd3   // WIN low: every SPAD held off for one cycle
  } frame_phase_e;

  // BPE readout sequencer of the background-readout imager.
  typedef enum logic [1:0] {
    RD_IDLE   = 2'd0,
    RD_SEARCH = 2'd1,   // first search cycle after Search rises
    RD_NEXT   = 2'd2,   // global Next pulse
    RD_BITS   = 2'd3    // one address bit per cycle, MSB first
  } bpe_rd_state_e;

  // Sequencer of the event-discriminator imager.
  typedef enum logic [2:0] {
    ED_IDLE     = 3'd0,
    ED_CSEARCH  = 3'd1,  // counting: first search cycle
    ED_COUNT    = 3'd2,  // counting: one Next per cycle, CNT += 1
    ED_SUSPEND  = 3'd3,  // CNT > N_th: Search low for one cycle, Out_start
    ED_RSEARCH  = 3'd4,  // readout: first search cycle
    ED_RNEXT    = 3'd5,  // readout: Next pulse
    ED_LOAD     = 3'd6,  // Out_write: row bits into the shift register
    ED_SHIFT    = 3'd7   // Out_state: shift register to Address_Output
  } ed_state_e;

  // Raster readout sequencer of the current-logic imager.
  typedef enum logic [1:0] {
    CL_IDLE  = 2'd0,
    CL_LOAD  = 2'd1,    // Load: selected row into the shift register
    CL_SHIFT = 2'd2,    // Sensor_out: one pixel per cycle
    CL_RST   = 2'd3     // DFF_RST pulse, Force_off released
  } cl_state_e;

endpackage
