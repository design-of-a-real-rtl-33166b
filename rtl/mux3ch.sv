// mux3ch: three-channel (24-bit RGB) video crossbar ASIC.
//
// Each colour plane of the X1SDI input bus is caught in a master register. The
// master register output drives the plane's tri-state output X3SDI (enabled per
// plane by a control bit, so several chips can share one wired-OR bus) and the first
// mux level, which picks for each plane either the master register or the
// unregistered X3SDII input. The two following mux levels let each output plane of
// X2SDI take any of the three first-level results: level 2 chooses red or green,
// level 3 that result or blue. So any of the six input busses can reach any output
// plane, and one plane can be broadcast to all three. The selected data is caught by
// the slave output register.
//
// Timing: the document builds the pipeline from level-sensitive master and slave
// latches on opposite phases of DOTCLOCK_L. Here they are edge-triggered: the
// master register loads on the falling edge of bdotclock (end of its high phase),
// the slave register on the rising edge. X1SDI -> X2SDI therefore takes half a
// clock after capture, one pixel per clock; X3SDII -> X2SDI is caught at the next
// rising edge. X3SDI follows the master register.
//
// Control: 12 bits on D[11:0] are loaded on the falling edge of CS_L, with no reset,
// as in the chip (its registers power up random). The bit layout (mux3_ctrl_t) is
// this design's choice. ACK_L (a pin of the chip whose function is not described)
// goes low at the first rising bdotclock edge that sees CS_L low and high again at
// the first that sees it high; the VME handshake uses it to finish a write.
module mux3ch
  import imgboard_pkg::*;
(
  input  logic       bdotclock,  // buffered DOTCLOCK_L
  input  logic       cs_l,       // chip select, control word loads on its falling edge
  input  logic [11:0] mb,        // control data, D[11:0]
  output logic       ack_l,
  input  rgb_t       x1sdi,      // R1SDI, G1SDI, B1SDI
  input  rgb_t       x3sdii,     // R3SDII, G3SDII, B3SDII
  output rgb_t       x2sdi,      // R2SDI, G2SDI, B2SDI (registered)
  output rgb_t       x3sdi,      // R3SDI, G3SDI, B3SDI (tri-state data)
  output logic [2:0] x3sdi_oe    // tri-state enables, {R,G,B}
);

  mux3_ctrl_t ctrl;
  rgb_t       master_q;
  rgb_t       lvl1;
  rgb_t       lvl3;

  always_ff @(negedge cs_l)
    ctrl <= mux3_ctrl_t'(mb);

  always_ff @(posedge bdotclock)
    ack_l <= cs_l;

  always_ff @(negedge bdotclock)
    master_q <= x1sdi;

  // Level 1: per plane, registered X1SDI or X3SDII.
  always_comb begin
    lvl1.r = ctrl.lane_sel[0] ? x3sdii.r : master_q.r;
    lvl1.g = ctrl.lane_sel[1] ? x3sdii.g : master_q.g;
    lvl1.b = ctrl.lane_sel[2] ? x3sdii.b : master_q.b;
  end

  function automatic pixel_t pick(plane_src_e s, rgb_t v);
    pixel_t l2;
    l2 = s[0] ? v.g : v.r;   // level 2
    return s[1] ? v.b : l2;  // level 3
  endfunction

  always_comb begin
    lvl3.r = pick(ctrl.r_src, lvl1);
    lvl3.g = pick(ctrl.g_src, lvl1);
    lvl3.b = pick(ctrl.b_src, lvl1);
  end

  always_ff @(posedge bdotclock)
    x2sdi <= lvl3;

  assign x3sdi    = master_q;
  assign x3sdi_oe = {ctrl.oe[0], ctrl.oe[1], ctrl.oe[2]};

endmodule
