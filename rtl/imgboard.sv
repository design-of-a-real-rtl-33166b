// imgboard: the flexible real-time image processing board.
//
// Five video crossbar chips let every processing unit of the board be put in any
// order between the A/D-D/A board and the frame buffers:
//   MUXFB1 (mux3ch)  A/D video in; output feeds the frame buffers
//   MUXFB2 (mux3ch)  frame buffer video in; output feeds the D/A
//   MUXVP1 (mux3ch)  input INT1; output feeds the off-board expansion port
//   MUXVP2 (mux3ch)  expansion port video in; output is INT2
//   MUXPI  (mux1ch)  routes one 8-bit plane between the image processing chip set
//                    (P_IN/P_OUT) and the histogram chip set (FB_IN/FB_OUT)
// Internal busses, as on the board:
//   INT1  24-bit wired-OR of the tri-state outputs of MUXFB1 and MUXFB2, so the
//         processors see either the live A/D image or the frame buffer contents
//   INT2  output of MUXVP2, the second input of MUXFB1 and MUXFB2, so the
//         processed image can be stored or displayed
//   GPIP  8-bit wired-OR of the green tri-state outputs of MUXVP1 and MUXVP2,
//         the AD_OUT input of MUXPI
//   DA_ING  DA_IN output of MUXPI, the green second input of MUXVP1 and MUXVP2
// The red and blue second inputs of MUXVP1/MUXVP2 are not connected on the board
// and are tied to 0 here; a wired-OR bus with no driver enabled reads 0.
//
// The host configures everything through the VME slave interface: crossbar control
// words (bank at 0xFE00), seven control latches of the image processing chips
// (0xFC00) and four read-back drivers (0xFA00). The image processing and histogram
// chip sets are outside the board logic: their video and control pins are ports.
// The histogram module's 8-bit input and output video registers are here, loaded
// on PHI1 and PHI2 like those of the image processing module.
//
// Clocks: the crossbar chips run from DOTCLOCK_L (10 MHz pixel clock, one pixel per
// clock); clockgen derives the non-overlapping PHI1/PHI2 for the processing
// modules (its cross-coupled NOR pair is the one intended combinational loop of
// the board); the VME handshake runs on sysclk. sysreset_l resets only the handshake:
// the crossbar and latch registers power up random until the host writes them.
module imgboard
  import imgboard_pkg::*;
(
  input  logic                    dotclock_l,
  input  logic                    sysclk,
  input  logic                    sysreset_l,
  // A/D-D/A board and frame buffers
  input  rgb_t                    ad_out,    // from the A/D
  output rgb_t                    da_in,     // to the D/A
  output rgb_t                    fb_in,     // to the frame buffers
  input  rgb_t                    fb_out,    // from the frame buffers
  // off-board expansion video port
  output rgb_t                    vp_in,     // to the external processor
  input  rgb_t                    vp_out,    // from the external processor
  // VME bus
  input  logic [15:6]             vme_a,
  input  logic [5:0]              vme_am,
  input  logic                    vme_lword_l,
  input  logic                    vme_iack_l,
  input  logic                    vme_as_l,
  input  logic [1:0]              vme_ds_l,
  input  logic                    vme_write_l,
  input  logic [11:0]             vme_d_in,
  output logic [11:0]             vme_d_out,
  output logic                    vme_d_oe,
  output logic                    vme_dtack_l,
  // image processing/recognition chip set
  output logic                    phi1,
  output logic                    phi2,
  output pixel_t                  pip_di,
  input  pixel_t                  pip_do,
  output logic [N_WREG-1:0][7:0]  pip_ctrl,
  input  logic [N_RDRV-1:0][7:0]  pip_rd,
  // histogram/equalization chip set
  output pixel_t                  hist_di,
  input  pixel_t                  hist_do
);

  // VME interface
  logic [11:0]        bd;
  logic [N_MUX-1:0]   msel_l, mux_ack_l;
  logic [N_WREG-1:0]  wsel;
  logic [N_RDRV-1:0]  rsel_l;
  logic [7:0]         hdata;
  logic               hdata_oe;

  vme_interface u_vme (
    .clk(sysclk), .rst_n(sysreset_l),
    .a(vme_a), .am(vme_am), .lword_l(vme_lword_l), .iack_l(vme_iack_l),
    .as_l(vme_as_l), .ds_l(vme_ds_l), .write_l(vme_write_l),
    .d_in(vme_d_in), .d_out(vme_d_out), .d_oe(vme_d_oe), .dtack_l(vme_dtack_l),
    .bd, .msel_l, .wsel, .rsel_l, .mux_ack_l, .rdata(hdata_oe ? hdata : 8'h00)
  );

  // Two-phase clocks for the processing modules
  clockgen u_clk (.dotclock_l, .phase1(phi1), .phase2(phi2));

  // Crossbar chips
  rgb_t       int1, int2;
  rgb_t       fb1_t, fb2_t, vp1_t, vp2_t;
  logic [2:0] fb1_oe, fb2_oe, vp1_oe, vp2_oe;
  pixel_t     gpip, da_ing;
  rgb_t       vp_x3sdii;

  assign vp_x3sdii = '{r: 8'h00, g: da_ing, b: 8'h00};

  function automatic rgb_t wired_or(rgb_t a, logic [2:0] a_oe, rgb_t b, logic [2:0] b_oe);
    rgb_t v;
    v.r = (a_oe[2] ? a.r : 8'h00) | (b_oe[2] ? b.r : 8'h00);
    v.g = (a_oe[1] ? a.g : 8'h00) | (b_oe[1] ? b.g : 8'h00);
    v.b = (a_oe[0] ? a.b : 8'h00) | (b_oe[0] ? b.b : 8'h00);
    return v;
  endfunction

  assign int1 = wired_or(fb1_t, fb1_oe, fb2_t, fb2_oe);
  assign gpip = (vp1_oe[1] ? vp1_t.g : 8'h00) | (vp2_oe[1] ? vp2_t.g : 8'h00);

  mux3ch u_muxfb1 (.bdotclock(dotclock_l), .cs_l(msel_l[CHIP_MUXFB1]), .mb(bd),
    .ack_l(mux_ack_l[CHIP_MUXFB1]), .x1sdi(ad_out), .x3sdii(int2), .x2sdi(fb_in),
    .x3sdi(fb1_t), .x3sdi_oe(fb1_oe));

  mux3ch u_muxfb2 (.bdotclock(dotclock_l), .cs_l(msel_l[CHIP_MUXFB2]), .mb(bd),
    .ack_l(mux_ack_l[CHIP_MUXFB2]), .x1sdi(fb_out), .x3sdii(int2), .x2sdi(da_in),
    .x3sdi(fb2_t), .x3sdi_oe(fb2_oe));

  mux3ch u_muxvp1 (.bdotclock(dotclock_l), .cs_l(msel_l[CHIP_MUXVP1]), .mb(bd),
    .ack_l(mux_ack_l[CHIP_MUXVP1]), .x1sdi(int1), .x3sdii(vp_x3sdii), .x2sdi(vp_in),
    .x3sdi(vp1_t), .x3sdi_oe(vp1_oe));

  mux3ch u_muxvp2 (.bdotclock(dotclock_l), .cs_l(msel_l[CHIP_MUXVP2]), .mb(bd),
    .ack_l(mux_ack_l[CHIP_MUXVP2]), .x1sdi(vp_out), .x3sdii(vp_x3sdii), .x2sdi(int2),
    .x3sdi(vp2_t), .x3sdi_oe(vp2_oe));

  // Image processing module and histogram module video registers
  pixel_t pip_in, pip_out, hist_in, hist_out;

  mux1ch u_muxpi (.phase1(dotclock_l), .phase2(dotclock_l), .cs_l(msel_l[CHIP_MUXPI]),
    .sel1(bd[0]), .sel2(bd[1]), .sel3(bd[2]), .ack_l(mux_ack_l[CHIP_MUXPI]),
    .ad_out(gpip), .p_out(pip_out), .fb_out(hist_out),
    .fb_in(hist_in), .p_in(pip_in), .da_in(da_ing));

  pip_module u_pip (.phi1, .phi2, .video_in(pip_in), .video_out(pip_out),
    .chip_di(pip_di), .chip_do(pip_do), .wsel, .bdata(bd[7:0]), .ctrl(pip_ctrl),
    .rsel_l, .rd(pip_rd), .hdata, .hdata_oe);

  always_ff @(posedge phi1) hist_di  <= hist_in;
  always_ff @(posedge phi2) hist_out <= hist_do;

endmodule
