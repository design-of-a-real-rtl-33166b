// mux1ch: one-channel (8-bit) video crossbar ASIC.
//
// Three 8-bit inputs (AD_OUT, P_OUT, FB_OUT) and three outputs (FB_IN, P_IN, DA_IN),
// each output fed by its own 2:1 mux, as in the document:
//   FB_IN = SEL1 ? AD_OUT : P_OUT     (slave-registered)
//   P_IN  = SEL2 ? FB_OUT : AD_OUT    (not re-registered)
//   DA_IN = SEL3 ? FB_OUT : P_OUT     (slave-registered)
// AD_OUT and FB_OUT pass through master registers first; P_OUT enters the muxes
// directly. Which select value picks which input is this design's choice.
//
// Timing: master registers load on the falling edge of PHASE1, slave registers on
// the rising edge of PHASE2 (on the board both pins share one clock net, so this is
// the same master/slave split as in mux3ch). Select bits SEL1..SEL3 come from D[2:0]
// and load on the falling edge of CS_L; there is no reset. ACK_L behaves as in
// mux3ch: it follows CS_L, sampled on the rising edge of PHASE2.
module mux1ch
  import imgboard_pkg::*;
(
  input  logic   phase1,
  input  logic   phase2,
  input  logic   cs_l,
  input  logic   sel1,
  input  logic   sel2,
  input  logic   sel3,
  output logic   ack_l,
  input  pixel_t ad_out,
  input  pixel_t p_out,
  input  pixel_t fb_out,
  output pixel_t fb_in,
  output pixel_t p_in,
  output pixel_t da_in
);

  logic [2:0] sel_q;
  pixel_t     ad_q, fb_q;

  always_ff @(negedge cs_l)
    sel_q <= {sel3, sel2, sel1};

  always_ff @(posedge phase2)
    ack_l <= cs_l;

  always_ff @(negedge phase1) begin
    ad_q <= ad_out;
    fb_q <= fb_out;
  end

  always_ff @(posedge phase2) begin
    fb_in <= sel_q[0] ? ad_q : p_out;
    da_in <= sel_q[2] ? fb_q : p_out;
  end

  assign p_in = sel_q[1] ? fb_q : ad_q;

endmodule
