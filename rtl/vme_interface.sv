// vme_interface: VME slave interface of the board.
//
// Connects the VME bus to the on-board chips that the host configures and reads:
// five crossbar chips and seven 74LS374 control latches (write banks) and four
// 74LS244 read-back drivers (read bank). Decoding is two-level as on the board:
// vme_addr_decoder picks the bank from A[15:9], AM and LWORD*, vme_vector_decoder
// picks the chip from A[8:6] while vme_handshake strobes it. The 74LS645 data
// transceiver is modelled as two one-way paths: write data D[11:0] reaches the board
// data bus BD only while the handshake has it open towards the board, and read data
// from the 74LS244 bus drives D[7:0] only during a read (d_oe). D[11:8] read as 0.
//
// Timing: one transfer per VME cycle; DTACK* follows a strobe of WAIT_CYCLES clk
// cycles (latch and driver banks) or the acknowledge of the crossbar chip.
// The bus is split into d_in/d_out/d_oe because the VME data lines are bidirectional.
module vme_interface
  import imgboard_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  // VME bus
  input  logic [15:6]        a,
  input  logic [5:0]         am,
  input  logic               lword_l,
  input  logic               iack_l,
  input  logic               as_l,
  input  logic [1:0]         ds_l,
  input  logic               write_l,
  input  logic [11:0]        d_in,
  output logic [11:0]        d_out,
  output logic               d_oe,
  output logic               dtack_l,
  // board side
  output logic [11:0]        bd,
  output logic [N_MUX-1:0]   msel_l,
  output logic [N_WREG-1:0]  wsel,
  output logic [N_RDRV-1:0]  rsel_l,
  input  logic [N_MUX-1:0]   mux_ack_l,
  input  logic [7:0]         rdata
);

  logic wenable, menable, renable, bsel;
  logic strobe, xcvr_en, xcvr_dir;

  vme_addr_decoder u_adec (
    .a(a[15:9]), .am, .lword_l, .iack_l, .as_l,
    .wenable, .menable, .renable, .bsel
  );

  vme_handshake #(.WAIT_CYCLES(WAIT_CYCLES)) u_hs (
    .clk, .rst_n, .as_l, .ds_l, .write_l, .bsel, .menable,
    .ack_l(&mux_ack_l), .strobe, .dtack_l, .xcvr_en, .xcvr_dir
  );

  vme_vector_decoder u_vdec (
    .a(a[8:6]), .wenable, .menable, .renable, .strobe,
    .msel_l, .wsel, .rsel_l
  );

  assign bd    = (xcvr_en && !xcvr_dir) ? d_in : '0;
  assign d_oe  = xcvr_en && xcvr_dir;
  assign d_out = d_oe ? {4'b0, rdata} : '0;

endmodule
