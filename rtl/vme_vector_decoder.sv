// vme_vector_decoder: second decoding level of the VME slave interface.
//
// Stands for the 74LS138 one-of-eight decoders of the board. While the handshake
// strobe is asserted, address bits A[8:6] pick one chip inside the bank enabled by
// the first decoding level:
//   MSEL_L[4:0]  crossbar chip selects (MUXFB1, MUXFB2, MUXVP1, MUXVP2, MUXPI), low
//   WSEL[6:0]    clocks of the seven 74LS374 control latches, high
//   RSEL_L[3:0]  output enables of the four 74LS244 read-back drivers, low
// A[8:6] codes without a chip select nothing. Combinational.
// Polarities follow the signal names of the board; everything else is the plain
// function of a 3-to-8 decoder gated by bank enable and strobe.
module vme_vector_decoder
  import imgboard_pkg::*;
(
  input  logic [8:6]         a,
  input  logic               wenable,
  input  logic               menable,
  input  logic               renable,
  input  logic               strobe,
  output logic [N_MUX-1:0]   msel_l,
  output logic [N_WREG-1:0]  wsel,
  output logic [N_RDRV-1:0]  rsel_l
);

  logic [7:0] onehot;

  always_comb begin
    onehot = 8'b1 << a;
    msel_l = ~(onehot[N_MUX-1:0]  & {N_MUX{strobe && menable}});
    wsel   =   onehot[N_WREG-1:0] & {N_WREG{strobe && wenable}};
    rsel_l = ~(onehot[N_RDRV-1:0] & {N_RDRV{strobe && renable}});
  end

endmodule
