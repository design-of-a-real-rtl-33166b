// vme_addr_decoder: first decoding level of the VME slave interface.
//
// A programmable logic device in the original. It compares address bits A[15:9]
// with the three bank codes of the board (read-back drivers, write latches,
// crossbar chips), checks the address modifier, that LWORD* is negated (16-bit or
// 8-bit transfers only) and that the cycle is not an interrupt acknowledge, and
// asserts one of WENABLE, MENABLE, RENABLE while AS* is low. BSEL (the board is
// addressed) is their OR and starts the handshake.
//
// Combinational. The bank codes follow the board address map. The accepted address
// modifiers are this design's choice: the two short (A16) codes 0x29 and 0x2D, since
// only A[15:6] are decoded. Write-only banks are selected for reads too; the data
// read back is then undefined, as on the board.
module vme_addr_decoder
  import imgboard_pkg::*;
#(
  parameter logic [5:0] AM_USER       = 6'h29,
  parameter logic [5:0] AM_SUPERVISOR = 6'h2D
) (
  input  logic [15:9] a,
  input  logic [5:0]  am,
  input  logic        lword_l,
  input  logic        iack_l,
  input  logic        as_l,
  output logic        wenable,
  output logic        menable,
  output logic        renable,
  output logic        bsel
);

  logic cycle_ok;

  always_comb begin
    cycle_ok = !as_l && iack_l && lword_l && (am == AM_USER || am == AM_SUPERVISOR);
    wenable  = cycle_ok && (a == BANK_WREG);
    menable  = cycle_ok && (a == BANK_MUX);
    renable  = cycle_ok && (a == BANK_RDRV);
    bsel     = wenable || menable || renable;
  end

endmodule
