// vme_handshake: data-transfer handshake of the VME slave interface.
//
// A programmable logic device in the original: it watches the data strobes DS*,
// WRITE* and the board-select from the address decoder, strobes the vector decoder,
// steers the data transceiver and answers with DTACK*. The state machine here is
// this design's own; the document gives the job, not the logic.
//
//   IDLE   wait for AS* and a DS* asserted while the board is addressed
//   SETUP  open the data transceiver (direction from WRITE*) so write data reaches
//          the board bus before any chip select falls; wait until the crossbar
//          acknowledge of an earlier cycle has returned high
//   STROBE assert the strobe (one chip select, latch clock or read enable).
//          Crossbar bank: wait for ACK_L from the chip. Other banks: hold for
//          WAIT_CYCLES clocks, enough for 74LS374 setup or 74LS244 access.
//   ACK    keep the strobe, assert DTACK*, wait for the master to negate DS*
//
// All bus inputs are asynchronous and pass through two-flop synchronisers on clk,
// the VME SYSCLK (16 MHz) of this design. rst_n is SYSRESET*, active low.
module vme_handshake #(
  parameter int unsigned WAIT_CYCLES = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       as_l,
  input  logic [1:0] ds_l,
  input  logic       write_l,
  input  logic       bsel,
  input  logic       menable,
  input  logic       ack_l,
  output logic       strobe,
  output logic       dtack_l,
  output logic       xcvr_en,
  output logic       xcvr_dir   // 1: board drives the VME data bus (read)
);

  typedef enum logic [1:0] {IDLE, SETUP, STROBE, ACK} state_e;

  state_e     state;
  logic [1:0] as_s, ds_s, ack_s;
  logic       go, ds_neg, ack_low, ack_high;
  localparam int unsigned CNT_W = $clog2(WAIT_CYCLES + 1);
  logic [CNT_W-1:0] cnt;

  // Two-flop synchronisers; the second stage is the one used.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s  <= 2'b11;
      ds_s  <= 2'b11;
      ack_s <= 2'b11;
    end else begin
      as_s  <= {as_s[0], as_l};
      ds_s  <= {ds_s[0], &ds_l};
      ack_s <= {ack_s[0], ack_l};
    end
  end

  assign go       = !as_s[1] && !ds_s[1] && bsel;
  assign ds_neg   = ds_s[1];
  assign ack_low  = !ack_s[1];
  assign ack_high = ack_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      xcvr_dir <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (go) begin
          state    <= SETUP;
          xcvr_dir <= write_l;
          cnt      <= '0;
        end
        SETUP: if (ack_high) state <= STROBE;
        STROBE: begin
          cnt <= cnt + 1'b1;
          if (menable ? ack_low : (cnt == CNT_W'(WAIT_CYCLES - 1))) state <= ACK;
        end
        ACK: if (ds_neg) state <= IDLE;
      endcase
    end
  end

  assign xcvr_en = (state != IDLE);
  assign strobe  = (state == STROBE) || (state == ACK);
  assign dtack_l = !(state == ACK);

  // DTACK* may only be given while the strobe holds the addressed chip selected.
  a_dtack_strobe: assert property (@(posedge clk) disable iff (!rst_n) !dtack_l |-> strobe);

endmodule
