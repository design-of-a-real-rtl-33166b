// tb_vme_handshake: drives VME write and read cycles into the handshake logic.
//
// A small bus-master model asserts AS*, WRITE* and DS*, waits for DTACK* and
// releases the strobes. Checked: DTACK* comes only after the strobe has been held
// for WAIT_CYCLES clocks (latch and driver banks) or after the crossbar
// acknowledge (crossbar bank, modelled as a chip that answers some clocks after its
// select), the transceiver is open in the right direction during the cycle, and
// DTACK*, strobe and transceiver are released after DS* goes high.
module tb_vme_handshake;
  localparam int WAIT_CYCLES = 3;
  logic clk = 0, rst_n = 0;
  logic as_l = 1, write_l = 1, bsel = 0, menable = 0, ack_l;
  logic [1:0] ds_l = 2'b11;
  logic strobe, dtack_l, xcvr_en, xcvr_dir;
  int checks = 0, failures = 0;
  int strobe_cycles = 0, ack_delay = 4;
  logic [7:0] ack_pipe = '1;

  vme_handshake #(.WAIT_CYCLES(WAIT_CYCLES)) dut (.clk, .rst_n, .as_l, .ds_l, .write_l, .bsel,
    .menable, .ack_l, .strobe, .dtack_l, .xcvr_en, .xcvr_dir);

  always #31 clk = ~clk;

  // Crossbar acknowledge model: follows the strobe (chip select) ack_delay clocks late.
  always_ff @(posedge clk) ack_pipe <= {ack_pipe[6:0], !(strobe && menable)};
  assign ack_l = ack_pipe[ack_delay];

  always_ff @(posedge clk) strobe_cycles <= strobe ? strobe_cycles + 1 : 0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(bit wr, bit mux, bit selected);
    int t = 0;
    bsel = selected; menable = mux && selected;
    write_l = !wr;
    #7 as_l = 0;
    #20 ds_l = 2'b10;
    while (dtack_l && t < 60) begin
      @(posedge clk); #1; t++;
      if (xcvr_en) check(xcvr_dir == !wr, "transceiver direction");
    end
    if (!selected) begin
      check(dtack_l && !strobe && !xcvr_en, "unaddressed board stays silent");
    end else begin
      check(!dtack_l, "DTACK* given");
      check(strobe, "strobe held with DTACK*");
      check(xcvr_en, "transceiver open with DTACK*");
      if (mux) check(!ack_l, "crossbar acknowledged before DTACK*");
      else     check(strobe_cycles >= WAIT_CYCLES, "strobe long enough before DTACK*");
    end
    #15 ds_l = 2'b11; as_l = 1;
    repeat (4) @(posedge clk);
    #1;
    check(dtack_l && !strobe && !xcvr_en, "released after DS*");
    bsel = 0; menable = 0;
    repeat (ack_delay + 4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      ack_delay = 1 + (i % 6);
      cycle($urandom_range(0, 1), i % 3 == 0, i % 7 != 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
