// tb_vme_interface: VME cycles against the complete slave interface.
//
// A bus-master model writes every control latch and every crossbar chip at its
// address from the board address map, and reads every read-back driver. Simple
// chip models stand on the board side: latches that load BD[7:0] on the rising edge
// of their WSEL line, crossbar control registers that load BD[11:0] on the falling
// edge of their select and acknowledge two clocks later, and drivers that put a
// known byte on the read bus while their RSEL_L is low. Checked: each write lands in
// exactly the addressed chip, each read returns the addressed driver's byte, and
// cycles to other addresses or address modifiers are ignored.
module tb_vme_interface;
  import imgboard_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:6] a = '0;
  logic [5:0] am = 6'h29;
  logic lword_l = 1, iack_l = 1, as_l = 1, write_l = 1;
  logic [1:0] ds_l = 2'b11;
  logic [11:0] d_in = '0, d_out, bd;
  logic d_oe, dtack_l;
  logic [4:0] msel_l, mux_ack_l;
  logic [6:0] wsel;
  logic [3:0] rsel_l;
  logic [7:0] rdata;
  logic [7:0] lat [7];
  logic [11:0] mreg [5];
  logic [7:0] rd_val [4] = '{8'h3C, 8'hA5, 8'h5A, 8'hC3};
  int checks = 0, failures = 0;

  vme_interface dut (.clk, .rst_n, .a, .am, .lword_l, .iack_l, .as_l, .ds_l, .write_l,
    .d_in, .d_out, .d_oe, .dtack_l, .bd, .msel_l, .wsel, .rsel_l, .mux_ack_l, .rdata);

  always #31 clk = ~clk;

  for (genvar i = 0; i < 7; i++) begin : g_lat
    always @(posedge wsel[i]) lat[i] <= bd[7:0];
  end
  for (genvar i = 0; i < 5; i++) begin : g_mux
    logic [1:0] p = 2'b11;
    always @(negedge msel_l[i]) mreg[i] <= bd;
    always_ff @(posedge clk) p <= {p[0], msel_l[i]};
    assign mux_ack_l[i] = p[1];
  end
  always_comb begin
    rdata = '0;
    for (int i = 0; i < 4; i++) if (!rsel_l[i]) rdata |= rd_val[i];
  end

  initial begin
    #2000000;
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

  task automatic vme(input logic [15:0] addr, input bit wr, input logic [11:0] wdata,
                     output logic [11:0] rdat, output bit acked);
    int t = 0;
    a = addr[15:6]; write_l = !wr; d_in = wr ? wdata : 12'h000;
    #7 as_l = 0;
    #20 ds_l = 2'b00;
    while (dtack_l && t < 40) begin @(posedge clk); t++; end
    #2;
    acked = !dtack_l;
    rdat = d_out;
    if (acked && !wr) check(d_oe, "data driven during read");
    #15 ds_l = 2'b11; as_l = 1;
    while (!dtack_l) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    logic [15:0] waddr [7] = '{16'hFC00, 16'hFC40, 16'hFC80, 16'hFCC0, 16'hFD00, 16'hFD40, 16'hFD80};
    logic [15:0] maddr [5] = '{16'hFE00, 16'hFE40, 16'hFE80, 16'hFEC0, 16'hFF00};
    logic [15:0] raddr [4] = '{16'hFA00, 16'hFA40, 16'hFA80, 16'hFAC0};
    logic [11:0] r;
    bit ok;
    for (int i = 0; i < 7; i++) lat[i] = 8'h00;
    for (int i = 0; i < 5; i++) mreg[i] = 12'h000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 7; i++) begin
        logic [7:0] v;
        logic [7:0] prev [7];
        v = 8'($urandom);
        prev = lat;
        vme(waddr[i], 1, {4'h0, v}, r, ok);
        check(ok, "latch write acknowledged");
        for (int j = 0; j < 7; j++) check(lat[j] == (j == i ? v : prev[j]), "latch contents");
      end
      for (int i = 0; i < 5; i++) begin
        logic [11:0] v;
        logic [11:0] prev [5];
        v = 12'($urandom);
        prev = mreg;
        vme(maddr[i], 1, v, r, ok);
        check(ok, "crossbar write acknowledged");
        for (int j = 0; j < 5; j++) check(mreg[j] == (j == i ? v : prev[j]), "crossbar control");
      end
      for (int i = 0; i < 4; i++) begin
        vme(raddr[i], 0, 12'h0, r, ok);
        check(ok, "read acknowledged");
        check(r == {4'h0, rd_val[i]}, "read-back byte");
      end
    end
    // Wrong address modifier and an address outside the map: no response.
    begin
      logic [7:0] prev [7];
      prev = lat;
      am = 6'h3D;
      vme(16'hFC00, 1, 12'h0FF, r, ok);
      check(!ok, "wrong AM ignored");
      am = 6'h29;
      vme(16'hF800, 1, 12'h0FF, r, ok);
      check(!ok, "foreign address ignored");
      for (int j = 0; j < 7; j++) check(lat[j] == prev[j], "no stray write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
