// tb_mux3ch: self-checking testbench of the three-channel crossbar.
//
// Writes control words (tri-state enables, first-level selects, output sources) on
// the falling edge of CS_L, then streams a new random pixel on X1SDI and X3SDII every
// clock. The expected X2SDI is computed from the routing rules (any of the six input
// planes to any output plane) for the pixel given one clock earlier, which checks
// both the one-pixel-per-clock rate and the pipeline latency. X3SDI and its enables
// are checked after every master load, ACK_L after every control write.
module tb_mux3ch;
  import imgboard_pkg::*;

  logic       clk = 1'b1;
  logic       cs_l = 1'b1;
  logic [11:0] mb = '0;
  logic       ack_l;
  rgb_t       x1sdi, x3sdii, x2sdi, x3sdi;
  logic [2:0] x3sdi_oe;
  int checks = 0, failures = 0;

  mux3ch dut (.bdotclock(clk), .cs_l, .mb, .ack_l, .x1sdi, .x3sdii, .x2sdi, .x3sdi, .x3sdi_oe);

  always #50 clk = ~clk;   // 10 MHz, 100 time units per pixel

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

  function automatic pixel_t plane(rgb_t v, int p);
    return p == 0 ? v.r : (p == 1 ? v.g : v.b);
  endfunction

  // Expected output plane: src 0=R,1=G,2/3=B, each from X3SDII or X1SDI per lane_sel.
  function automatic rgb_t expect_out(logic [11:0] w, rgb_t a, rgb_t c);
    rgb_t e;
    pixel_t o[3];
    for (int p = 0; p < 3; p++) begin
      int src = (w >> (6 + 2 * p)) & 3;
      int lane = (src >= 2) ? 2 : src;
      o[p] = w[3 + lane] ? plane(c, lane) : plane(a, lane);
    end
    e.r = o[0]; e.g = o[1]; e.b = o[2];
    return e;
  endfunction

  task automatic write_ctrl(logic [11:0] w);
    @(posedge clk); #10;
    mb = w;
    #10 cs_l = 1'b0;
    @(posedge clk); #1;
    check(ack_l == 1'b0, "ACK_L low while selected");
    #10 cs_l = 1'b1;
    @(posedge clk); #1;
    check(ack_l == 1'b1, "ACK_L released");
  endtask

  task automatic stream(logic [11:0] w, int n);
    rgb_t a_prev, c_prev;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      if (k > 0) check(x2sdi == expect_out(w, a_prev, c_prev), "X2SDI routing");
      #4;
      a_prev = rgb_t'({$urandom, $urandom});
      c_prev = rgb_t'({$urandom, $urandom});
      x1sdi  = a_prev;
      x3sdii = c_prev;
      @(negedge clk); #1;
      check(x3sdi == a_prev, "X3SDI follows master register");
      check(x3sdi_oe == {w[0], w[1], w[2]}, "tri-state enables");
    end
  endtask

  initial begin
    x1sdi = '0; x3sdii = '0;
    // Identity routing, all tri-states on.
    write_ctrl(12'b10_01_00_000_111); stream(12'b10_01_00_000_111, 20);
    // Green broadcast to all three outputs (grey image), tri-states off.
    write_ctrl(12'b01_01_01_000_000); stream(12'b01_01_01_000_000, 20);
    // Full colour swap with X3SDII on red and blue lanes.
    write_ctrl(12'b00_10_01_101_010); stream(12'b00_10_01_101_010, 20);
    // Random words.
    for (int i = 0; i < 40; i++) begin
      logic [11:0] w;
      w = 12'($urandom);
      write_ctrl(w); stream(w, 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
