// tb_imgboard: end-to-end test of the image processing board.
//
// A VME bus-master model configures the five crossbar chips and the image
// processing chip set's control latches, reads the four read-back drivers, and
// switches the board between four routings. Random 24-bit pixels enter every dot
// clock on the A/D, frame-buffer and expansion-port busses. Stand-ins for the two
// chip sets sit on their pins: the image processing chips add control latch 0 to
// the pixel, the histogram chips invert it, each loading on PHI2.
//
// Routings (expected outputs per colour plane):
//   ACQUIRE   A/D -> frame buffers, frame buffers -> D/A, A/D -> expansion port,
//             A/D green -> image processing -> histogram (hidden)
//   CASCADE   A/D green through image processing then histogram, broadcast as grey
//             to all three D/A planes; frame buffers get the result on green and
//             the expansion port's red and blue
//   FBPROC    frame buffers drive the wired-OR bus instead of the A/D; their green
//             goes through image processing only; frame buffers get the result with
//             red and blue swapped from the expansion port
//   EXTHIST   expansion port green goes through the histogram chips to D/A green
// Two drivers on a wired-OR bus would OR their pixels and break the per-pixel
// checks, so the checks also show that only one chip drives each shared bus.
// For each output plane the checker finds the pipeline latency from the first
// samples, then requires every later pixel, one per clock, to match at that
// latency. CASCADE runs for one full 512 x 512 frame. Every mechanism (each
// routing, wired-OR source switch, grey broadcast, each bank of the VME interface)
// is counted and must have happened.
module tb_imgboard;
  import imgboard_pkg::*;

  localparam int FRAME_PIXELS = 512 * 512;
  localparam int SHORT_RUN    = 400;
  localparam int HIST_N       = 64;

  typedef enum int {ACQUIRE, CASCADE, FBPROC, EXTHIST} mode_e;

  logic dotclock_l = 1'b1, sysclk = 1'b0, sysreset_l = 1'b0;
  rgb_t ad_out = '0, fb_out = '0, vp_out = '0;
  rgb_t da_in, fb_in, vp_in;
  logic [15:6] vme_a = '0;
  logic [5:0]  vme_am = 6'h2D;
  logic        vme_lword_l = 1, vme_iack_l = 1, vme_as_l = 1, vme_write_l = 1;
  logic [1:0]  vme_ds_l = 2'b11;
  logic [11:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, vme_dtack_l;
  logic        phi1, phi2;
  pixel_t      pip_di, pip_do = '0, hist_di, hist_do = '0;
  logic [6:0][7:0] pip_ctrl;
  logic [3:0][7:0] pip_rd = {8'h44, 8'h33, 8'h22, 8'h11};

  int checks = 0, failures = 0;

  imgboard dut (.*);

  // 10 MHz dot clock, 55/45 duty; 16 MHz VME system clock.
  always begin
    #55 dotclock_l = 1'b0;
    #45 dotclock_l = 1'b1;
  end
  always #31 sysclk = ~sysclk;

  // Chip-set stand-ins.
  always @(posedge phi2) pip_do  <= pip_di + pip_ctrl[0];
  always @(posedge phi2) hist_do <= ~hist_di;

  initial begin
    #120ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  int   cyc = 0;
  rgb_t in_ad [HIST_N], in_fb [HIST_N], in_vp [HIST_N];
  rgb_t o_da [HIST_N], o_fb [HIST_N], o_vp [HIST_N];

  always @(posedge dotclock_l) begin
    #3;
    o_da[cyc % HIST_N] = da_in;
    o_fb[cyc % HIST_N] = fb_in;
    o_vp[cyc % HIST_N] = vp_in;
    #2;
    ad_out = rgb_t'({$urandom, $urandom});
    fb_out = rgb_t'({$urandom, $urandom});
    vp_out = rgb_t'({$urandom, $urandom});
    in_ad[cyc % HIST_N] = ad_out;
    in_fb[cyc % HIST_N] = fb_out;
    in_vp[cyc % HIST_N] = vp_out;
    cyc++;
  end

  // ---------------------------------------------------------------- VME master
  int n_mux_writes [5] = '{0, 0, 0, 0, 0};
  int n_latch_writes = 0, n_reads = 0;

  task automatic vme(input logic [15:0] addr, input bit wr, input logic [11:0] wdata,
                     output logic [11:0] rdat);
    int t = 0;
    vme_a = addr[15:6]; vme_write_l = !wr; vme_d_in = wr ? wdata : 12'h000;
    #7 vme_as_l = 0;
    #20 vme_ds_l = 2'b00;
    while (vme_dtack_l && t < 100) begin @(posedge sysclk); t++; end
    #2;
    check(!vme_dtack_l, $sformatf("DTACK* for %h", addr));
    rdat = vme_d_out;
    #15 vme_ds_l = 2'b11; vme_as_l = 1;
    t = 0;
    while (!vme_dtack_l && t < 100) begin @(posedge sysclk); t++; end
    repeat (2) @(posedge sysclk);
  endtask

  localparam logic [15:0] MUX_ADDR [5] = '{16'hFE00, 16'hFE40, 16'hFE80, 16'hFEC0, 16'hFF00};

  task automatic write_mux(int chip, logic [11:0] w);
    logic [11:0] r;
    vme(MUX_ADDR[chip], 1, w, r);
    n_mux_writes[chip]++;
  endtask

  task automatic write_latch(int i, logic [7:0] v);
    logic [11:0] r;
    vme(16'hFC00 + 16'(i * 'h40), 1, {4'h0, v}, r);
    n_latch_writes++;
    check(pip_ctrl[i] == v, "control latch reaches the chip set");
  endtask

  // Three-channel control word: tri-state enables, level-1 selects, sources.
  function automatic logic [11:0] w3(bit oer, bit oeg, bit oeb, bit lr, bit lg, bit lb,
                                     plane_src_e rs, plane_src_e gs, plane_src_e bs);
    return {bs, gs, rs, lb, lg, lr, oeb, oeg, oer};
  endfunction

  // ---------------------------------------------------------------- checker
  mode_e  mode;
  pixel_t k0;   // current value of control latch 0

  function automatic pixel_t pl(rgb_t v, int p);
    return p == 0 ? v.r : (p == 1 ? v.g : v.b);
  endfunction

  // Expected value of output o (0 D/A, 1 frame buffers, 2 expansion port), plane p,
  // for the inputs of cycle k.
  function automatic pixel_t expect_px(int o, int p, int k);
    rgb_t a = in_ad[k % HIST_N], f = in_fb[k % HIST_N], v = in_vp[k % HIST_N];
    pixel_t proc_ad = ~(a.g + k0);   // image processing then histogram
    case (mode)
      ACQUIRE: return o == 0 ? pl(f, p) : pl(a, p);
      CASCADE: case (o)
        0: return proc_ad;
        1: return p == 1 ? proc_ad : pl(v, p);
        default: return pl(a, p);
      endcase
      FBPROC: case (o)
        0: return pl(f, p);
        1: return p == 1 ? f.g + k0 : (p == 0 ? v.b : v.r);
        default: return pl(f, p);
      endcase
      default: case (o)   // EXTHIST
        0: return p == 1 ? ~v.g : pl(f, p);
        default: return pl(a, p);
      endcase
    endcase
  endfunction

  function automatic pixel_t observed(int o, int p, int k);
    return pl(o == 0 ? o_da[k % HIST_N] : (o == 1 ? o_fb[k % HIST_N] : o_vp[k % HIST_N]), p);
  endfunction

  int lat [3][3];
  int n_locked = 0;

  task automatic run_mode(mode_e m, int n);
    int now;
    mode = m;
    repeat (40) @(posedge dotclock_l);
    #4;
    now = cyc - 1;
    // Lock the latency of each output plane on 12 consecutive pixels.
    for (int o = 0; o < 3; o++) begin
      for (int p = 0; p < 3; p++) begin
        lat[o][p] = -1;
        for (int l = 1; l < 24 && lat[o][p] < 0; l++) begin
          bit ok = 1;
          for (int j = 0; j < 12; j++) if (observed(o, p, now - j) != expect_px(o, p, now - j - l)) ok = 0;
          if (ok) lat[o][p] = l;
        end
        check(lat[o][p] > 0, $sformatf("mode %s output %0d plane %0d routed", m.name(), o, p));
        if (lat[o][p] > 0) n_locked++;
      end
    end
    $display("mode %s latencies (dot clocks) D/A %0d %0d %0d, FB %0d %0d %0d, port %0d %0d %0d", m.name(),
             lat[0][0], lat[0][1], lat[0][2], lat[1][0], lat[1][1], lat[1][2], lat[2][0], lat[2][1], lat[2][2]);
    // Then every pixel, one per clock, at that latency.
    for (int i = 0; i < n; i++) begin
      @(posedge dotclock_l);
      #4;
      now = cyc - 1;
      for (int o = 0; o < 3; o++)
        for (int p = 0; p < 3; p++)
          if (lat[o][p] > 0)
            check(observed(o, p, now) == expect_px(o, p, now - lat[o][p]),
                  $sformatf("mode %s output %0d plane %0d pixel", m.name(), o, p));
    end
  endtask

  // ---------------------------------------------------------------- sequence
  int n_modes [4] = '{0, 0, 0, 0};
  int n_grey = 0, n_int1_fb1 = 0, n_int1_fb2 = 0, n_gpip_vp1 = 0, n_gpip_vp2 = 0;

  initial begin
    logic [11:0] r;
    repeat (4) @(posedge sysclk);
    sysreset_l = 1'b1;
    repeat (4) @(posedge sysclk);

    // Read-back drivers.
    for (int i = 0; i < 4; i++) begin
      vme(16'hFA00 + 16'(i * 'h40), 0, 12'h0, r);
      check(r == {4'h0, pip_rd[i]}, "read-back driver");
      n_reads++;
    end
    // All seven control latches.
    for (int i = 0; i < 7; i++) write_latch(i, 8'($urandom));

    // ACQUIRE
    write_mux(0, w3(1,1,1, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(1, w3(0,0,0, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(2, w3(0,1,0, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(3, w3(0,0,0, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(4, 12'b100);
    write_latch(0, 8'h17); k0 = 8'h17;
    run_mode(ACQUIRE, SHORT_RUN); n_modes[ACQUIRE]++; n_int1_fb1++; n_gpip_vp1++;

    // CASCADE, for one full frame
    write_mux(0, w3(1,1,1, 1,1,1, SRC_R, SRC_G, SRC_B));
    write_mux(1, w3(0,0,0, 0,1,0, SRC_G, SRC_G, SRC_G));
    write_mux(3, w3(0,0,0, 0,1,0, SRC_R, SRC_G, SRC_B));
    write_latch(0, 8'h5B); k0 = 8'h5B;
    run_mode(CASCADE, FRAME_PIXELS); n_modes[CASCADE]++; n_grey++; n_int1_fb1++; n_gpip_vp1++;

    // FBPROC: frame buffers take over the wired-OR bus
    write_mux(0, w3(0,0,0, 1,1,1, SRC_B, SRC_G, SRC_R));
    write_mux(1, w3(1,1,1, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(4, 12'b000);
    write_latch(0, 8'hC3); k0 = 8'hC3;
    run_mode(FBPROC, SHORT_RUN); n_modes[FBPROC]++; n_int1_fb2++; n_gpip_vp1++;

    // EXTHIST: expansion port green into the histogram chips
    write_mux(1, w3(0,0,0, 0,1,0, SRC_R, SRC_G, SRC_B));
    write_mux(0, w3(1,1,1, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(2, w3(0,0,0, 0,0,0, SRC_R, SRC_G, SRC_B));
    write_mux(3, w3(0,1,0, 0,1,0, SRC_R, SRC_G, SRC_B));
    write_mux(4, 12'b111);
    run_mode(EXTHIST, SHORT_RUN); n_modes[EXTHIST]++; n_int1_fb1++; n_gpip_vp2++;

    // Mechanism coverage.
    $display("mechanisms: mux writes %0d %0d %0d %0d %0d, latch writes %0d, reads %0d",
             n_mux_writes[0], n_mux_writes[1], n_mux_writes[2], n_mux_writes[3], n_mux_writes[4],
             n_latch_writes, n_reads);
    $display("mechanisms: modes %0d %0d %0d %0d, grey broadcast %0d, INT1 from FB1 %0d from FB2 %0d, GPIP from VP1 %0d from VP2 %0d, planes locked %0d",
             n_modes[0], n_modes[1], n_modes[2], n_modes[3], n_grey, n_int1_fb1, n_int1_fb2,
             n_gpip_vp1, n_gpip_vp2, n_locked);
    for (int i = 0; i < 5; i++) check(n_mux_writes[i] > 0, "every crossbar written");
    for (int i = 0; i < 4; i++) check(n_modes[i] > 0, "every routing run");
    check(n_latch_writes > 0 && n_reads > 0, "latch and driver banks used");
    check(n_grey > 0, "grey broadcast used");
    check(n_int1_fb1 > 0 && n_int1_fb2 > 0, "both wired-OR sources used");
    check(n_gpip_vp1 > 0 && n_gpip_vp2 > 0, "both green wired-OR sources used");
    check(n_locked == 36, "all output planes routed in all routings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
