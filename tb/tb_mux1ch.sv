// tb_mux1ch: self-checking testbench of the one-channel crossbar.
//
// Tries all eight select words. For each, a new random pixel is put on AD_OUT,
// P_OUT and FB_OUT every clock; FB_IN and DA_IN must show one clock later the
// selected input of the path (AD_OUT or FB_OUT through the master register,
// P_OUT direct), and P_IN must show AD_OUT or FB_OUT right after the master load.
// ACK_L is checked after each select write.
module tb_mux1ch;
  import imgboard_pkg::*;

  logic   clk = 1'b1;
  logic   cs_l = 1'b1;
  logic   sel1 = 0, sel2 = 0, sel3 = 0;
  logic   ack_l;
  pixel_t ad_out = 0, p_out = 0, fb_out = 0, fb_in, p_in, da_in;
  int checks = 0, failures = 0;

  mux1ch dut (.phase1(clk), .phase2(clk), .cs_l, .sel1, .sel2, .sel3, .ack_l,
              .ad_out, .p_out, .fb_out, .fb_in, .p_in, .da_in);

  always #50 clk = ~clk;

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

  initial begin
    for (int w = 0; w < 8; w++) begin
      pixel_t a, p, f;
      @(posedge clk); #10;
      {sel3, sel2, sel1} = 3'(w);
      #10 cs_l = 0;
      @(posedge clk); #1 check(ack_l == 0, "ACK_L low");
      #10 cs_l = 1;
      @(posedge clk); #1 check(ack_l == 1, "ACK_L high");
      for (int k = 0; k < 30; k++) begin
        @(posedge clk); #1;
        if (k > 0) begin
          check(fb_in == (w[0] ? a : p), "FB_IN path");
          check(da_in == (w[2] ? f : p), "DA_IN path");
        end
        #4;
        a = 8'($urandom); p = 8'($urandom); f = 8'($urandom);
        ad_out = a; p_out = p; fb_out = f;
        @(negedge clk); #1;
        check(p_in == (w[1] ? f : a), "P_IN path");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
