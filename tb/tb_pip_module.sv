// tb_pip_module: checks the board logic of the image processing module.
//
// Writes random bytes into the seven control latches through WSEL pulses and reads
// them back on the chip side; enables each read-back driver in turn and checks the
// host data bus; streams pixels through the PHI1 input register and (after a chip
// model that inverts the pixel) the PHI2 output register, one pixel per clock.
module tb_pip_module;
  import imgboard_pkg::*;
  logic phi1 = 0, phi2 = 0;
  pixel_t video_in = 0, video_out, chip_di, chip_do;
  logic [6:0] wsel = '0;
  logic [7:0] bdata = '0;
  logic [6:0][7:0] ctrl;
  logic [3:0] rsel_l = '1;
  logic [3:0][7:0] rd;
  logic [7:0] hdata;
  logic hdata_oe;
  logic [7:0] expect_ctrl [7];
  int checks = 0, failures = 0;

  pip_module dut (.phi1, .phi2, .video_in, .video_out, .chip_di, .chip_do, .wsel, .bdata,
                  .ctrl, .rsel_l, .rd, .hdata, .hdata_oe);

  assign chip_do = ~chip_di;   // stand-in for the chip set

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
    for (int rep = 0; rep < 10; rep++) begin
      for (int i = 0; i < 7; i++) begin
        expect_ctrl[i] = 8'($urandom);
        bdata = expect_ctrl[i];
        #10 wsel[i] = 1;
        #10 wsel[i] = 0;
        bdata = 8'($urandom);
      end
      #5;
      for (int i = 0; i < 7; i++) check(ctrl[i] == expect_ctrl[i], "control latch");
      rd = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      #1 check(!hdata_oe, "read bus idle");
      for (int i = 0; i < 4; i++) begin
        rsel_l[i] = 0;
        #1 check(hdata_oe && hdata == rd[i], "read-back driver");
        rsel_l[i] = 1;
      end
    end
    // Video: PHI1 and PHI2 alternate, one pixel per 100 time units.
    for (int k = 0; k < 50; k++) begin
      pixel_t v;
      v = 8'($urandom);
      video_in = v;
      #20 phi1 = 1;
      #30 phi1 = 0;
      #1 check(chip_di == v, "input register on PHI1");
      #19 phi2 = 1;
      #30 phi2 = 0;
      #1 check(video_out == ~v, "output register on PHI2");
      #0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
