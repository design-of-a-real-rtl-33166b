// tb_vme_addr_decoder: checks the first VME decoding level against the board
// address map. Every A[15:9] value is tried with accepted and rejected address
// modifiers, LWORD*, IACK* and AS*; the expected bank comes from the list of chip
// addresses (latches 0xFC00-0xFD80, crossbars 0xFE00-0xFF00, read drivers
// 0xFA00-0xFAC0), not from the decoder's bank codes.
module tb_vme_addr_decoder;
  logic [15:9] a;
  logic [5:0]  am;
  logic        lword_l, iack_l, as_l;
  logic        wenable, menable, renable, bsel;
  int checks = 0, failures = 0;

  vme_addr_decoder dut (.a, .am, .lword_l, .iack_l, .as_l, .wenable, .menable, .renable, .bsel);

  localparam logic [15:0] WADDR [7] = '{16'hFC00, 16'hFC40, 16'hFC80, 16'hFCC0, 16'hFD00, 16'hFD40, 16'hFD80};
  localparam logic [15:0] MADDR [5] = '{16'hFE00, 16'hFE40, 16'hFE80, 16'hFEC0, 16'hFF00};
  localparam logic [15:0] RADDR [4] = '{16'hFA00, 16'hFA40, 16'hFA80, 16'hFAC0};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h am=%h", what, a, am);
    end
  endtask

  initial begin
    logic [5:0] ams [4] = '{6'h29, 6'h2D, 6'h39, 6'h09};
    for (int i = 0; i < 128; i++) begin
      for (int m = 0; m < 4; m++) begin
        for (int c = 0; c < 8; c++) begin
          bit ew, em, er, ok;
          ew = 0; em = 0; er = 0;
          a = 7'(i); am = ams[m];
          {lword_l, iack_l, as_l} = 3'(c);
          foreach (WADDR[j]) if (WADDR[j][15:9] == a) ew = 1;
          foreach (MADDR[j]) if (MADDR[j][15:9] == a) em = 1;
          foreach (RADDR[j]) if (RADDR[j][15:9] == a) er = 1;
          ok = (m < 2) && lword_l && iack_l && !as_l;
          #1;
          check(wenable == (ok && ew), "WENABLE");
          check(menable == (ok && em), "MENABLE");
          check(renable == (ok && er), "RENABLE");
          check(bsel == (ok && (ew || em || er)), "BSEL");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
