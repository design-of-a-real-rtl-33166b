// tb_vme_vector_decoder: checks the second VME decoding level. For every A[8:6],
// bank enable and strobe, exactly the chip whose address (from the board address
// map) has those A[8:6] bits in the enabled bank must be selected, and only while
// the strobe is asserted.
module tb_vme_vector_decoder;
  logic [8:6] a;
  logic wenable, menable, renable, strobe;
  logic [4:0] msel_l;
  logic [6:0] wsel;
  logic [3:0] rsel_l;
  int checks = 0, failures = 0;

  vme_vector_decoder dut (.a, .wenable, .menable, .renable, .strobe, .msel_l, .wsel, .rsel_l);

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
      $display("FAIL %s a=%0d en=%b%b%b st=%b", what, a, wenable, menable, renable, strobe);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int b = 0; b < 4; b++) begin
        for (int s = 0; s < 2; s++) begin
          logic [4:0] em;
          logic [6:0] ew;
          logic [3:0] er;
          em = '1; ew = '0; er = '1;
          a = 3'(i); strobe = s[0];
          {wenable, menable, renable} = (b == 0) ? 3'b000 : 3'(1 << (b - 1));
          foreach (MADDR[j]) if (menable && strobe && MADDR[j][8:6] == a) em[j] = 1'b0;
          foreach (WADDR[j]) if (wenable && strobe && WADDR[j][8:6] == a) ew[j] = 1'b1;
          foreach (RADDR[j]) if (renable && strobe && RADDR[j][8:6] == a) er[j] = 1'b0;
          #1;
          check(msel_l == em, "MSEL_L");
          check(wsel == ew, "WSEL");
          check(rsel_l == er, "RSEL_L");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
