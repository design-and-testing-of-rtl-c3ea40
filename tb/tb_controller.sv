// tb_controller: exhaustive check of the address decoder.
// All 64 combinations of CS, RD, WR and A2..A0 are applied and every strobe
// is compared with the register map: writes at 000..011 (and the shift
// register load at 100) when WR is low, status and shift-register reads when
// RD is low and WR high, INT and TEST as plain address decodes, all four
// scan-path clocks following WR in test mode, and nothing while CS is high.
module tb_controller;
  logic cs_n, rd_n, wr_n;
  logic [2:0] addr;
  logic wref, wm, wt, ws, rs, rsh, wshr, int_sel, test;
  int checks = 0, failures = 0;

  controller dut (.cs_n, .rd_n, .wr_n, .addr, .wref, .wm, .wt, .ws, .rs,
                  .rsh, .wshr, .int_sel, .test);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exp, got;
    logic sel, w, r, t;
    for (int v = 0; v < 64; v++) begin
      {cs_n, rd_n, wr_n, addr} = 6'(v);
      #1;
      sel = !cs_n;
      w   = sel && !wr_n;
      r   = sel && !rd_n && wr_n;
      t   = sel && addr == 3'd6;
      exp = { w && (addr == 3'd0 || t),     // wref
              w && (addr == 3'd1 || t),     // wm
              w && (addr == 3'd2 || t),     // wt
              w && (addr == 3'd3 || t),     // ws
              r && addr == 3'd3,            // rs
              r && addr == 3'd4,            // rsh
              w && addr == 3'd4,            // wshr
              sel && addr == 3'd5,          // int
              t };                          // test
      got = {wref, wm, wt, ws, rs, rsh, wshr, int_sel, test};
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL cs=%0b rd=%0b wr=%0b a=%03b: got %09b exp %09b",
                 cs_n, rd_n, wr_n, addr, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
