// tb_sync_demo: the basic sync / inverted-sync run of a single chip.
//
// The chip is programmed for a 128-bit correlation with zero error
// tolerance (THRE1 = 0, THRE2 = 255), no mask, and a reference word of all
// ones. Then 128 ones and 128 zeros are shifted in on SIN at one bit per
// CLK period, after the register has been filled with alternating bits.
// Expected, counting CLK edges from the first 1:
//   edge 129: SYN rises (plain sync), INVOUT stays 0;
//   edge 130: SYN falls again (the word is no longer aligned);
//   edge 257: SYN rises with INVOUT = 1 (inverted sync);
//   edge 258: SYN falls again, because a 1 entered with edge 257;
//   SOUT shows the fill bits, then the first 1 after edge 128 and the first
//   0 after edge 256.
// SYN is compared at every edge, and INVOUT is read over the bus during
// both pulses.
module tb_sync_demo;
  logic clk = 0, sin = 0, cs_n = 1, wr_n = 1, rd_n = 1;
  logic [2:0] addr = 0;
  logic [7:0] d_in = 0, d_out, c_out;
  logic d_oe, c_oe, sout, sout_oe, syn;
  int checks = 0, failures = 0, edges = 0;

  bac128 dut (.clk, .sin, .sout, .sout_oe, .cs_n, .wr_n, .rd_n, .addr, .d_in,
              .d_out, .d_oe, .c_in(8'h00), .c_out, .c_oe, .syn);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [2:0] a, logic [7:0] v);
    addr = a; d_in = v; cs_n = 0;
    #10 wr_n = 0; #10 wr_n = 1; #10 cs_n = 1; #10;
  endtask

  task automatic rd(logic [2:0] a, output logic [7:0] v);
    addr = a; cs_n = 0;
    #10 rd_n = 0; #10 v = d_out; rd_n = 1; #10 cs_n = 1; #10;
  endtask

  task automatic edge_in(logic b);
    sin = b;
    #250 clk = 1; edges++;
    #250 clk = 0;
  endtask

  initial begin
    logic [7:0] st;
    logic exp_syn, exp_sout;
    wr(3'b011, 8'b0000_0011);               // CLEAR=1 SOE=1, correlator, slave
    for (int j = 0; j < 16; j++) wr(3'b000, 8'hff);
    for (int j = 0; j < 16; j++) wr(3'b001, 8'h00);
    wr(3'b010, 8'd0);                       // THRE1: no tolerated error
    wr(3'b010, 8'd255);                     // THRE2: 255 - (0 + 0 masked)
    // fill with alternating bits (64 matches: neither sync nor inverted)
    for (int i = 0; i < 128; i++) edge_in(!i[0]);
    edges = 0;
    for (int i = 0; i < 256; i++) begin
      edge_in(i < 128);
      #1;
      exp_syn  = (edges == 129);
      exp_sout = (edges < 128) ? 1'((edges + 1) % 2) : (edges < 256);
      checks++;
      if (syn !== exp_syn || sout !== exp_sout || sout_oe !== 1'b1) begin
        failures++;
        $display("FAIL after edge %0d: SYN=%0b SOUT=%0b exp %0b %0b", edges, syn, sout,
                 exp_syn, exp_sout);
      end
    end
    // edge 257 latches the decision on 128 zeros; a 1 enters meanwhile
    edge_in(1);
    #1 checks++;
    if (syn !== 1) begin failures++; $display("FAIL no inverted sync at edge 257"); end
    rd(3'b011, st);
    checks++;
    if (st[1:0] !== 2'b11) begin failures++; $display("FAIL INVOUT/SYNOUT %b", st); end
    edge_in(0);
    #1 checks++;
    if (syn !== 0) begin failures++; $display("FAIL SYN pulse longer than one period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // status read during the plain sync pulse, after edge 129
  initial begin
    logic [7:0] st;
    wait (edges == 129);
    #300;
    rd(3'b011, st);
    checks++;
    if (st !== 8'b0000_0001) begin failures++; $display("FAIL status during sync %b", st); end
  end
endmodule
