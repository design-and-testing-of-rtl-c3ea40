// tb_shift_register: checks the three ways the data shift register moves.
//  1. Serial mode: random bits on SIN, one per CLK edge; the contents must
//     track a model in which the new bit enters bit 0 and bit 127 drives
//     SOUT; bits 7..0 are the read-back word.
//  2. Bus load: with WSH set, 16 bus-load strobes load bytes; chain k
//     (bits 16k..16k+15) collects data bit D_k, the byte written last in
//     the lowest stage. CLK edges are ignored meanwhile.
//  3. PRBS mode: the feedback bit enters instead of SIN and is also SOUT.
module tb_shift_register;
  logic clk = 0, wshr = 0, wsh = 0, prbs = 0, sin = 0, fb = 0;
  logic [7:0] d_in = 0, rd_data;
  logic [127:0] q, model;
  logic sout;
  int checks = 0, failures = 0;

  shift_register dut (.clk, .wshr, .wsh, .prbs, .sin, .fb, .d_in, .q, .sout, .rd_data);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clk_edge();
    #5 clk = 1; #5 clk = 0;
  endtask

  task automatic compare(input string what);
    checks++;
    if (q !== model || rd_data !== model[7:0] || sout !== (prbs ? fb : model[127])) begin
      failures++;
      $display("FAIL %s: q=%h model=%h", what, q, model);
    end
  endtask

  initial begin
    // 1. serial
    for (int i = 0; i < 300; i++) begin
      sin = 1'($urandom);
      model = {model[126:0], sin};
      clk_edge();
      if (i >= 127) compare("serial");
    end
    // 2. bus load (CLK low when WSH changes)
    wsh = 1;
    for (int j = 0; j < 16; j++) begin
      d_in = 8'($urandom);
      for (int k = 0; k < 8; k++) model[k*16 +: 16] = {model[k*16 +: 15], d_in[k]};
      #2 wshr = 1; #2 wshr = 0;
      clk_edge();  // CLK must not move the register now
      compare("bus load");
    end
    wsh = 0;
    // 3. PRBS feedback
    prbs = 1;
    for (int i = 0; i < 100; i++) begin
      fb  = 1'($urandom);
      sin = 1'($urandom);
      #1 checks++;
      if (sout !== fb) begin failures++; $display("FAIL prbs sout"); end
      model = {model[126:0], fb};
      clk_edge();
      compare("prbs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
