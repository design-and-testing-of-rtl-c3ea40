// tb_pattern_register: checks loading and scanning of a 128-bit register.
//  1. 16 random bytes are written; byte j (0 = first) must end with data bit
//     k in register bit 127 - 8j - k.
//  2. In scan mode 128 random bits are shifted in through sci; the bits
//     that come out of sco must be the previous contents in chain order
//     (chain 7 first, from its last stage: bits 120, 112, ... 0; then chain 6
//     from bit 121, ... chain 0 ending at bit 7), and afterwards the register
//     must hold the shifted-in bits in the same order.
module tb_pattern_register;
  logic clk = 0, test = 0, sci = 0, sco;
  logic [7:0] d_in = 0;
  logic [127:0] q, exp;
  int checks = 0, failures = 0;

  pattern_register dut (.clk, .test, .sci, .d_in, .q, .sco);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register bit at scan position p (0 = nearest sco)
  function automatic int scan_bit(int p);
    int k, j;
    k = 7 - p / 16;       // chain
    j = 15 - p % 16;      // stage within the chain
    return 8 * j + (7 - k);
  endfunction

  initial begin
    logic [127:0] scanned_in;
    for (int rep = 0; rep < 3; rep++) begin
      for (int j = 0; j < 16; j++) begin
        d_in = 8'($urandom);
        for (int k = 0; k < 8; k++) exp[127 - 8*j - k] = d_in[k];
        #2 clk = 1; #2 clk = 0;
      end
      #1 checks++;
      if (q !== exp) begin failures++; $display("FAIL load: q=%h exp=%h", q, exp); end
    end
    // scan
    test = 1;
    for (int p = 0; p < 128; p++) begin
      checks++;
      if (sco !== exp[scan_bit(p)]) begin failures++; $display("FAIL scan out %0d", p); end
      sci = 1'($urandom);
      scanned_in[p] = sci;
      d_in = 8'($urandom);  // must be ignored in scan mode
      #2 clk = 1; #2 clk = 0;
    end
    // the bit shifted in at step p travels to scan position p
    for (int p = 0; p < 128; p++) exp[scan_bit(p)] = scanned_in[p];
    #1 checks++;
    if (q !== exp) begin failures++; $display("FAIL scan in: q=%h exp=%h", q, exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
