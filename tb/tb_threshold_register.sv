// tb_threshold_register: checks the THRE1/THRE2 pair.
// Two writes load THRE1 (first byte) and THRE2 (second byte). In scan mode
// the 16 bits leave in the order THRE1[7], THRE2[7], THRE1[6], ... THRE2[0]
// and the shifted-in bits take their places.
module tb_threshold_register;
  logic clk = 0, test = 0, sci = 0, sco;
  logic [7:0] d_in = 0, thre1, thre2, e1, e2;
  int checks = 0, failures = 0;

  threshold_register dut (.clk, .test, .sci, .d_in, .thre1, .thre2, .sco);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #2 clk = 1; #2 clk = 0;
  endtask

  initial begin
    logic [15:0] chain, in_bits;
    for (int rep = 0; rep < 20; rep++) begin
      e1 = 8'($urandom); e2 = 8'($urandom);
      d_in = e1; pulse();
      d_in = e2; pulse();
      #1 checks++;
      if (thre1 !== e1 || thre2 !== e2) begin
        failures++;
        $display("FAIL load: %h %h exp %h %h", thre1, thre2, e1, e2);
      end
    end
    // scan: position p = 0 nearest sco
    for (int k = 0; k < 8; k++) begin
      chain[2*k]     = e1[7-k];
      chain[2*k + 1] = e2[7-k];
    end
    test = 1;
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (sco !== chain[p]) begin failures++; $display("FAIL scan out %0d", p); end
      sci = 1'($urandom); in_bits[p] = sci; d_in = 8'($urandom);
      pulse();
    end
    for (int k = 0; k < 8; k++) begin
      e1[7-k] = in_bits[2*k];
      e2[7-k] = in_bits[2*k + 1];
    end
    #1 checks++;
    if (thre1 !== e1 || thre2 !== e2) begin failures++; $display("FAIL scan in"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
