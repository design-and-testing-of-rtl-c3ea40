// tb_decision_maker: checks the sync / inverted-sync decision.
// For random scores and thresholds in both modes the flip-flops must, after
// a rising clock edge, hold
//   INV = (score + THRE2) < 256
//   SYN = INV or bit 7 of (score + THRE1)   (128-bit mode)
//   SYN = INV or (score + THRE1) >= 256     (256-bit master mode)
// and a low clear input must force both low at once.
module tb_decision_maker;
  logic clk = 0, clr_n, ms, syn, inv;
  logic [8:0] score;
  logic [7:0] thre1, thre2;
  int checks = 0, failures = 0;

  decision_maker dut (.clk, .clr_n, .ms, .score, .thre1, .thre2, .syn, .inv);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [8:0] sc, input logic [7:0] t1, input logic [7:0] t2,
                      input logic m);
    int s1, s2;
    logic es, ei;
    score = sc; thre1 = t1; thre2 = t2; ms = m;
    s1 = int'(sc) + int'(t1);
    s2 = int'(sc) + int'(t2);
    ei = s2 < 256;
    es = ei || (m ? s1 >= 256 : s1[7]);
    #5 clk = 1;
    #1 checks++;
    if (syn !== es || inv !== ei) begin
      failures++;
      $display("FAIL ms=%0b score=%0d t1=%0d t2=%0d: syn=%0b inv=%0b exp %0b %0b",
               m, sc, t1, t2, syn, inv, es, ei);
    end
    #4 clk = 0;
  endtask

  initial begin
    clr_n = 0; #1 clr_n = 1;
    for (int i = 0; i < 600; i++) begin
      if (i % 2 == 0)
        step(9'($urandom_range(0, 128)), 8'($urandom_range(0, 128)), 8'($urandom), 1'b0);
      else
        step(9'($urandom_range(0, 256)), 8'($urandom), 8'($urandom), 1'b1);
    end
    // exact thresholds of the 128-bit case: 120 matches, 8 tolerated
    step(9'd120, 8'd8, 8'd255 - 8'd8, 1'b0);
    step(9'd119, 8'd8, 8'd255 - 8'd8, 1'b0);
    step(9'd8,   8'd8, 8'd255 - 8'd8, 1'b0);
    step(9'd9,   8'd8, 8'd255 - 8'd8, 1'b0);
    // clear
    step(9'd0, 8'd0, 8'd0, 1'b0);
    clr_n = 0;
    #1 checks++;
    if (syn !== 0 || inv !== 0) begin failures++; $display("FAIL clear"); end
    #5 clk = 1; #1 checks++;
    if (syn !== 0 || inv !== 0) begin failures++; $display("FAIL held clear"); end
    #4 clk = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
