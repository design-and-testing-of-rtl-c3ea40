// tb_integrator: checks the score path of one chip.
// Random comparator words, cascade inputs and M/S settings are applied. The
// own count must be the popcount, the cascade pins must be driven only by a
// slave, and the score must be the own count (slave) or own count plus the
// cascade input (master), including the full 256 case.
module tb_integrator;
  logic [127:0] cp;
  logic ms, c_oe;
  logic [7:0] c_in, count, c_out;
  logic [8:0] score;
  int checks = 0, failures = 0;

  integrator dut (.cp, .ms, .c_in, .count, .c_out, .c_oe, .score);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int own, exp;
    own = $countones(cp);
    exp = ms ? own + int'(c_in) : own;
    checks++;
    if (int'(count) != own || c_out !== count || c_oe !== !ms || int'(score) != exp) begin
      failures++;
      $display("FAIL ms=%0b c_in=%0d own=%0d: count=%0d score=%0d oe=%0b",
               ms, c_in, own, count, score, c_oe);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      cp   = {$urandom, $urandom, $urandom, $urandom};
      ms   = 1'($urandom);
      c_in = 8'($urandom_range(0, 128));
      #1 check_now();
    end
    cp = '1; ms = 1; c_in = 8'd128;
    #1 check_now();
    cp = '0; ms = 1; c_in = 8'd0;
    #1 check_now();
    cp = '1; ms = 0; c_in = 8'd77;
    #1 check_now();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
