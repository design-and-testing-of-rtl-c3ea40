// tb_ones_counter: stage-by-stage functional test of the 128-input 1's counter.
//
// Stage s of the adder tree (s = 1 half adders, s = 2..7 the s-bit adders)
// adds two inputs whose values run from 0 to 2^(s-1). To reach every adder of
// a stage at once, the 128 inputs are cut into groups of 2^s bits; in each
// group the lower half carries the value a (its a lowest bits set) and the
// upper half the value b. Every (a, b) pair is applied, so all adders of the
// stage see all their input combinations and the count must be
// (128 / 2^s) * (a + b). Stages 1..7 need 4, 9, 25, 81, 289, 1089 and 4225
// vectors, 5722 in all. Random vectors compared with a popcount follow.
module tb_ones_counter;
  logic [127:0] in;
  logic [7:0]   count;
  int checks = 0, failures = 0;
  int vectors = 0;

  ones_counter dut (.in, .count);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, h, exp;
    for (int s = 1; s <= 7; s++) begin
      g = 1 << s;
      h = g / 2;
      for (int a = 0; a <= h; a++)
        for (int b = 0; b <= h; b++) begin
          in = '0;
          for (int grp = 0; grp < 128 / g; grp++)
            for (int i = 0; i < h; i++) begin
              in[grp*g + i]     = (i < a);
              in[grp*g + h + i] = (i < b);
            end
          #1;
          exp = (128 / g) * (a + b);
          vectors++;
          checks++;
          if (int'(count) != exp) begin
            failures++;
            $display("FAIL stage %0d a=%0d b=%0d: count=%0d exp=%0d", s, a, b, count, exp);
          end
        end
    end
    checks++;
    if (vectors != 5722) begin failures++; $display("FAIL vector total %0d", vectors); end
    for (int i = 0; i < 500; i++) begin
      in = {$urandom, $urandom, $urandom, $urandom};
      if (i % 5 == 0) in = in & {$urandom, $urandom, $urandom, $urandom};
      if (i % 7 == 0) in = in | {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (int'(count) != $countones(in)) begin failures++; $display("FAIL random %h", in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
