// tb_chip_test: production-style test of one chip through its pins only.
//
// Runs the three test phases that the chip's test structure is made for,
// using nothing but bus cycles and the pins:
//  1. Register test over the scan path. In scan-test mode (address 110) the
//     reference, mask, threshold and status registers form one 277-stage
//     shift register fed from D0, one stage per write, read out on SYN.
//     A flush of 277 ones, a flush of 277 zeros and the repeating shift
//     pattern 001100 are passed through; after the chain has filled, the
//     SYN pin after write n must show the bit written 276 writes earlier.
//  2. Comparator test. Every compare cell gets the same (mask, reference,
//     data) triple, for all 8 triples; the counter, read on the data bus and
//     on C0..C7, must be 128 for a match or a masked cell and 0 otherwise.
//     Random register contents compared with a popcount model follow.
//  3. 1's-counter test. With the data register all ones and the mask all
//     zeros each comparator output equals its reference bit, so the counter
//     inputs are set by writing the reference register. Stage s of the adder
//     tree is reached by groups of 2^s inputs whose lower half holds the
//     value a and upper half the value b, for every (a, b): 5722 vectors in
//     all (4 + 9 + 25 + 81 + 289 + 1089 + 4225), each loaded in 16 writes
//     and checked on C0..C7 against (128 / 2^s) * (a + b).
// CLK never toggles: everything is done with processor cycles.
module tb_chip_test;
  localparam int N = 128;

  logic clk = 0, sin = 0, cs_n = 1, wr_n = 1, rd_n = 1;
  logic [2:0] addr = 0;
  logic [7:0] d_in = 0, d_out, c_out;
  logic d_oe, c_oe, sout, sout_oe, syn;
  int checks = 0, failures = 0;

  bac128 dut (.clk, .sin, .sout, .sout_oe, .cs_n, .wr_n, .rd_n, .addr, .d_in,
              .d_out, .d_oe, .c_in(8'h00), .c_out, .c_oe, .syn);

  initial begin : watchdog
    #100ms;
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

  // one scan-path step: shift bit b in on D0, return the SYN pin afterwards
  task automatic scan(logic b, output logic so);
    addr = 3'b110; d_in = {7'b0, b}; cs_n = 0;
    #10 wr_n = 0; #10 wr_n = 1; #5 so = syn; #5 cs_n = 1; #10;
  endtask

  // byte j of a 128-bit register carries bits 127-8j-k on D_k
  task automatic load128(logic [2:0] a, logic [N-1:0] v);
    logic [7:0] b;
    for (int j = 0; j < 16; j++) begin
      for (int k = 0; k < 8; k++) b[k] = v[N - 1 - 8*j - k];
      wr(a, b);
    end
  endtask

  // data register loaded over the bus: chain k (bits 16k..16k+15) takes D_k,
  // the byte written last ends in the lowest stage of every chain
  task automatic load_data(logic [N-1:0] v);
    logic [7:0] b;
    wr(3'b011, 8'b0001_0011);               // WSH=1, CLEAR=1, SOE=1
    for (int j = 15; j >= 0; j--) begin
      for (int k = 0; k < 8; k++) b[k] = v[16*k + j];
      wr(3'b100, b);
    end
    wr(3'b011, 8'b0000_0011);               // WSH=0: 128-bit correlator
  endtask

  task automatic check_count(int exp, string what);
    logic [7:0] v;
    rd(3'b101, v);
    checks++;
    if (int'(v) != exp || c_oe !== 1'b1 || int'(c_out) != exp) begin
      failures++;
      $display("FAIL %s: bus %0d pins %0d (oe %0b) exp %0d", what, v, c_out, c_oe, exp);
    end
  endtask

  initial begin
    // ============ 1. registers through the scan path ============
    begin
      localparam int L = 277;
      logic seq [$];
      logic so;
      automatic int n_checked = 0;
      for (int i = 0; i < L; i++) seq.push_back(1'b1);
      for (int i = 0; i < L; i++) seq.push_back(1'b0);
      for (int i = 0; i < 3 * L; i++) seq.push_back(i % 6 == 2 || i % 6 == 3);
      for (int n = 0; n < seq.size(); n++) begin
        scan(seq[n], so);
        if (n >= L - 1) begin
          checks++;
          n_checked++;
          if (so !== seq[n - (L - 1)]) begin
            failures++;
            $display("FAIL scan write %0d: SYN=%0b exp %0b", n, so, seq[n - (L - 1)]);
          end
        end
      end
      checks++;
      if (n_checked != 4 * L + 1) begin failures++; $display("FAIL scan steps %0d", n_checked); end
    end

    // ============ 2. comparator: 8 uniform vectors, then random ============
    wr(3'b011, 8'b0000_0011);               // CLEAR=1 SOE=1, correlator, slave
    for (int v = 0; v < 8; v++) begin
      logic m, r, s;
      logic [7:0] sr;
      {m, r, s} = 3'(v);
      load_data({N{s}});
      load128(3'b000, {N{r}});
      load128(3'b001, {N{m}});
      rd(3'b100, sr);
      checks++;
      if (sr !== {8{s}}) begin failures++; $display("FAIL shift read %h", sr); end
      check_count((m || (r == s)) ? N : 0, $sformatf("compare m=%0b r=%0b s=%0b", m, r, s));
    end
    for (int t = 0; t < 20; t++) begin
      logic [N-1:0] dv, rv, mv;
      dv = {$urandom, $urandom, $urandom, $urandom};
      rv = {$urandom, $urandom, $urandom, $urandom};
      mv = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      load_data(dv);
      load128(3'b000, rv);
      load128(3'b001, mv);
      check_count($countones(~(dv ^ rv) | mv), "compare random");
    end

    // ============ 3. 1's counter, stage by stage, through the pins ============
    load_data({N{1'b1}});
    load128(3'b001, '0);
    begin
      automatic int vectors = 0;
      for (int s = 1; s <= 7; s++) begin
        int g, h;
        g = 1 << s;
        h = g / 2;
        for (int a = 0; a <= h; a++)
          for (int b = 0; b <= h; b++) begin
            logic [N-1:0] v;
            v = '0;
            for (int grp = 0; grp < N / g; grp++)
              for (int i = 0; i < h; i++) begin
                v[grp*g + i]     = (i < a);
                v[grp*g + h + i] = (i < b);
              end
            load128(3'b000, v);
            vectors++;
            checks++;
            if (c_oe !== 1'b1 || int'(c_out) != (N / g) * (a + b)) begin
              failures++;
              $display("FAIL counter stage %0d a=%0d b=%0d: C=%0d exp %0d", s, a, b,
                       c_out, (N / g) * (a + b));
            end
          end
      end
      checks++;
      if (vectors != 5722) begin failures++; $display("FAIL vector total %0d", vectors); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
