// tb_bac128: end-to-end test of the correlator at full size (128 taps).
//
// Two chips share the processor bus (separate chip selects) and CLK. The
// first chip's SOUT feeds the second chip's SIN and the C0..C7 pins are
// joined, as in the 256-bit cascade; in the 128-bit tests only the first
// chip's results are checked. The testbench keeps its own model of both
// shift registers and of every programmed register, and after each CLK edge
// compares SYN, the INV flag, SOUT and the cascade pins with values computed
// from the model (popcount of matched or masked bits plus thresholds).
//
// Scenarios, each counted as a mechanism that must occur at least once:
//   sync word with errors within the tolerance  -> SYN
//   sync word with one error too many           -> no SYN
//   inverted sync word                          -> SYN and INV
//   distributed sync word under a mask          -> SYN
//   SYN latency: 129th CLK edge after the word's first bit
//   status / shift-register / 1's-counter reads over the bus
//   256-bit master/slave sync and inverted sync, and a half-wrong word
//   shift register loaded over the bus (WSH), then PRBS generation checked
//     bit by bit against a model LFSR, with SYN held clear by CLEAR
//   serial output disabled by SOE
//   scan path: registers read out through SYN and new bits shifted in
module tb_bac128;
  localparam int N = 128;

  logic clk = 0, sin = 0;
  logic cs0_n = 1, cs1_n = 1, wr_n = 1, rd_n = 1;
  logic [2:0] addr = 0;
  logic [7:0] d_in = 0;
  logic [7:0] d_out0, d_out1, c_out0, c_out1, c_in0, c_in1;
  logic d_oe0, d_oe1, c_oe0, c_oe1, sout0, sout1, sout_oe0, sout_oe1, syn0, syn1;

  // chip 0: first in the data path (master in 256-bit mode)
  bac128 u_c0 (.clk, .sin(sin), .sout(sout0), .sout_oe(sout_oe0),
               .cs_n(cs0_n), .wr_n, .rd_n, .addr, .d_in, .d_out(d_out0), .d_oe(d_oe0),
               .c_in(c_in0), .c_out(c_out0), .c_oe(c_oe0), .syn(syn0));
  // chip 1: fed from chip 0's serial output (slave in 256-bit mode)
  bac128 u_c1 (.clk, .sin(sout0), .sout(sout1), .sout_oe(sout_oe1),
               .cs_n(cs1_n), .wr_n, .rd_n, .addr, .d_in, .d_out(d_out1), .d_oe(d_oe1),
               .c_in(c_in1), .c_out(c_out1), .c_oe(c_oe1), .syn(syn1));

  // cascade bus C0..C7, weakly pulled low when nobody drives it
  assign c_in0 = c_oe1 ? c_out1 : (c_oe0 ? c_out0 : 8'h00);
  assign c_in1 = c_oe0 ? c_out0 : (c_oe1 ? c_out1 : 8'h00);

  int checks = 0, failures = 0;
  int cycles = 0;

  // ---------------------------------------------------------------- model
  logic [N-1:0] sr [2];
  logic [N-1:0] refr [2], mask [2];
  logic [7:0]   thre1 [2], thre2 [2];
  logic [4:0]   stat [2];      // {wsh, ms, prbs, soe, clr_n}
  int           valid [2];     // number of known shift-register bits
  logic         syn_m [2], inv_m [2];
  bit           check_dec [2];

  // mechanism counters
  int n_sync, n_reject, n_inv, n_masked, n_latency, n_st_read, n_sr_read, n_int_read;
  int n_casc_sync, n_casc_inv, n_casc_reject, n_busload, n_prbs, n_clear, n_soe_off, n_scan;

  function automatic int own_count(int c);
    return $countones(~(sr[c] ^ refr[c]) | mask[c]);
  endfunction

  // decision on the current register contents of chip c
  function automatic void decide(int c, output logic s, output logic i);
    int score, s1, s2;
    logic ms;
    ms    = stat[c][3];
    score = own_count(c) + (ms ? own_count(1 - c) : 0);
    s1    = score + int'(thre1[c]);
    s2    = score + int'(thre2[c]);
    i     = s2 < 256;
    s     = i || (ms ? s1 >= 256 : s1[7]);
  endfunction

  function automatic logic fb_model(int c);
    return own_count(c) % 2 == 1;
  endfunction

  // ---------------------------------------------------------------- bus
  task automatic sel(int c, logic v);
    if (c == 0) cs0_n = v; else cs1_n = v;
  endtask

  task automatic bus_write(int c, logic [2:0] a, logic [7:0] data);
    addr = a; d_in = data; sel(c, 0);
    #2 wr_n = 0;
    #2 wr_n = 1;
    #2 sel(c, 1);
    #2;
  endtask

  task automatic bus_read(int c, logic [2:0] a, output logic [7:0] data);
    addr = a; sel(c, 0);
    #2 rd_n = 0;
    #2 data = (c == 0) ? d_out0 : d_out1;
    checks++;
    if (((c == 0) ? d_oe0 : d_oe1) !== 1'b1) begin failures++; $display("FAIL read: bus not driven"); end
    rd_n = 1;
    #2 sel(c, 1);
    #2;
  endtask

  // status: {wsh, ms, prbs, soe, clr_n} -> D4..D0
  task automatic set_status(int c, logic clr_n, logic soe, logic prbs, logic ms, logic wsh);
    bus_write(c, 3'b011, {3'b000, wsh, ms, prbs, soe, clr_n});
    stat[c] = {wsh, ms, prbs, soe, clr_n};
    if (!clr_n) begin syn_m[c] = 0; inv_m[c] = 0; end
  endtask

  // write a 128-bit register; byte j carries bits 127-8j-k on D_k
  task automatic load_pattern(int c, logic [2:0] a, logic [N-1:0] v);
    logic [7:0] b;
    for (int j = 0; j < 16; j++) begin
      for (int k = 0; k < 8; k++) b[k] = v[127 - 8*j - k];
      bus_write(c, a, b);
    end
    if (a == 3'b000) refr[c] = v; else mask[c] = v;
  endtask

  task automatic load_thresholds(int c, logic [7:0] t1, logic [7:0] t2);
    bus_write(c, 3'b010, t1);
    bus_write(c, 3'b010, t2);
    thre1[c] = t1; thre2[c] = t2;
  endtask

  // ---------------------------------------------------------------- clock
  // One CLK period with SIN = b. Checks SOUT before the edge, and SYN/INV
  // after it, against the model.
  task automatic tick(logic b);
    logic s_exp [2], i_exp [2];
    logic ser0;
    sin = b;
    #1;
    ser0 = stat[0][2] ? fb_model(0) : sr[0][N-1];
    if (valid[0] >= N) begin
      checks++;
      if (sout0 !== ser0 || sout_oe0 !== stat[0][1]) begin
        failures++; $display("FAIL cycle %0d: SOUT=%0b exp %0b", cycles, sout0, ser0);
      end
    end
    for (int c = 0; c < 2; c++) begin
      decide(c, s_exp[c], i_exp[c]);
      check_dec[c] = valid[c] >= N && (!stat[c][3] || valid[1-c] >= N) && stat[c][0];
    end
    // model update at the rising edge
    for (int c = 0; c < 2; c++)
      if (stat[c][0]) begin syn_m[c] = s_exp[c]; inv_m[c] = i_exp[c]; end
    begin
      logic in0, in1;
      int v0;
      v0  = valid[0];
      in0 = stat[0][2] ? fb_model(0) : b;
      in1 = stat[1][2] ? fb_model(1) : ser0;
      if (!stat[0][4]) begin sr[0] = {sr[0][N-2:0], in0}; valid[0]++; end
      if (!stat[1][4]) begin
        sr[1] = {sr[1][N-2:0], in1};
        // a bit leaving chip 0 before chip 0 was filled is unknown
        if (!stat[1][2] && v0 < N) valid[1] = 0; else valid[1]++;
      end
    end
    #4 clk = 1;
    cycles++;
    #1;
    for (int c = 0; c < 2; c++)
      if (check_dec[c]) begin
        checks++;
        if (((c == 0) ? syn0 : syn1) !== syn_m[c]) begin
          failures++;
          $display("FAIL cycle %0d chip %0d: SYN=%0b exp %0b", cycles, c,
                   (c == 0) ? syn0 : syn1, syn_m[c]);
        end
      end
    // cascade pins: a slave drives its own count
    if (valid[1] >= N) checks++;
    if (valid[1] >= N && (c_oe1 !== !stat[1][3] || (c_oe1 && int'(c_out1) != own_count(1)))) begin
      failures++; $display("FAIL cycle %0d: cascade pins", cycles);
    end
    #4 clk = 0;
    #1;
  endtask

  // read the status register of chip 0 while SYN is high; INVOUT must agree
  task automatic check_status_read(int c);
    logic [7:0] st;
    bus_read(c, 3'b011, st);
    n_st_read++;
    checks++;
    if (st !== {5'b0, 1'b0, inv_m[c], syn_m[c]}) begin
      failures++; $display("FAIL status read %b exp syn=%0b inv=%0b", st, syn_m[c], inv_m[c]);
    end
  endtask

  // send a 128-bit register image so that it ends aligned: bit 127 first
  task automatic send_word(logic [N-1:0] v, output int first_cycle);
    first_cycle = cycles + 1;
    for (int i = N - 1; i >= 0; i--) tick(v[i]);
  endtask

  task automatic send_random(int n);
    for (int i = 0; i < n; i++) tick(1'($urandom));
  endtask

  function automatic logic [N-1:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [N-1:0] flip_bits(logic [N-1:0] v, int n, logic [N-1:0] keep);
    int done = 0;
    while (done < n) begin
      int p = $urandom_range(0, N - 1);
      if (!keep[p]) begin v[p] = !v[p]; keep[p] = 1; done++; end
    end
    return v;
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- test
  initial begin
    logic [N-1:0] w, w2, m, wm_;
    logic [7:0] rd;
    int fc, tol, rise;

    valid[0] = 0; valid[1] = 0;
    syn_m[0] = 0; syn_m[1] = 0; inv_m[0] = 0; inv_m[1] = 0;
    #10;

    // ============ 128-bit correlation on chip 0 ============
    tol = 3;
    set_status(0, 1, 1, 0, 0, 0);
    set_status(1, 1, 1, 0, 0, 0);
    w = rand128();
    load_pattern(0, 3'b000, w);
    load_pattern(0, 3'b001, '0);
    load_thresholds(0, 8'(tol), 8'(255 - tol));
    load_pattern(1, 3'b000, rand128());
    load_pattern(1, 3'b001, '0);
    load_thresholds(1, 8'(tol), 8'(255 - tol));

    send_random(140);
    // exact word: SYN on the 129th edge counted from its first bit
    send_word(w, fc);
    checks++;
    if (syn0 !== 0) begin failures++; $display("FAIL SYN early"); end
    tick(1'($urandom));
    checks++;
    if (syn0 === 1'b1 && cycles - fc + 1 == 129) n_latency++;
    else begin failures++; $display("FAIL latency: syn=%0b at edge %0d", syn0, cycles - fc + 1); end
    check_status_read(0);
    if (syn_m[0]) n_sync++;

    // word with errors within the tolerance
    send_random(40);
    send_word(flip_bits(w, tol, '0), fc);
    tick(0);
    checks++;
    if (syn0 !== 1) begin failures++; $display("FAIL tolerated errors not detected"); end
    else n_sync++;
    // 1's counter and first shift-register byte over the bus
    bus_read(0, 3'b101, rd);
    n_int_read++;
    checks++;
    if (int'(rd) != own_count(0)) begin failures++; $display("FAIL INT read %0d exp %0d", rd, own_count(0)); end
    bus_read(0, 3'b100, rd);
    n_sr_read++;
    checks++;
    if (rd !== sr[0][7:0]) begin failures++; $display("FAIL shift read %h exp %h", rd, sr[0][7:0]); end

    // one error too many
    send_random(40);
    send_word(flip_bits(w, tol + 1, '0), fc);
    tick(0);
    checks++;
    if (syn0 !== 0) begin failures++; $display("FAIL too many errors accepted"); end
    else n_reject++;

    // inverted word with a few errors
    send_random(40);
    send_word(flip_bits(~w, 2, '0), fc);
    tick(1);
    checks++;
    if (syn0 !== 1 || inv_m[0] !== 1) begin failures++; $display("FAIL inverted word"); end
    else n_inv++;
    check_status_read(0);
    send_random(20);

    // ============ distributed sync word under a mask ============
    m = rand128() & rand128() | rand128() & rand128();
    tol = 2;
    load_pattern(0, 3'b001, m);
    load_thresholds(0, 8'(tol), 8'(255 - (tol + $countones(m))));
    send_random(30);
    wm_ = (w & ~m) | (rand128() & m);   // masked positions carry data
    send_word(flip_bits(wm_, tol, m), fc);
    tick(0);
    checks++;
    if (syn0 !== 1) begin failures++; $display("FAIL distributed word"); end
    else n_masked++;
    send_random(20);
    send_word(flip_bits(~wm_, 1, m), fc);
    tick(0);
    checks++;
    if (syn0 !== 1 || inv_m[0] !== 1) begin failures++; $display("FAIL inverted distributed word"); end
    else n_inv++;
    send_random(10);

    // ============ 256-bit cascade: chip 0 master, chip 1 slave ============
    tol = 5;
    w2 = rand128();
    set_status(0, 1, 1, 0, 1, 0);
    set_status(1, 1, 1, 0, 0, 0);
    load_pattern(0, 3'b001, '0);
    load_pattern(1, 3'b000, w2);
    load_pattern(1, 3'b001, '0);
    load_thresholds(0, 8'(tol), 8'(255 - tol));
    load_thresholds(1, 8'(tol), 8'(255 - tol));
    checks++;
    if (c_oe0 !== 0 || c_oe1 !== 1) begin failures++; $display("FAIL cascade drivers"); end
    send_random(260);
    // oldest half goes to the slave: send its image first
    send_word(flip_bits(w2, 2, '0), fc);
    send_word(flip_bits(w, 3, '0), fc);
    tick(0);
    checks++;
    if (syn0 !== 1 || inv_m[0] !== 0) begin failures++; $display("FAIL 256-bit sync"); end
    else n_casc_sync++;
    send_random(30);
    // master half right, slave half far off: no 256-bit sync
    send_word(rand128(), fc);
    send_word(w, fc);
    tick(0);
    checks++;
    if (syn0 !== 0) begin failures++; $display("FAIL 256-bit half word accepted"); end
    else n_casc_reject++;
    send_random(30);
    send_word(flip_bits(~w2, 1, '0), fc);
    send_word(flip_bits(~w, 2, '0), fc);
    tick(0);
    checks++;
    if (syn0 !== 1 || inv_m[0] !== 1) begin failures++; $display("FAIL 256-bit inverted"); end
    else n_casc_inv++;
    check_status_read(0);
    send_random(10);

    // ============ PRBS generation on chip 0 ============
    set_status(0, 0, 1, 0, 0, 1);            // WSH: load the register from the bus
    for (int j = 0; j < 16; j++) begin
      rd = 8'($urandom);
      bus_write(0, 3'b100, rd);
      for (int k = 0; k < 8; k++) sr[0][k*16 +: 16] = {sr[0][k*16 +: 15], rd[k]};
    end
    n_busload++;
    bus_read(0, 3'b100, rd);
    checks++;
    if (rd !== sr[0][7:0]) begin failures++; $display("FAIL bus-loaded read"); end
    tick(1);                                 // CLK ignored while WSH = 1
    // taps 128, 126, 101, 99 (bits 127, 125, 100, 98) selected by mask zeros
    m = '1;
    m[127] = 0; m[125] = 0; m[100] = 0; m[98] = 0;
    load_pattern(0, 3'b001, m);
    load_pattern(0, 3'b000, '1);
    set_status(0, 0, 1, 1, 0, 0);            // PRBS, SYN cleared
    valid[0] = N;
    for (int i = 0; i < 300; i++) begin
      tick(1'($urandom));                    // SIN is ignored
      n_prbs++;
      checks++;
      if (syn0 !== 0) begin failures++; $display("FAIL SYN not cleared in PRBS"); end
    end
    n_clear++;
    // serial output disable
    set_status(0, 0, 0, 1, 0, 0);
    checks++;
    if (sout_oe0 !== 0) begin failures++; $display("FAIL SOE"); end
    else n_soe_off++;

    // ============ scan path of chip 0 ============
    set_status(0, 1, 1, 0, 0, 0);
    w = rand128(); m = rand128();
    load_pattern(0, 3'b000, w);
    load_pattern(0, 3'b001, m);
    load_thresholds(0, 8'h5a, 8'hc3);
    set_status(0, 1, 0, 1, 1, 0);   // clr_n=1 soe=0 prbs=1 ms=1 wsh=0
    begin
      logic exp_chain [$];
      logic in_bits [$];
      // expected order at the scan output
      for (int p = 4; p >= 0; p--) exp_chain.push_back(stat[0][p]);
      for (int k = 7; k >= 0; k--) begin
        exp_chain.push_back(thre1[0][k]);
        exp_chain.push_back(thre2[0][k]);
      end
      for (int p = 0; p < 128; p++) exp_chain.push_back(mask[0][8*(15 - p%16) + (p/16)]);
      for (int p = 0; p < 128; p++) exp_chain.push_back(refr[0][8*(15 - p%16) + (p/16)]);
      addr = 3'b110; cs0_n = 0;
      #2;
      for (int p = 0; p < 2 * 277; p++) begin
        logic b, e;
        e = (p < 277) ? exp_chain[p] : in_bits[p - 277];
        checks++;
        if (syn0 !== e) begin failures++; $display("FAIL scan bit %0d: %0b exp %0b", p, syn0, e); end
        b = 1'($urandom);
        in_bits.push_back(b);
        d_in = {7'($urandom), b};
        #2 wr_n = 0;
        #2 wr_n = 1;
        #2;
        n_scan++;
      end
      cs0_n = 1;
      #2;
    end

    // ============ every mechanism seen ============
    begin
      int counts [16];
      string names [16];
      counts = '{n_sync, n_reject, n_inv, n_masked, n_latency, n_st_read, n_sr_read,
                 n_int_read, n_casc_sync, n_casc_inv, n_casc_reject, n_busload, n_prbs,
                 n_clear, n_soe_off, n_scan};
      names  = '{"sync", "reject", "inverted", "masked", "latency", "status read",
                 "shift read", "int read", "256 sync", "256 inverted", "256 reject",
                 "bus load", "prbs", "clear", "soe off", "scan"};
      for (int i = 0; i < 16; i++) begin
        $display("mechanism %-13s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
