// tb_comparator: checks the 128 compare cells.
// First every cell is driven through the five rows of the cell's function
// table (mask 1 forces 1; otherwise 1 when data equals reference), then
// random 128-bit words are compared with a bit-by-bit model.
module tb_comparator;
  logic [127:0] s, r, m, cp;
  int checks = 0, failures = 0;

  comparator dut (.s, .r, .m, .cp);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp;
    // function-table rows applied to all cells at once
    for (int v = 0; v < 8; v++) begin
      m = {128{v[2]}}; r = {128{v[1]}}; s = {128{v[0]}};
      #1;
      exp = (v[2] || (v[1] == v[0])) ? '1 : '0;
      checks++;
      if (cp !== exp) begin failures++; $display("FAIL row m=%0b r=%0b s=%0b", v[2], v[1], v[0]); end
    end
    for (int i = 0; i < 300; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      r = {$urandom, $urandom, $urandom, $urandom};
      m = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int b = 0; b < 128; b++) exp[b] = m[b] ? 1'b1 : (s[b] == r[b]);
      checks++;
      if (cp !== exp) begin failures++; $display("FAIL random %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
