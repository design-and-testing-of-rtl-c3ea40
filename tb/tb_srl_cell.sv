// tb_srl_cell: checks the scan flip-flop against a one-line model.
// Random d, si and test values are applied; after each rising clock edge q
// must equal si when test was 1 and d otherwise.
module tb_srl_cell;
  logic clk = 0, test, d, si, q;
  int checks = 0, failures = 0;

  srl_cell dut (.clk, .test, .d, .si, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 200; i++) begin
      test = 1'($urandom); d = 1'($urandom); si = 1'($urandom);
      exp  = test ? si : d;
      #5 clk = 1;
      #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL step %0d: test=%0b d=%0b si=%0b q=%0b", i, test, d, si, q);
      end
      #4 clk = 0;
      // q holds while the clock is low and inputs move
      d = !d; si = !si;
      #1 checks++;
      if (q !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
