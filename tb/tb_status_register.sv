// tb_status_register: checks the mode bits, the read-back and the scan order.
// A write must load CLEAR, SOE, PRBS, M/S and WSH from D0..D4; a read must
// return SYNOUT, INVOUT and CLK on D0..D2 with zeros above; in scan mode the
// bits leave in the order WSH, M/S, PRBS, SOE, CLEAR.
module tb_status_register;
  import bac_pkg::*;
  logic clk = 0, test = 0, sci = 0, sco, synout, invout, clk_pin;
  logic [7:0] d_in = 0, rd_data;
  status_t st;
  int checks = 0, failures = 0;

  status_register dut (.clk, .test, .sci, .d_in, .synout, .invout, .clk_pin,
                       .st, .rd_data, .sco);

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
    logic [7:0] v;
    logic [4:0] in_bits;
    for (int i = 0; i < 40; i++) begin
      v = 8'($urandom);
      d_in = v; pulse();
      {synout, invout, clk_pin} = 3'($urandom);
      #1 checks++;
      if (st.clr_n !== v[0] || st.soe !== v[1] || st.prbs !== v[2] ||
          st.ms !== v[3] || st.wsh !== v[4]) begin
        failures++;
        $display("FAIL write %h: st=%b", v, st);
      end
      checks++;
      if (rd_data !== {5'b0, clk_pin, invout, synout}) begin
        failures++; $display("FAIL read %h", rd_data);
      end
    end
    test = 1;
    for (int p = 0; p < 5; p++) begin
      checks++;
      if (sco !== v[4-p]) begin failures++; $display("FAIL scan out %0d", p); end
      sci = 1'($urandom); in_bits[p] = sci; d_in = 8'($urandom);
      pulse();
    end
    #1 checks++;
    if (st !== status_t'({in_bits[0], in_bits[1], in_bits[2], in_bits[3], in_bits[4]})) begin
      failures++; $display("FAIL scan in: %b", st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
