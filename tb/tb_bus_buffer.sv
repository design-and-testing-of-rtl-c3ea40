// tb_bus_buffer: exhaustive check of the data-bus direction table.
// All eight CS/WR/RD combinations are applied with random internal data.
// CS high -> neither direction; WR low -> write (pins not driven); WR high
// and RD low -> read (internal data driven on the pins); otherwise neither.
module tb_bus_buffer;
  logic cs_n, wr_n, rd_n, d_oe, write_en;
  logic [7:0] int_bus, d_out;
  int checks = 0, failures = 0;

  bus_buffer dut (.cs_n, .wr_n, .rd_n, .int_bus, .write_en, .d_out, .d_oe);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ew, er;
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 8; v++) begin
        {cs_n, wr_n, rd_n} = 3'(v);
        int_bus = 8'($urandom);
        #1;
        ew = (cs_n == 0) && (wr_n == 0);
        er = (cs_n == 0) && (wr_n == 1) && (rd_n == 0);
        checks++;
        if (d_oe !== er || write_en !== ew || (er && d_out !== int_bus)) begin
          failures++;
          $display("FAIL cs=%0b wr=%0b rd=%0b: write=%0b oe=%0b", cs_n, wr_n, rd_n, write_en, d_oe);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
