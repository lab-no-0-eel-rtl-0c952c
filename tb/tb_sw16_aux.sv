// tb_sw16_aux: self-checking test of the auxiliary block (MAR and data-bus
// steering). Random strobes and data: the inbound bus must equal the
// external data only while RD_STR is high, the outbound bus must carry the
// RALU output when DB_DVR_EN is high and the inbound bus otherwise, and
// the MAR must load that internal bus on the rising edge when MAR_LD is
// high and hold otherwise.
//
// Source: The split bus checked is this design's replacement of the tri-state
// bus.
module tb_sw16_aux;
  logic        clk = 0, rst, db_dvr_en, mar_ld, rd_str;
  logic [15:0] ralu_out, ext_din, in_bus, ext_dout, addr, m_mar, ib;
  int checks = 0, failures = 0;

  sw16_aux dut (.clk, .rst, .db_dvr_en, .mar_ld, .rd_str, .ralu_out, .ext_din, .in_bus,
                .ext_dout, .addr);
  always #5 clk = ~clk;

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    rst = 1; db_dvr_en = 0; mar_ld = 0; rd_str = 0; ralu_out = 0; ext_din = 0;
    @(posedge clk); #1 rst = 0; m_mar = 0;
    check(addr == 16'h0000, "MAR reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      db_dvr_en = 1'($urandom); mar_ld = 1'($urandom); rd_str = 1'($urandom);
      ralu_out = 16'($urandom); ext_din = 16'($urandom);
      #1;
      ib = rd_str ? ext_din : 16'h0000;
      check(in_bus == ib, "inbound bus");
      check(ext_dout == (db_dvr_en ? ralu_out : ib), "outbound bus");
      @(posedge clk); #1;
      if (mar_ld) m_mar = db_dvr_en ? ralu_out : ib;
      check(addr == m_mar, $sformatf("MAR %h expected %h", addr, m_mar));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
