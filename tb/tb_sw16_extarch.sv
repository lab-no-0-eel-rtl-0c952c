// tb_sw16_extarch: self-checking test of the external architecture
// (decoder, ROM and RAM byte lanes, input and output ports). It replays the
// lab's external-architecture test: read the input port at 0xFF33, write
// 0xBEEF to RAM at 0x0800 and read it back, read ROM at 0x0010/0x0011
// (the same word, the low address bit is ignored), write the output port at
// 0xFFBA. Then random RAM writes/reads and ROM reads against a model.
// Strobes change on the falling edge; writes take effect on the rising
// edge; reads are combinational.
//
// Source: The test sequence replays the lab's external-architecture test
// addresses and data.
module tb_sw16_extarch;
  import sw16_pkg::*;
  logic        clk = 0, rst, rd_str, wr_str;
  logic [15:0] addr, data_out, data_in, inport, outport;
  logic [15:0] model [512];
  bit          known [512];
  int checks = 0, failures = 0;

  sw16_extarch dut (.clk, .rst, .addr, .data_out, .data_in, .rd_str, .wr_str, .inport, .outport);
  always #5 clk = ~clk;

  initial begin #2_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); addr = a; data_out = d; wr_str = 1; rd_str = 0;
    @(posedge clk); #1 wr_str = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); addr = a; rd_str = 1; wr_str = 0; #1 d = data_in;
    @(posedge clk); #1 rd_str = 0;
  endtask

  initial begin
    logic [15:0] d;
    rst = 1; rd_str = 0; wr_str = 0; addr = 0; data_out = 0; inport = 16'hDEAD;
    @(posedge clk); #1 rst = 0;
    rd(16'hFF33, d); check(d == 16'hDEAD, $sformatf("input port read %h", d));
    wr(16'h0800, 16'hBEEF); rd(16'h0800, d); check(d == 16'hBEEF, "RAM write/read");
    rd(16'h0010, d); check(d == mulrom_word(10'h008), $sformatf("ROM 0010 = %h", d));
    rd(16'h0011, d); check(d == mulrom_word(10'h008), "ROM 0011 same word");
    wr(16'hFFBA, 16'h0666); check(outport == 16'h0666, "output port write");
    rd(16'h0FFE, d); d = 0;
    @(negedge clk); addr = 16'h1234; rd_str = 1; #1 check(data_in == 0, "unmapped read is 0");
    @(negedge clk); rd_str = 0; #1 check(data_in == 0, "no strobe, no data");
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] a;
      logic [8:0] i;
      i = 9'($urandom);
      a = 16'h0800 + 16'(2 * i) + 16'($urandom % 2);
      case ($urandom % 4)
        0, 1: begin d = 16'($urandom); wr(a, d); model[i] = d; known[i] = 1; end
        2: if (known[i]) begin
          rd(a, d); check(d == model[i], $sformatf("RAM %h = %h expected %h", a, d, model[i]));
        end
        default: begin
          logic [9:0] w;
          w = 10'($urandom);
          rd({5'b00000, w, 1'b0}, d);
          check(d == mulrom_word(w), "ROM read");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
