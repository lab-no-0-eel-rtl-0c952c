// tb_sw16_reg_array: self-checking test of the 20x16 register array.
// Random writes (word and byte) and reads on both ports are compared with
// a model array. Writes happen on the rising edge; reads are asynchronous
// and are checked before each edge. Addresses 20..31 read as 0 and are
// never written.
//
// Source: The 20-register size is the lab's; the byte-write rule checked is
// this design's.
module tb_sw16_reg_array;
  logic        clk = 0, rst, we, wnb;
  logic [4:0]  a_addr, b_addr, c_addr;
  logic [15:0] c_data, a_data, b_data;
  logic [15:0] model [20];
  int checks = 0, failures = 0;

  sw16_reg_array dut (.clk, .rst, .a_addr, .b_addr, .c_addr, .we, .wnb, .c_data,
                      .a_data, .b_data);
  always #5 clk = ~clk;

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [15:0] rd(input logic [4:0] a);
    return (a < 20) ? model[a] : 16'h0000;
  endfunction

  initial begin
    rst = 1; we = 0; wnb = 1; a_addr = 0; b_addr = 0; c_addr = 0; c_data = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_addr = 5'($urandom); b_addr = 5'($urandom % 20); c_addr = 5'($urandom % 20);
      we = 1'($urandom); wnb = ($urandom % 4) != 0; c_data = 16'($urandom);
      #1;
      checks += 2;
      if (a_data !== rd(a_addr)) begin failures++; $display("FAIL A[%0d]=%h", a_addr, a_data); end
      if (b_data !== rd(b_addr)) begin failures++; $display("FAIL B[%0d]=%h", b_addr, b_data); end
      @(posedge clk);
      if (we) model[c_addr] = wnb ? c_data : {model[c_addr][15:8], c_data[7:0]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
