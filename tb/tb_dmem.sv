// tb_dmem: checks the two-port data memory against a reference array.
// Random word and byte-enable writes go through the core port, random word
// writes through the host port; reads on both ports must return the
// reference contents one cycle after en.
`timescale 1ns/1ps
module tb_dmem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 64;
  logic        a_en, a_we, b_en, b_we;
  logic [3:0]  a_be;
  logic [31:0] a_addr, a_wdata, a_rdata, b_addr, b_wdata, b_rdata;
  logic [31:0] ref_mem [W];

  dmem #(.WORDS(W)) dut (.clk, .a_en, .a_we, .a_be, .a_addr, .a_wdata, .a_rdata,
                         .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; a_be = 0; a_addr = 0; a_wdata = 0;
    b_en = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    // initialise through the host port
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      ref_mem[i] = $urandom;
      b_en = 1; b_we = 1; b_addr = 32'(i * 4); b_wdata = ref_mem[i];
    end
    @(negedge clk);
    b_en = 0; b_we = 0;
    for (int k = 0; k < 400; k++) begin
      int i, j;
      i = $urandom_range(W - 1);
      j = $urandom_range(W - 1);
      @(negedge clk);
      a_en = 1; a_we = 1; a_be = 4'($urandom); a_addr = 32'(i * 4); a_wdata = $urandom;
      for (int b = 0; b < 4; b++)
        if (a_be[b]) ref_mem[i][8*b +: 8] = a_wdata[8*b +: 8];
      @(negedge clk);
      a_we = 0; a_addr = 32'(j * 4);
      b_en = 1; b_addr = 32'(i * 4);
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata !== ref_mem[j]) begin failures++; $display("FAIL port A word %0d", j); end
      if (b_rdata !== ref_mem[i]) begin failures++; $display("FAIL port B word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
