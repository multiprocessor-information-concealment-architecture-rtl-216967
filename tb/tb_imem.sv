// tb_imem: checks the instruction memory. Random 64-bit words are written
// through the programming port and read back through the fetch port by byte
// address; the read must appear one cycle after en, and rdata must hold its
// value while en is low.
`timescale 1ns/1ps
module tb_imem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 64;
  logic        en, prog_we;
  logic [31:0] addr, prog_addr;
  logic [63:0] rdata, prog_data;
  logic [63:0] ref_mem [W];

  imem #(.WORDS(W)) dut (.clk, .en, .addr, .rdata, .prog_we, .prog_addr, .prog_data);

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; prog_we = 0; addr = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < W; i++) begin
      ref_mem[i] = {$urandom, $urandom};
      @(negedge clk);
      prog_we = 1; prog_addr = i; prog_data = ref_mem[i];
    end
    @(negedge clk);
    prog_we = 0;
    for (int k = 0; k < 200; k++) begin
      int i;
      i = $urandom_range(W - 1);
      @(negedge clk);
      en = 1; addr = 32'(i * 8);
      @(negedge clk);
      en = 0; addr = 32'(((i + 1) % W) * 8);
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL read word %0d: %h vs %h", i, rdata, ref_mem[i]);
      end
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL hold word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
