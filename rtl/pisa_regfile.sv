// pisa_regfile: the 32 x 32-bit general register file of one core.
//
// Two combinational read ports and one write port. Register 0 always reads
// zero. A write in the current cycle is forwarded to a read of the same
// register in that cycle, so the write-back stage needs no separate bypass.
// The controller-facing save/restore of the balancing scheme is done by
// software through ordinary loads and stores, so no extra port is needed.
// Reset clears every register (reset value not given by the source; chosen
// here so that a two-state simulator sees defined values).
module pisa_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra_addr,
  output logic [31:0] ra_data,
  input  logic [4:0]  rb_addr,
  output logic [31:0] rb_data,
  input  logic        w_en,
  input  logic [4:0]  w_addr,
  input  logic [31:0] w_data
);
  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (w_en && w_addr != 5'd0) begin
      regs[w_addr] <= w_data;
    end
  end

  always_comb begin
    if (ra_addr == 5'd0)                 ra_data = '0;
    else if (w_en && w_addr == ra_addr)  ra_data = w_data;
    else                                 ra_data = regs[ra_addr];
    if (rb_addr == 5'd0)                 rb_data = '0;
    else if (w_en && w_addr == rb_addr)  rb_data = w_data;
    else                                 rb_data = regs[rb_addr];
  end
endmodule
