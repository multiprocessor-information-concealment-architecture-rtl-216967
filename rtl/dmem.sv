// dmem: data memory of one core (the dmab/dmdb side of a core).
//
// WORDS x 32-bit words, byte addressed, with two synchronous ports. Port A
// belongs to the core: with en high it reads the word at addr (data after the
// next rising edge) and, with we high, writes the bytes selected by be.
// Port B is a host port used to place the key, the data, the SBOX tables and
// to read results; it has the same timing. In the balancing scheme the data
// memory of the second core holds the complemented key (and, for DES, the
// complemented data; for AES the inverted and transposed SBOX) -- that is
// memory content, not hardware. The host port and the size are this design's
// choices. If both ports write the same word in one cycle port A wins.
module dmem #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  // port A: core
  input  logic        a_en,
  input  logic        a_we,
  input  logic [3:0]  a_be,
  input  logic [31:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  // port B: host
  input  logic        b_en,
  input  logic        b_we,
  input  logic [31:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] ia, ib;

  assign ia = a_addr[AW+1:2];
  assign ib = b_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[ib] <= b_wdata;
    if (a_en && a_we) begin
      for (int i = 0; i < 4; i++)
        if (a_be[i]) mem[ia][8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (a_en) a_rdata <= mem[ia];
    if (b_en) b_rdata <= mem[ib];
  end
endmodule
