// imem: instruction memory of one core (the imab/imdb side of a core).
//
// WORDS x 64-bit words, one PISA instruction per word, addressed by byte
// address (bits [2:0] ignored). Reads are synchronous: with en high the word at
// addr appears on rdata after the next rising clock edge; with en low rdata
// holds its last value, which lets the fetch stage stall. The source treats
// program memory as read-only at run time; the programming port (prog_we,
// prog_addr, prog_data) is this design's way of loading the program before
// the cores run and takes a word index. The size is not given by the source.
module imem #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] addr,
  output logic [63:0] rdata,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [63:0] prog_data
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [63:0] mem [WORDS];
  logic [AW-1:0] ra, wa;

  assign ra = addr[AW+2:3];
  assign wa = prog_addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (prog_we) mem[wa] <= prog_data;
    if (en)      rdata   <= mem[ra];
  end
endmodule
