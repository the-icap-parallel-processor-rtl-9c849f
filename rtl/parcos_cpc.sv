// parcos_cpc: the Connection Pattern Cache, the on-chip control memory.
//
// N_WORDS control words, each holding N select bytes of $clog2(N) bits: byte
// j of a word names the input that output j takes. The ACU writes and reads
// single bytes at (row, col), where row comes from the Row Select Register and
// col is the bus address, i.e. the output port number; only the bytes of the
// links that change need be written. A second, whole-word read port presents
// one complete control word for loading into the Control Pattern Register in
// one step. The word/byte organisation and the sizes are the original design's; the
// chip uses six-transistor static cells, modelled here as a plain array that is
// not reset (its contents are undefined until written).
//
// Interface: we/row/col/wdata byte write on the rising clock edge; rdata is
// the byte at (row, col) combinationally; word is the word at word_row
// combinationally.
module parcos_cpc #(
  parameter int unsigned N       = 32,
  parameter int unsigned N_WORDS = 32,
  localparam int unsigned SW = $clog2(N),
  localparam int unsigned RW = $clog2(N_WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [RW-1:0] row,
  input  logic [SW-1:0] col,
  input  logic [SW-1:0] wdata,
  output logic [SW-1:0] rdata,
  input  logic [RW-1:0] word_row,
  output logic [SW-1:0] word [N]
);

  logic [N-1:0][SW-1:0] mem [N_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[row][col] <= wdata;
  end

  assign rdata = mem[row][col];

  always_comb begin
    for (int j = 0; j < N; j++) word[j] = mem[word_row][j];
  end

endmodule
