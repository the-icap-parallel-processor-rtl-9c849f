// parcos: the PARCOS parallel communications switch chip.
//
// A circuit switch for bit-serial links: 32 serial inputs reach 32 serial
// outputs through a 32 x 32 communication matrix of tree multiplexers, so any
// output can take any input and one input can be broadcast to many outputs.
// The matrix is steered by the Control Pattern Register (CPR). Up to 32
// connection patterns are kept in the Connection Pattern Cache (CPC); the ACU
// fills a pattern byte by byte (row chosen by the Row Select Register, byte
// = output port, value = input port) and switches the whole matrix to any
// stored pattern with one bus write. Because the matrix reads the CPR, not the
// CPC, patterns can be written while the matrix keeps its current one. This
// organisation is the original design's; the bus protocol details are described in
// parcos_ctrl.
//
// Interface: clk/rst_n; cs chip select; bus (acu_bus_t: address, data, WR1,
// WR2, RD, PR); rd_data/rd_oe read data; sin/sout serial data.
// Timing: bus operations take effect at the rising clock edge; a reswitch
// (WR2) or reload (PR) changes the paths in that same edge. sin -> sout is
// combinational.
module parcos
  import parcos_pkg::*;
#(
  parameter int unsigned N       = N_PORTS,
  parameter int unsigned N_WORDS = CPC_WORDS,
  localparam int unsigned SW = $clog2(N),
  localparam int unsigned RW = $clog2(N_WORDS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cs,
  input  acu_bus_t     bus,
  output data_t        rd_data,
  output logic         rd_oe,
  input  logic [N-1:0] sin,
  output logic [N-1:0] sout
);

  logic          cpc_we;
  logic [RW-1:0] cpc_row, word_row;
  logic [SW-1:0] cpc_col, cpc_wdata, cpc_rdata;
  logic          cpr_load;
  logic [SW-1:0] word [N];
  logic [SW-1:0] sel  [N];

  parcos_ctrl #(.N(N), .N_WORDS(N_WORDS)) u_ctrl (
    .clk, .rst_n, .cs, .bus,
    .cpc_we, .cpc_row, .cpc_col, .cpc_wdata, .cpc_rdata,
    .word_row, .cpr_load, .rd_data, .rd_oe
  );

  parcos_cpc #(.N(N), .N_WORDS(N_WORDS)) u_cpc (
    .clk, .we(cpc_we), .row(cpc_row), .col(cpc_col), .wdata(cpc_wdata),
    .rdata(cpc_rdata), .word_row, .word
  );

  parcos_cpr #(.N(N)) u_cpr (
    .clk, .rst_n, .load(cpr_load), .d(word), .q(sel)
  );

  parcos_comm_matrix #(.N(N)) u_matrix (
    .sin, .sel, .sout
  );

endmodule
