// parcos_ctrl: the Row Select Register and the read/write circuitry of the
// PARCOS chip.
//
// The ACU sees the chip as 64 locations. Addresses 0..N-1 are the bytes of the
// control word selected by the Row Select Register (RSR): the address is the
// output port, the data the input port it connects to. Any address with bit 5
// set is the RSR itself. The strobes are decoded as follows (a strobe counts
// only while cs is high, and at most one is high in a cycle):
//   WR1  write data to the addressed location (a CPC byte, or the RSR)
//   WR2  reswitch: RSR <= data and, in the same edge, CPR <= CPC[data]
//   RD   drive the addressed location (CPC byte or RSR) on rd_data
//   PR   pattern reload: CPR <= CPC[RSR], RSR unchanged
// The memory-mapped RSR, byte addressing by output port, and the single-write
// reswitch are the original design's. The strobe names come from the chip's
// organization diagram, which does not say what each does: the meanings above,
// the RSR address and the synchronous clocked bus are this design's choices.
//
// Interface: see the port list. cpc_col and cpc_wdata are the address and
// data lines passed straight to the cache. word_row tells the CPC which word
// to present to the CPR; cpr_load loads it at the next rising edge. rd_data
// is combinational, valid while rd_oe is high. RSR resets to 0.
module parcos_ctrl
  import parcos_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned N_WORDS = 32,
  localparam int unsigned SW = $clog2(N),
  localparam int unsigned RW = $clog2(N_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cs,
  input  acu_bus_t      bus,
  // CPC byte port
  output logic          cpc_we,
  output logic [RW-1:0] cpc_row,
  output logic [SW-1:0] cpc_col,
  output logic [SW-1:0] cpc_wdata,
  input  logic [SW-1:0] cpc_rdata,
  // CPC word port and CPR load
  output logic [RW-1:0] word_row,
  output logic          cpr_load,
  // read data to the data lines
  output data_t         rd_data,
  output logic          rd_oe
);

  logic [RW-1:0] rsr;
  logic          sel_rsr;

  assign sel_rsr = |(bus.addr & RSR_ADDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  rsr <= '0;
    else if (cs && (bus.wr2 || (bus.wr1 && sel_rsr))) rsr <= bus.data[RW-1:0];
  end

  assign cpc_we    = cs && bus.wr1 && !sel_rsr;
  assign cpc_row   = rsr;
  assign cpc_col   = bus.addr[SW-1:0];
  assign cpc_wdata = bus.data[SW-1:0];

  // On a reswitch the new row is on the data lines, so the CPR is loaded with
  // that row's word in the same edge that writes the RSR.
  assign word_row = (cs && bus.wr2) ? bus.data[RW-1:0] : rsr;
  assign cpr_load = cs && (bus.wr2 || bus.pr);

  assign rd_oe   = cs && bus.rd;
  assign rd_data = !rd_oe  ? '0
                 : sel_rsr ? data_t'(rsr)
                 :           data_t'(cpc_rdata);

  // Bus rule: one strobe at a time.
  a_one_strobe: assert property (@(posedge clk)
    cs |-> $onehot0({bus.wr1, bus.wr2, bus.rd, bus.pr}))
    else $error("parcos_ctrl: more than one strobe in a cycle");

endmodule
