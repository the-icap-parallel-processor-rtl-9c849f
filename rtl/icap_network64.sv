// icap_network64: the 64-input, 64-output connection network of the ICAP
// (intermediate) level, a 64 x 64 crossbar with broadcast built from eight
// 32 x 32 PARCOS chips in two columns.
//
// Column 1 (chips 0-3): chips 0 and 1 both receive network inputs 0-31, chips
// 2 and 3 both receive inputs 32-63, input i on pin i mod 32. Column 2 (chips
// 4-7, called column-2 chips 0-3 below): column-2 chip k drives network
// outputs 16k..16k+15 from its outputs 0-15; its outputs 16-31 are unused. Its
// input pins are interleaved: pin 2j takes output 16*(k mod 2)+j of the
// column-1 chip that sees inputs 0-31 (chip 0 for k<2, chip 1 otherwise) and
// pin 2j+1 takes the same output of the column-1 chip that sees inputs 32-63
// (chip 2 for k<2, chip 3 otherwise). Every network output thus owns one
// private line from each half of the inputs, so any output can reach any
// input whatever the others do (a non-blocking crossbar), and several outputs
// can share an input (broadcast).
//
// To connect network output n = 16k+o to network input s: program the
// column-1 chip c (c = s<32 ? (k<2 ? 0 : 1) : (k<2 ? 2 : 3)) so that its output
// 16*(k mod 2)+o selects s mod 32, and column-2 chip k so that its output o
// selects pin 2o + (s >= 32).
//
// The two columns of four chips, the chip numbering, the split of the inputs,
// the 16 outputs per column-2 chip and the pins drawn between the columns
// follow the original design's network drawing; the drawing shows only a few of the
// inter-column wires, and the interleaving rule above is the pattern those
// wires follow, extended to all of them. How the ACU addresses one chip of
// eight is not described: here every chip has its own select line, cs[7:0],
// and several may be selected for one write (for instance to reswitch all
// chips at once).
//
// Interface: clk/rst_n; cs[i] selects chip i (0-3 column 1, 4-7 column 2);
// bus is shared; rd_data[i]/rd_oe[i] are chip i's read data. net_in/net_out
// are the serial links (net_in from the processors' serial outputs, net_out
// to their serial inputs).
// Timing: as for one chip; a serial bit crosses two chips combinationally.
module icap_network64
  import parcos_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   cs,
  input  acu_bus_t     bus,
  output data_t        rd_data [8],
  output logic [7:0]   rd_oe,
  input  logic [63:0]  net_in,
  output logic [63:0]  net_out
);

  localparam int unsigned N = 32;

  logic [N-1:0] c1_in  [4];
  logic [N-1:0] c1_out [4];
  logic [N-1:0] c2_in  [4];
  logic [N-1:0] c2_out [4];

  // Column 1
  for (genvar c = 0; c < 4; c++) begin : g_col1
    assign c1_in[c] = (c < 2) ? net_in[31:0] : net_in[63:32];

    parcos u_chip (
      .clk, .rst_n, .cs(cs[c]), .bus,
      .rd_data(rd_data[c]), .rd_oe(rd_oe[c]),
      .sin(c1_in[c]), .sout(c1_out[c])
    );
  end

  // Column 2
  for (genvar k = 0; k < 4; k++) begin : g_col2
    localparam int LO = (k < 2) ? 0 : 1;   // column-1 chip seeing inputs 0-31
    localparam int HI = (k < 2) ? 2 : 3;   // column-1 chip seeing inputs 32-63
    for (genvar j = 0; j < 16; j++) begin : g_pin
      assign c2_in[k][2*j]   = c1_out[LO][16*(k%2)+j];
      assign c2_in[k][2*j+1] = c1_out[HI][16*(k%2)+j];
    end

    parcos u_chip (
      .clk, .rst_n, .cs(cs[4+k]), .bus,
      .rd_data(rd_data[4+k]), .rd_oe(rd_oe[4+k]),
      .sin(c2_in[k]), .sout(c2_out[k])
    );

    assign net_out[16*k +: 16] = c2_out[k][15:0];
  end

endmodule
