// parcos_pkg: sizes, types and the bus encoding shared by the PARCOS switch
// chip and the 64x64 ICAP network built from it.
//
// The chip switches 32 bit-serial inputs onto 32 bit-serial outputs. Each
// output has a 5-bit select ("byte") naming the input it takes; 32 such bytes
// form one 160-bit control word, and the Connection Pattern Cache holds 32
// control words. The ACU bus carries a 6-bit address and 5 data lines plus the
// four strobes WR1, WR2, RD and PR printed on the chip's organization diagram.
// The sizes follow the original chip. The meaning given to each strobe and the
// address of the Row Select Register (any address with bit 5 set) are this
// design's own choices; see parcos_ctrl.
package parcos_pkg;

  localparam int unsigned N_PORTS = 32;                 // serial inputs = outputs
  localparam int unsigned SEL_W   = $clog2(N_PORTS);    // 5 control bits per mux
  localparam int unsigned CPC_WORDS = 32;               // CPC control words
  localparam int unsigned ROW_W   = $clog2(CPC_WORDS);  // 5-bit RSR
  localparam int unsigned ADDR_W  = 6;                  // address lines
  localparam int unsigned DATA_W  = 5;                  // data lines

  typedef logic [SEL_W-1:0]  sel_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // One ACU bus cycle as seen at a chip's pins.
  typedef struct packed {
    addr_t addr;   // 0-31: CPC byte (output port) of the row in RSR; 32-63: RSR
    data_t data;   // write data
    logic  wr1;    // ordinary write: CPC byte or RSR
    logic  wr2;    // reswitch write: RSR <= data and CPR <= CPC[data]
    logic  rd;     // read the addressed CPC byte or RSR
    logic  pr;     // pattern reload: CPR <= CPC[RSR]
  } acu_bus_t;

  // Address of the Row Select Register (every address with bit 5 set decodes to it).
  localparam addr_t RSR_ADDR = addr_t'(32);

endpackage
