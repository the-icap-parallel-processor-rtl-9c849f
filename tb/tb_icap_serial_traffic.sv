// tb_icap_serial_traffic: the 64-processor network carrying real serial
// traffic. Every processor sends 16-bit words bit-serially, MSB first, at
// 5 Mbit/s (200 ns per bit) on its serial output, all 64 at the same time;
// every processor's serial input samples the middle of each bit. After each
// word the testbench checks that every receiver got the word of the sender
// its current mapping names. The next mapping is written into the pattern
// cache over the bus while the words are in flight (the traffic must not
// notice), and a single WR2 to all eight chips switches to it between words.
// Mappings: a random permutation, one sender broadcast to all, the two halves
// swapped, and a random many-to-one mapping. The processors' serial ports are
// modelled here by shift registers; the bus clock runs at 50 MHz.
module tb_icap_serial_traffic;
  import parcos_pkg::*;

  localparam int BIT_NS = 200;     // 5 Mbit/s
  localparam int WORDS_PER_ROUND = 4;
  localparam int ROUNDS = 4;

  logic         clk = 0, rst_n;
  logic [7:0]   cs;
  acu_bus_t     bus;
  data_t        rd_data [8];
  logic [7:0]   rd_oe;
  logic [63:0]  net_in, net_out;

  int map_m [8][64];
  int act [64];
  int checks = 0, failures = 0, words_moved = 0, n_hidden = 0, n_reswitch = 0;

  icap_network64 dut (.clk, .rst_n, .cs, .bus, .rd_data, .rd_oe, .net_in, .net_out);

  always #10 clk = ~clk;

  task automatic bus_op(input logic [7:0] sel, input acu_bus_t b);
    @(negedge clk);
    bus = b; cs = sel;
    @(negedge clk);
    bus = '0; cs = '0;
  endtask

  task automatic wr1(input int chip, input int addr, input int data);
    automatic acu_bus_t b = '0;
    b.wr1 = 1; b.addr = addr_t'(addr); b.data = data_t'(data);
    bus_op(8'(1 << chip), b);
  endtask

  // Select bytes for a mapping (network output -> network input): the
  // column-1 chip on the path takes s mod 32 on line 16*(k mod 2)+o, the
  // column-2 chip k picks pin 2o (inputs 0-31) or 2o+1 (inputs 32-63).
  task automatic program_row(input int row, input int m [64]);
    logic [4:0] b [8][32];
    for (int i = 0; i < 8; i++) for (int j = 0; j < 32; j++) b[i][j] = '0;
    for (int n = 0; n < 64; n++) begin
      automatic int k = n / 16, o = n % 16, s = m[n];
      automatic int c = (s < 32) ? ((k < 2) ? 0 : 1) : ((k < 2) ? 2 : 3);
      b[c][16 * (k % 2) + o] = 5'(s % 32);
      b[4 + k][o] = 5'(2 * o + ((s >= 32) ? 1 : 0));
    end
    for (int i = 0; i < 8; i++) begin
      wr1(i, RSR_ADDR, row);
      for (int j = 0; j < 32; j++) wr1(i, j, b[i][j]);
    end
    map_m[row] = m;
  endtask

  task automatic reswitch(input int row);
    automatic acu_bus_t b = '0;
    b.wr2 = 1; b.addr = RSR_ADDR; b.data = data_t'(row);
    bus_op(8'hFF, b);
    act = map_m[row];
    n_reswitch++;
  endtask

  // All 64 processors send one word each and receive one word each.
  task automatic send_words(input int count);
    logic [15:0] tx [64];
    logic [15:0] rx [64];
    for (int w = 0; w < count; w++) begin
      for (int p = 0; p < 64; p++) tx[p] = 16'($urandom);
      for (int bit_i = 15; bit_i >= 0; bit_i--) begin
        for (int p = 0; p < 64; p++) net_in[p] = tx[p][bit_i];
        #(BIT_NS / 2);
        for (int p = 0; p < 64; p++) rx[p][bit_i] = net_out[p];
        #(BIT_NS / 2);
      end
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (rx[p] !== tx[act[p]]) begin
          failures++;
          $display("FAIL receiver %0d got %h, sender %0d sent %h", p, rx[p], act[p], tx[act[p]]);
        end
      end
      words_moved += 64;
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [ROUNDS][64];
    rst_n = 0; cs = '0; bus = '0; net_in = '0;
    #25 rst_n = 1;

    // Mapping 0: random permutation (shuffle).
    for (int n = 0; n < 64; n++) m[0][n] = n;
    for (int n = 63; n > 0; n--) begin
      automatic int r = $urandom_range(n);
      automatic int t = m[0][n];
      m[0][n] = m[0][r]; m[0][r] = t;
    end
    for (int n = 0; n < 64; n++) m[1][n] = 17;              // broadcast
    for (int n = 0; n < 64; n++) m[2][n] = (n + 32) % 64;   // halves swapped
    for (int n = 0; n < 64; n++) m[3][n] = $urandom_range(63);

    program_row(0, m[0]);
    reswitch(0);
    for (int r = 0; r < ROUNDS; r++) begin
      if (r + 1 < ROUNDS) begin
        fork
          send_words(WORDS_PER_ROUND);
          program_row(r + 1, m[r + 1]);
        join
        n_hidden++;
        reswitch(r + 1);
      end else begin
        send_words(WORDS_PER_ROUND);
      end
    end

    checks += 2;
    if (n_hidden == 0)   begin failures++; $display("FAIL no background programming"); end
    if (n_reswitch < 2)  begin failures++; $display("FAIL no reswitch under traffic"); end
    $display("words moved=%0d reswitches=%0d background programs=%0d", words_moved, n_reswitch, n_hidden);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
