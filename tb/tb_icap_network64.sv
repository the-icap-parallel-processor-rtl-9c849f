// tb_icap_network64: end-to-end test of the 64 x 64 ICAP network of eight
// PARCOS chips, at its full size.
// The testbench turns a 64-entry mapping (network output -> network input)
// into the select bytes of the two chip columns, writes them into one CPC row
// of each chip over the shared bus (one chip select at a time), and then
// reswitches all eight chips with a single WR2 write issued to every chip at
// once. Mappings used: identity, reversal, swapped halves, a broadcast of one
// input to all 64 outputs, and random many-to-one mappings. It also rewrites a
// stored row while the network runs on another one (the running pattern must
// not change), changes one link of the active pattern by rewriting its bytes
// and reloading with PR, and reads chip bytes back. Each mechanism is counted
// and one that never happened counts as a failure. Routing is checked by
// driving random 64-bit serial words and comparing every output with the
// input the mapping names.
module tb_icap_network64;
  import parcos_pkg::*;

  logic         clk = 0, rst_n;
  logic [7:0]   cs;
  acu_bus_t     bus;
  data_t        rd_data [8];
  logic [7:0]   rd_oe;
  logic [63:0]  net_in, net_out;

  int map_m [8][64];           // mapping stored in each row
  int act [64];                // mapping the network should be using
  logic [4:0] bytes_m [8][8][32]; // [row][chip][byte] as programmed
  int checks = 0, failures = 0;
  int n_reswitch = 0, n_broadcast = 0, n_cross = 0, n_hidden = 0, n_reload = 0, n_read = 0, n_permutation = 0;

  icap_network64 dut (.clk, .rst_n, .cs, .bus, .rd_data, .rd_oe, .net_in, .net_out);

  always #10 clk = ~clk;

  task automatic fail(input string msg);
    failures++; $display("FAIL %s", msg);
  endtask

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

  // Column-1 chip that carries input s towards column-2 chip k.
  function automatic int c1_chip(input int k, input int s);
    return (s < 32) ? ((k < 2) ? 0 : 1) : ((k < 2) ? 2 : 3);
  endfunction

  // Select bytes of every chip for one mapping.
  task automatic compile_map(input int m [64], output logic [4:0] b [8][32]);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 32; j++) b[i][j] = '0;
    for (int n = 0; n < 64; n++) begin
      int k = n / 16, o = n % 16, s = m[n];
      b[c1_chip(k, s)][16 * (k % 2) + o] = 5'(s % 32);
      b[4 + k][o] = 5'(2 * o + ((s >= 32) ? 1 : 0));
    end
  endtask

  task automatic program_row(input int row, input int m [64]);
    logic [4:0] b [8][32];
    compile_map(m, b);
    for (int i = 0; i < 8; i++) begin
      wr1(i, RSR_ADDR, row);
      for (int j = 0; j < 32; j++) wr1(i, j, b[i][j]);
    end
    bytes_m[row] = b;
    map_m[row] = m;
  endtask

  task automatic check_routing(input string what);
    for (int v = 0; v < 4; v++) begin
      net_in = {$urandom, $urandom};
      #1;
      for (int n = 0; n < 64; n++) begin
        checks++;
        if (net_out[n] !== net_in[act[n]])
          fail($sformatf("%s: output %0d expected input %0d", what, n, act[n]));
      end
    end
  endtask

  // One WR2 write to all eight chips; the network must switch in its edge.
  task automatic reswitch(input int row);
    automatic acu_bus_t b = '0;
    b.wr2 = 1; b.addr = RSR_ADDR; b.data = data_t'(row);
    @(negedge clk);
    bus = b; cs = 8'hFF;
    check_routing("before reswitch edge");
    @(posedge clk);
    #1;
    act = map_m[row];
    check_routing($sformatf("after reswitch to row %0d", row));
    @(negedge clk);
    bus = '0; cs = '0;
    n_reswitch++;
    for (int n = 0; n < 64; n++) if ((act[n] >= 32) != (n >= 32)) begin n_cross++; break; end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [64];
    rst_n = 0; cs = '0; bus = '0; net_in = '0;
    #25 rst_n = 1;

    // After reset every chip selects its input 0: every network output takes
    // column-2 pin 0 = column-1 line of input 0 of that half.
    for (int n = 0; n < 64; n++) act[n] = 0;
    check_routing("after reset");

    for (int n = 0; n < 64; n++) m[n] = n;                 program_row(0, m);
    for (int n = 0; n < 64; n++) m[n] = 63 - n;            program_row(1, m);
    for (int n = 0; n < 64; n++) m[n] = (n + 32) % 64;     program_row(2, m);
    for (int n = 0; n < 64; n++) m[n] = 45;                program_row(3, m);
    for (int r = 4; r < 8; r++) begin
      for (int n = 0; n < 64; n++) m[n] = $urandom_range(63);
      program_row(r, m);
    end
    check_routing("cache filled, pattern unchanged");

    for (int r = 0; r < 8; r++) begin
      reswitch(r);
      if (r < 3) n_permutation++;
      if (r == 3) n_broadcast++;
    end

    // Rewrite row 6 while row 5 is running.
    reswitch(5);
    for (int n = 0; n < 64; n++) m[n] = $urandom_range(63);
    program_row(6, m);
    check_routing("row 6 rewritten while row 5 runs");
    n_hidden++;
    reswitch(6);

    // Change one link of the running row 6 and reload it with PR.
    begin
      automatic int n = $urandom_range(63), s = (map_m[6][n] + 33) % 64;
      m = map_m[6];
      m[n] = s;
      program_row(6, m);     // leaves RSR = 6 in every chip
      check_routing("link changed in cache only");
      begin
        automatic acu_bus_t b = '0;
        b.pr = 1;
        bus_op(8'hFF, b);
      end
      act = map_m[6];
      check_routing("after PR reload");
      n_reload++;
    end

    // Read back row 6 of every chip.
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 32; j += 5) begin
        automatic acu_bus_t b = '0;
        b.rd = 1; b.addr = addr_t'(j);
        @(negedge clk);
        bus = b; cs = 8'(1 << i);
        #1;
        checks++;
        if (!rd_oe[i] || rd_data[i] != data_t'(bytes_m[6][i][j]))
          fail($sformatf("readback chip %0d byte %0d", i, j));
        n_read++;
        @(negedge clk);
        bus = '0; cs = '0;
      end

    for (int t = 0; t < 10; t++) reswitch($urandom_range(7));

    checks += 7;
    if (n_reswitch == 0)    fail("no reswitch");
    if (n_broadcast == 0)   fail("no broadcast");
    if (n_permutation == 0) fail("no permutation");
    if (n_cross == 0)       fail("no connection across halves");
    if (n_hidden == 0)      fail("no rewrite while running");
    if (n_reload == 0)      fail("no reload");
    if (n_read == 0)        fail("no readback");
    $display("reswitch=%0d broadcast=%0d permutation=%0d cross=%0d hidden=%0d reload=%0d read=%0d",
             n_reswitch, n_broadcast, n_permutation, n_cross, n_hidden, n_reload, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
