// tb_parcos: self-checking test of the whole PARCOS chip through its bus.
// It fills four control words (identity, reversal, broadcast of one input,
// random), reads them back, reswitches between them with single WR2 writes
// and checks that the matrix changes in the edge of the write (one bus cycle)
// and not before. It rewrites the active word while the matrix keeps running
// on the old pattern, then reloads it with PR; it updates a subset of a word's
// bytes; and it checks that strobes are ignored while the chip is not
// selected. Every routing check drives random serial words and compares each
// output with the input that the testbench's own copy of the active pattern
// names.
module tb_parcos;
  import parcos_pkg::*;
  localparam int unsigned N = 32;

  logic         clk = 0, rst_n, cs;
  acu_bus_t     bus;
  data_t        rd_data;
  logic         rd_oe;
  logic [N-1:0] sin, sout;

  logic [4:0] cpc_m [32][N];   // testbench copy of the cache
  logic [4:0] act_m [N];       // pattern the matrix should be using
  int checks = 0, failures = 0;
  int n_reswitch = 0, n_reload = 0, n_hidden = 0, n_partial = 0, n_broadcast = 0, n_read = 0;

  parcos dut (.clk, .rst_n, .cs, .bus, .rd_data, .rd_oe, .sin, .sout);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++; $display("FAIL %s", msg);
  endtask

  task automatic cycle(input acu_bus_t b, input logic sel = 1'b1);
    @(negedge clk);
    bus = b; cs = sel;
    @(negedge clk);
    bus = '0; cs = 0;
  endtask

  task automatic wr1(input int addr, input int data);
    automatic acu_bus_t b = '0;
    b.addr = addr_t'(addr); b.data = data_t'(data); b.wr1 = 1;
    cycle(b);
  endtask

  task automatic set_rsr(input int row);
    wr1(RSR_ADDR + row, row);
  endtask

  task automatic write_word(input int row, input logic [4:0] pat [N]);
    set_rsr(row);
    for (int j = 0; j < N; j++) begin
      wr1(j, pat[j]);
      cpc_m[row][j] = pat[j];
    end
  endtask

  task automatic check_routing(input string what);
    for (int v = 0; v < 4; v++) begin
      sin = $urandom;
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (sout[j] !== sin[act_m[j]])
          fail($sformatf("%s: out %0d expected input %0d", what, j, act_m[j]));
      end
    end
  endtask

  // Reswitch to a row with one WR2 write; the pattern must change exactly at
  // the clock edge of that write.
  task automatic reswitch(input int row);
    automatic acu_bus_t b = '0;
    b.wr2 = 1; b.data = data_t'(row); b.addr = RSR_ADDR;
    @(negedge clk);
    bus = b; cs = 1;
    check_routing("before reswitch edge");
    @(posedge clk);
    #1;
    act_m = cpc_m[row];
    check_routing("right after reswitch edge");
    @(negedge clk);
    bus = '0; cs = 0;
    n_reswitch++;
  endtask

  task automatic reload();
    automatic acu_bus_t b = '0;
    b.pr = 1;
    cycle(b);
    n_reload++;
  endtask

  task automatic read_check(input int addr, input int exp);
    @(negedge clk);
    bus = '0; bus.rd = 1; bus.addr = addr_t'(addr); cs = 1;
    #1;
    checks++;
    if (!rd_oe || rd_data != data_t'(exp)) fail($sformatf("read %0d: got %0d exp %0d", addr, rd_data, exp));
    @(negedge clk);
    bus = '0; cs = 0;
    n_read++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] pat [N];
    int row_now;
    rst_n = 0; cs = 0; bus = '0; sin = '0;
    #12 rst_n = 1;
    for (int j = 0; j < N; j++) act_m[j] = '0;
    check_routing("after reset");

    for (int j = 0; j < N; j++) pat[j] = 5'(j);          write_word(0, pat);
    for (int j = 0; j < N; j++) pat[j] = 5'(N - 1 - j);  write_word(1, pat);
    for (int j = 0; j < N; j++) pat[j] = 5'd7;           write_word(2, pat);
    for (int j = 0; j < N; j++) pat[j] = 5'($urandom);   write_word(3, pat);

    // The writes so far must not have touched the matrix.
    check_routing("after filling the cache");

    // Read back row 3 and the RSR.
    set_rsr(3);
    for (int j = 0; j < N; j++) read_check(j, cpc_m[3][j]);
    read_check(RSR_ADDR, 3);

    for (int r = 0; r < 4; r++) begin
      reswitch(r);
      if (r == 2) n_broadcast++;
      read_check(RSR_ADDR, r);
    end
    reswitch(1);

    // Rewrite the active word (row 1) while the matrix runs on it.
    set_rsr(1);
    for (int j = 0; j < N; j++) begin
      wr1(j, (j * 3) % N);
      cpc_m[1][j] = 5'((j * 3) % N);
    end
    check_routing("active word rewritten in the cache, CPR unchanged");
    n_hidden++;
    reload();
    act_m = cpc_m[1];
    check_routing("after reload");

    // Partial update of row 3: only a few links change.
    set_rsr(3);
    for (int k = 0; k < 5; k++) begin
      automatic int j = $urandom_range(N - 1);
      automatic int v = $urandom_range(N - 1);
      wr1(j, v);
      cpc_m[3][j] = 5'(v);
    end
    n_partial++;
    reswitch(3);
    check_routing("after partial update and reswitch");

    // Strobes with the chip not selected change nothing.
    row_now = 3;
    begin
      automatic acu_bus_t b = '0;
      b.wr2 = 1; b.data = 5'd0;
      cycle(b, 1'b0);
      b = '0; b.wr1 = 1; b.addr = 0; b.data = 5'(cpc_m[3][0] + 1);
      cycle(b, 1'b0);
    end
    check_routing("strobes while deselected");
    read_check(RSR_ADDR, row_now);
    read_check(0, cpc_m[3][0]);

    // Random reswitching among the four words.
    for (int t = 0; t < 20; t++) reswitch($urandom_range(3));

    checks += 6;
    if (n_reswitch == 0) fail("no reswitch");
    if (n_reload == 0) fail("no reload");
    if (n_hidden == 0) fail("no hidden rewrite");
    if (n_partial == 0) fail("no partial update");
    if (n_broadcast == 0) fail("no broadcast");
    if (n_read == 0) fail("no read");
    $display("reswitch=%0d reload=%0d hidden=%0d partial=%0d broadcast=%0d read=%0d",
             n_reswitch, n_reload, n_hidden, n_partial, n_broadcast, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
