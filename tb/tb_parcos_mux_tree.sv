// tb_parcos_mux_tree: self-checking test of the 1-of-32 tree multiplexer.
// For every select value it applies one-hot, one-cold and random input words
// and checks y against bit c of the input, computed by shifting in the
// testbench. The block is combinational, so each check follows a 1 ns settle.
module tb_parcos_mux_tree;
  localparam int unsigned N = 32;

  logic [N-1:0] d;
  logic [4:0]   c;
  logic         y;
  int checks = 0, failures = 0;

  parcos_mux_tree #(.N(N)) dut (.d, .c, .y);

  task automatic check(input logic [N-1:0] dv, input logic [4:0] cv);
    logic exp;
    d = dv; c = cv;
    #1;
    exp = dv[cv];
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL d=%h c=%0d y=%b exp=%b", dv, cv, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      check(32'h1 << s, 5'(s));                 // selected input high
      check(~(32'h1 << s), 5'(s));              // selected input low, rest high
      for (int t = 0; t < N; t++)
        if (t != s) check(32'h1 << t, 5'(s));   // another input high
      for (int r = 0; r < 8; r++) check($urandom, 5'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
