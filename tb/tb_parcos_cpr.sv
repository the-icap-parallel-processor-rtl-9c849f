// tb_parcos_cpr: self-checking test of the Control Pattern Register.
// Checks reset to all-zero selects, that a load takes the whole word in one
// edge, and that the register holds its contents while the input word changes
// with load low.
module tb_parcos_cpr;
  localparam int unsigned N = 32;

  logic       clk = 0, rst_n, load;
  logic [4:0] d [N], q [N], exp [N];
  int checks = 0, failures = 0;

  parcos_cpr #(.N(N)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (q[j] !== exp[j]) begin
        failures++; $display("FAIL %s: q[%0d]=%0d exp %0d", what, j, q[j], exp[j]);
      end
    end
  endtask

  task automatic randomize_d();
    for (int j = 0; j < N; j++) d[j] = 5'($urandom);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; randomize_d();
    #12;
    for (int j = 0; j < N; j++) exp[j] = '0;
    compare("reset");
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      randomize_d(); load = 1;
      exp = d;
      @(negedge clk);
      load = 0;
      compare("load");
      for (int h = 0; h < 3; h++) begin        // input changes, no load
        randomize_d();
        @(negedge clk);
        compare("hold");
      end
    end
    rst_n = 0;
    #1;
    for (int j = 0; j < N; j++) exp[j] = '0;
    compare("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
