// tb_parcos_cpc: self-checking test of the Connection Pattern Cache.
// It fills all 32 words with random bytes, keeping a copy in the testbench,
// reads every byte back through the byte port and every word through the word
// port (the two ports addressing different words at the same time), then rewrites a few single bytes of some words (a partial update) and
// checks that only those bytes changed.
module tb_parcos_cpc;
  localparam int unsigned N = 32, W = 32;

  logic       clk = 0;
  logic       we;
  logic [4:0] row, col, wdata, rdata, word_row;
  logic [4:0] word [N];
  logic [4:0] model [W][N];
  int checks = 0, failures = 0;

  parcos_cpc #(.N(N), .N_WORDS(W)) dut (.clk, .we, .row, .col, .wdata, .rdata, .word_row, .word);

  always #5 clk = ~clk;

  task automatic wr(input int r, input int c, input logic [4:0] v);
    @(negedge clk);
    we = 1; row = 5'(r); col = 5'(c); wdata = v;
    @(negedge clk);
    we = 0;
    model[r][c] = v;
  endtask

  task automatic check_all();
    for (int r = 0; r < W; r++) begin
      word_row = 5'(r);
      for (int c = 0; c < N; c++) begin
        row = 5'(W - 1 - r); col = 5'(c);   // byte port looks at another word
        #1;
        checks += 2;
        if (rdata !== model[W-1-r][c]) begin
          failures++; $display("FAIL byte [%0d][%0d]=%0d exp %0d", W - 1 - r, c, rdata, model[W-1-r][c]);
        end
        if (word[c] !== model[r][c]) begin
          failures++; $display("FAIL word [%0d][%0d]=%0d exp %0d", r, c, word[c], model[r][c]);
        end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; row = 0; col = 0; wdata = 0; word_row = 0;
    for (int r = 0; r < W; r++)
      for (int c = 0; c < N; c++) wr(r, c, 5'($urandom));
    check_all();
    for (int k = 0; k < 40; k++) wr($urandom_range(W - 1), $urandom_range(N - 1), 5'($urandom));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
