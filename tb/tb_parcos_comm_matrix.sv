// tb_parcos_comm_matrix: self-checking test of the 32 x 32 communication
// matrix. It applies identity, reversal, full broadcast of each input and
// random select patterns, drives random and walking-one input words, and
// checks every output against the input bit its select names.
module tb_parcos_comm_matrix;
  localparam int unsigned N = 32;

  logic [N-1:0] sin, sout;
  logic [4:0]   sel [N];
  int checks = 0, failures = 0;

  parcos_comm_matrix #(.N(N)) dut (.sin, .sel, .sout);

  task automatic apply_and_check();
    for (int v = 0; v < 4 + N; v++) begin
      sin = (v < 4) ? $urandom : (32'h1 << (v - 4));
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (sout[j] !== sin[sel[j]]) begin
          failures++;
          $display("FAIL out %0d sel %0d sin=%h", j, sel[j], sin);
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
    for (int j = 0; j < N; j++) sel[j] = 5'(j);
    apply_and_check();
    for (int j = 0; j < N; j++) sel[j] = 5'(N - 1 - j);
    apply_and_check();
    for (int s = 0; s < N; s++) begin          // broadcast input s to all outputs
      for (int j = 0; j < N; j++) sel[j] = 5'(s);
      apply_and_check();
    end
    for (int r = 0; r < 20; r++) begin
      for (int j = 0; j < N; j++) sel[j] = 5'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
