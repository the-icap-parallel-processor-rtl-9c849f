// parcos_cpr: the Control Pattern Register, which holds the connection
// pattern the communication matrix is using.
//
// It is loaded with a whole control word (N selects) in one clock edge and
// otherwise keeps its contents, so a control word in the cache can be
// rewritten while the matrix goes on using the old pattern; only a load
// switches the matrix over. This decoupling is the original design's. Reset, which
// the original design does not describe, clears every select to 0 (all outputs then
// take input 0).
//
// Interface: load with d[N] on the rising edge of clk; q[N] drives the
// matrix. Asynchronous active-low reset.
module parcos_cpr #(
  parameter int unsigned N = 32,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [SW-1:0] d [N],
  output logic [SW-1:0] q [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) q[j] <= '0;
    end else if (load) begin
      q <= d;
    end
  end

endmodule
