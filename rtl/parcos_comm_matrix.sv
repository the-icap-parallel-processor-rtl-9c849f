// parcos_comm_matrix: the N x N communication matrix of the PARCOS chip.
//
// Every one of the N serial input lines runs in parallel to N tree
// multiplexers, one per output; output j takes input sel[j]. Since any number
// of outputs may name the same input, one input can be broadcast to all
// outputs at once. This structure is the original design's. The select words come
// from the Control Pattern Register.
//
// Interface: sin[N-1:0] inputs, sel[N] 5-bit selects (one per output),
// sout[N-1:0] outputs.
// Timing: combinational; the chip's data path carries no clock.
module parcos_comm_matrix #(
  parameter int unsigned N = 32,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic [N-1:0]  sin,
  input  logic [SW-1:0] sel [N],
  output logic [N-1:0]  sout
);

  for (genvar j = 0; j < N; j++) begin : g_mux
    parcos_mux_tree #(.N(N)) u_tree (
      .d (sin),
      .c (sel[j]),
      .y (sout[j])
    );
  end

endmodule
