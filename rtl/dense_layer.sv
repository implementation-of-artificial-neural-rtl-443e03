// dense_layer: one fully connected layer without bias, y = W * x.
//
// Every output neuron is the dot product of one weight row with the input
// vector, computed combinationally with all N_OUT*N_IN products in parallel,
// so a whole layer is evaluated in a single clock state as in the source
// design. Bias terms are not used, matching its layer equations. Inputs and
// weights are two's-complement; the sum is exact in ACC_W bits (operand widths
// plus ceil(log2(N_IN)) growth bits), with fraction bits equal to the sum of
// the input and weight fraction bits. The caller registers y.
//
// Interface: x[N_IN] (IN_W bits each), w[N_OUT][N_IN] (W_W bits each),
// y[N_OUT] (ACC_W bits each). Purely combinational.
module dense_layer #(
  parameter int unsigned N_OUT = 20,
  parameter int unsigned N_IN  = 25,
  parameter int unsigned IN_W  = 2,
  parameter int unsigned W_W   = 8,
  parameter int unsigned ACC_W = IN_W + W_W + $clog2(N_IN)
) (
  input  logic signed [IN_W-1:0]  x [N_IN],
  input  logic signed [W_W-1:0]   w [N_OUT][N_IN],
  output logic signed [ACC_W-1:0] y [N_OUT]
);

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      logic signed [ACC_W-1:0] acc;
      acc = '0;
      for (int i = 0; i < N_IN; i++) begin
        acc += ACC_W'(x[i]) * ACC_W'(w[o][i]);
      end
      y[o] = acc;
    end
  end

endmodule
