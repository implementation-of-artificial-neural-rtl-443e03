// weight_memory: register file holding the four weight matrices W1..W4.
//
// The source design reads W1[20][25], W2[20][20], W3[20][20] and W4[5][20]
// as inputs of its idle state; the trained values are produced off-chip and
// exported to the hardware. This design stores them in registers loaded one
// 8-bit word per clock through a write port, and presents every weight in
// parallel, since each layer is computed in one clock state.
//
// Address map (from ann_pkg): W1 at 0..499, W2 at 500..899, W3 at
// 900..1299, W4 at 1300..1399, each row-major, address = base + out*N_IN + in.
// A write with an address at or above N_WEIGHTS is ignored. Weights are not
// reset: they must be loaded before the first classification.
//
// Timing: a write (we, addr, data) sampled on a rising edge is visible on the
// outputs right after that edge.
module weight_memory
  import ann_pkg::*;
(
  input  logic                    clk,
  input  logic                    we,
  input  logic [WADDR_W-1:0]      addr,
  input  logic signed [W_W-1:0]   data,
  output logic signed [W_W-1:0]   w1 [N_HID][N_PIX],
  output logic signed [W_W-1:0]   w2 [N_HID][N_HID],
  output logic signed [W_W-1:0]   w3 [N_HID][N_HID],
  output logic signed [W_W-1:0]   w4 [N_CLS][N_HID]
);

  logic signed [W_W-1:0] mem [N_WEIGHTS];

  always_ff @(posedge clk) begin
    if (we && (32'(addr) < N_WEIGHTS)) mem[addr] <= data;
  end

  always_comb begin
    for (int o = 0; o < N_HID; o++) begin
      for (int i = 0; i < N_PIX; i++) w1[o][i] = mem[W1_BASE + o * N_PIX + i];
      for (int i = 0; i < N_HID; i++) w2[o][i] = mem[W2_BASE + o * N_HID + i];
      for (int i = 0; i < N_HID; i++) w3[o][i] = mem[W3_BASE + o * N_HID + i];
    end
    for (int o = 0; o < N_CLS; o++)
      for (int i = 0; i < N_HID; i++) w4[o][i] = mem[W4_BASE + o * N_HID + i];
  end

endmodule
