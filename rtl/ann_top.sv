// ann_top: classifier for 5x5 binary digit images, a fully connected
// 25-20-20-20-5 network evaluated one layer step per clock state.
//
// Datapath, as in the source design: H1 = ReLU(W1*img), H2 = ReLU(W2*H1),
// H3 = ReLU(W3*H2), Q = Softmax(W4*H3), with no bias terms. Each product is
// written to its own register (H1', H2', H3', H4') in the states S1, S3,
// S5, S7 and each ReLU result (H1, H2, H3) in S2, S4, S6; S8 runs the
// softmax. Every layer has its own fully parallel dense_layer instance, so a
// classification takes 10 clocks: done rises on the 10th rising edge after
// the edge that samples start=1 (200 ns at a 50 MHz clock).
//
// Pixel order: input_img[k] is the pixel in row k%5, column k/5 (counted
// from 0), the column-major order in which the 5x5 image is flattened to
// 25 inputs. A 1 is a background pixel and a 0 a stroke pixel in the data
// set the network was designed for; the hardware just feeds the bit value
// (0 or 1) to layer 1.
//
// Ports:
//   reset          active low (the design runs while reset = 1)
//   start          level; sampled in S0, which also latches input_img
//   w_we/w_addr/w_data  weight load port, see weight_memory
//   step[9:0]      one-hot controller state, bit k = Sk
//   done           high from the end of S8 until the next start
//   final_output0  one-hot prediction, bit k = digit k+1
//   final_output1..5  softmax probability of digits 1..5, unsigned with 4
//                  fraction bits (5'b10000 = 1.0)
// The number formats (8-bit weights, 16-bit activations, 5-bit outputs
// with 4 fraction bits), the load port and the reset polarity are this
// design's choices where the source design gives no numbers; see ann_pkg.
module ann_top
  import ann_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  start,
  input  logic [N_PIX-1:0]      input_img,
  input  logic                  w_we,
  input  logic [WADDR_W-1:0]    w_addr,
  input  logic signed [W_W-1:0] w_data,
  output logic [9:0]            step,
  output logic                  done,
  output logic [N_CLS-1:0]      final_output0,
  output logic [OUT_W-1:0]      final_output1,
  output logic [OUT_W-1:0]      final_output2,
  output logic [OUT_W-1:0]      final_output3,
  output logic [OUT_W-1:0]      final_output4,
  output logic [OUT_W-1:0]      final_output5
);

  logic rst_n;
  assign rst_n = reset;

  // ---------------- control ----------------
  logic sm_start;
  ann_controller u_ctrl (
    .clk, .rst_n, .start, .step, .sm_start, .done
  );

  // ---------------- weights ----------------
  logic signed [W_W-1:0] w1 [N_HID][N_PIX];
  logic signed [W_W-1:0] w2 [N_HID][N_HID];
  logic signed [W_W-1:0] w3 [N_HID][N_HID];
  logic signed [W_W-1:0] w4 [N_CLS][N_HID];

  weight_memory u_wmem (
    .clk, .we(w_we), .addr(w_addr), .data(w_data), .w1, .w2, .w3, .w4
  );

  // ---------------- registers of the datapath ----------------
  logic [N_PIX-1:0]         img_q;
  logic signed [ACC1_W-1:0] h1p_q [N_HID];
  logic signed [ACT_W-1:0]  h1_q  [N_HID];
  logic signed [ACCH_W-1:0] h2p_q [N_HID];
  logic signed [ACT_W-1:0]  h2_q  [N_HID];
  logic signed [ACCH_W-1:0] h3p_q [N_HID];
  logic signed [ACT_W-1:0]  h3_q  [N_HID];
  logic signed [ACCH_W-1:0] h4p_q [N_CLS];

  // ---------------- layer arithmetic ----------------
  logic signed [1:0]        img_v [N_PIX];
  logic signed [ACC1_W-1:0] h1p_c [N_HID];
  logic signed [ACT_W-1:0]  h1_c  [N_HID];
  logic signed [ACCH_W-1:0] h2p_c [N_HID];
  logic signed [ACT_W-1:0]  h2_c  [N_HID];
  logic signed [ACCH_W-1:0] h3p_c [N_HID];
  logic signed [ACT_W-1:0]  h3_c  [N_HID];
  logic signed [ACCH_W-1:0] h4p_c [N_CLS];

  always_comb
    for (int k = 0; k < N_PIX; k++) img_v[k] = {1'b0, img_q[k]};

  dense_layer #(.N_OUT(N_HID), .N_IN(N_PIX), .IN_W(2),     .W_W(W_W), .ACC_W(ACC1_W))
    u_l1 (.x(img_v), .w(w1), .y(h1p_c));
  relu_vec #(.N(N_HID), .IN_W(ACC1_W), .IN_FRAC(W_FRAC), .OUT_W(ACT_W), .OUT_FRAC(ACT_FRAC))
    u_r1 (.x(h1p_q), .y(h1_c));
  dense_layer #(.N_OUT(N_HID), .N_IN(N_HID), .IN_W(ACT_W), .W_W(W_W), .ACC_W(ACCH_W))
    u_l2 (.x(h1_q), .w(w2), .y(h2p_c));
  relu_vec #(.N(N_HID), .IN_W(ACCH_W), .IN_FRAC(ACT_FRAC + W_FRAC), .OUT_W(ACT_W), .OUT_FRAC(ACT_FRAC))
    u_r2 (.x(h2p_q), .y(h2_c));
  dense_layer #(.N_OUT(N_HID), .N_IN(N_HID), .IN_W(ACT_W), .W_W(W_W), .ACC_W(ACCH_W))
    u_l3 (.x(h2_q), .w(w3), .y(h3p_c));
  relu_vec #(.N(N_HID), .IN_W(ACCH_W), .IN_FRAC(ACT_FRAC + W_FRAC), .OUT_W(ACT_W), .OUT_FRAC(ACT_FRAC))
    u_r3 (.x(h3p_q), .y(h3_c));
  dense_layer #(.N_OUT(N_CLS), .N_IN(N_HID), .IN_W(ACT_W), .W_W(W_W), .ACC_W(ACCH_W))
    u_l4 (.x(h3_q), .w(w4), .y(h4p_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_q <= '0;
      for (int k = 0; k < N_HID; k++) begin
        h1p_q[k] <= '0; h1_q[k] <= '0;
        h2p_q[k] <= '0; h2_q[k] <= '0;
        h3p_q[k] <= '0; h3_q[k] <= '0;
      end
      for (int k = 0; k < N_CLS; k++) h4p_q[k] <= '0;
    end else begin
      if (step[0] && start) img_q <= input_img;  // S0
      if (step[1]) h1p_q <= h1p_c;                // S1
      if (step[2]) h1_q  <= h1_c;                 // S2
      if (step[3]) h2p_q <= h2p_c;                // S3
      if (step[4]) h2_q  <= h2_c;                 // S4
      if (step[5]) h3p_q <= h3p_c;                // S5
      if (step[6]) h3_q  <= h3_c;                 // S6
      if (step[7]) h4p_q <= h4p_c;                // S7
    end
  end

  // ---------------- output layer: softmax (S8) ----------------
  logic [OUT_W-1:0] prob [N_CLS];
  logic             sm_valid;

  softmax_unit #(.N(N_CLS), .Z_W(ACCH_W), .Z_FRAC(ACT_FRAC + W_FRAC),
                 .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_softmax (
    .clk, .rst_n, .in_valid(sm_start), .z(h4p_q),
    .out_valid(sm_valid), .prob, .pred(final_output0)
  );

  assign final_output1 = prob[0];
  assign final_output2 = prob[1];
  assign final_output3 = prob[2];
  assign final_output4 = prob[3];
  assign final_output5 = prob[4];

  // the softmax result is written on the same edge that raises done
  a_done_sync: assert property (@(posedge clk) disable iff (!rst_n)
                                $rose(done) |-> sm_valid);

endmodule
