// tb_ann_top: end-to-end test of the digit classifier at its default sizes.
//
// Part 1 loads hand-built weights that make the network a template matcher
// for the five 5x5 digit patterns below (layer 1: +0.5 where the pattern has
// a background pixel, -1.0 where it has a stroke pixel; layers 2 and 3 pass
// neurons 0..4 through with weight 1.0; layer 4 scales them by 3.0), then
// classifies each pattern and checks the prediction and that the winning
// probability is at least 0.75.
// Part 2 loads random weights and random images and compares the logits
// (exactly) and the outputs against a fixed-point model of the network
// written here: prediction exact, probabilities within one LSB of softmax
// computed with real exp().
// Every run checks that done rises on the 10th edge after start is sampled.
// The test counts the mechanisms of the design and fails if one never
// occurs: waiting in S0, ReLU zeroing a negative sum, an activation clipped
// at its largest value, holding S8 while start stays high, the return to S0,
// reloading weights between runs, and each of the five classes predicted.
module tb_ann_top;
  import ann_pkg::*;

  logic clk = 0, reset = 0, start = 0, w_we = 0;
  logic [N_PIX-1:0] input_img = '0;
  logic [WADDR_W-1:0] w_addr = '0;
  logic signed [W_W-1:0] w_data = '0;
  logic [9:0] step;
  logic done;
  logic [N_CLS-1:0] final_output0;
  logic [OUT_W-1:0] final_output1, final_output2, final_output3, final_output4, final_output5;

  ann_top dut (.*);

  always #10 clk = ~clk;  // 20 ns clock

  int checks = 0, failures = 0;
  int n_idle = 0, n_relu_zero = 0, n_clip = 0, n_hold = 0, n_return = 0, n_reload = 0;
  int n_class [N_CLS];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digit patterns, rows top to bottom, 1 = background, 0 = stroke
  string pat [N_CLS] = '{
    "10011 11011 11011 11011 10001",  // 1
    "00001 11110 10001 01111 10000",  // 2
    "00001 11110 00001 11110 00000",  // 3
    "01101 01101 00000 11101 11101",  // 4
    "00000 01111 00001 11110 00001"   // 5
  };

  // column-major flattening: bit k is row k%5, column k/5
  function automatic logic [N_PIX-1:0] image_of(int d);
    logic [N_PIX-1:0] v;
    for (int k = 0; k < N_PIX; k++) v[k] = (pat[d][(k % 5) * 6 + k / 5] == "1");
    return v;
  endfunction

  logic signed [W_W-1:0] wm [N_WEIGHTS];  // model of the weights

  task automatic load_weights();
    for (int a = 0; a < N_WEIGHTS; a++) begin
      @(negedge clk);
      w_we = 1; w_addr = WADDR_W'(a); w_data = wm[a];
    end
    @(negedge clk) w_we = 0;
    n_reload++;
  endtask

  // fixed-point model: returns the logits (13 fraction bits)
  function automatic void model(input logic [N_PIX-1:0] img, output longint z [N_CLS]);
    longint a [N_HID], h [N_HID], acc;
    for (int o = 0; o < N_HID; o++) begin
      acc = 0;
      for (int i = 0; i < N_PIX; i++) acc += img[i] ? longint'(wm[W1_BASE + o * N_PIX + i]) : 0;
      a[o] = acc;
    end
    for (int o = 0; o < N_HID; o++) h[o] = (a[o] < 0) ? 0 : a[o] * 8;   // Q.5 -> Q.8
    for (int layer = 2; layer <= 3; layer++) begin
      for (int o = 0; o < N_HID; o++) begin
        if (h[o] > 32767) begin h[o] = 32767; n_clip++; end
        if (a[o] < 0) n_relu_zero++;
      end
      for (int o = 0; o < N_HID; o++) begin
        acc = 0;
        for (int i = 0; i < N_HID; i++)
          acc += h[i] * longint'(wm[(layer == 2 ? W2_BASE : W3_BASE) + o * N_HID + i]);
        a[o] = acc;
      end
      for (int o = 0; o < N_HID; o++) h[o] = (a[o] < 0) ? 0 : a[o] / 32;  // Q.13 -> Q.8
    end
    for (int o = 0; o < N_HID; o++) begin
      if (h[o] > 32767) begin h[o] = 32767; n_clip++; end
      if (a[o] < 0) n_relu_zero++;
    end
    for (int o = 0; o < N_CLS; o++) begin
      acc = 0;
      for (int i = 0; i < N_HID; i++) acc += h[i] * longint'(wm[W4_BASE + o * N_HID + i]);
      z[o] = acc;
    end
  endfunction

  task automatic classify(input logic [N_PIX-1:0] img, input int label, input int hold);
    longint z [N_CLS];
    real e [N_CLS], s, zmax;
    int imax, edges;
    logic [OUT_W-1:0] p [N_CLS];

    model(img, z);
    imax = 0;
    for (int k = 1; k < N_CLS; k++) if (z[k] > z[imax]) imax = k;
    zmax = real'(z[imax]) / 8192.0;
    s = 0.0;
    for (int k = 0; k < N_CLS; k++) begin
      e[k] = $exp(real'(z[k]) / 8192.0 - zmax);
      s += e[k];
    end

    // idle a few clocks in S0 first
    repeat (1 + $urandom % 3) begin
      @(negedge clk);
      if (step == 10'h001 && !start) n_idle++;
    end
    @(negedge clk);
    input_img = img;
    start = 1;
    edges = 0;
    do begin
      @(posedge clk); #1;
      edges++;
      if (edges == 1) input_img = ~img;  // image is latched at the start edge
    end while (!done && edges < 20);
    checks++;
    if (edges != 10) begin failures++; $display("latency %0d edges", edges); end

    p = '{final_output1, final_output2, final_output3, final_output4, final_output5};
    for (int k = 0; k < N_CLS; k++) begin
      checks++;
      if (longint'(dut.h4p_q[k]) != z[k]) begin
        failures++;
        $display("logit %0d: got %0d expected %0d", k, dut.h4p_q[k], z[k]);
      end
    end
    checks++;
    if (final_output0 != N_CLS'(1 << imax)) begin
      failures++;
      $display("prediction %b expected class %0d", final_output0, imax + 1);
    end
    n_class[imax]++;
    for (int k = 0; k < N_CLS; k++) begin
      real r = e[k] / s * 16.0;
      checks++;
      if (real'(p[k]) - r > 1.0 || r - real'(p[k]) > 1.0) begin
        failures++;
        $display("prob %0d: got %0d expected %f", k, p[k], r);
      end
    end
    if (label >= 0) begin
      checks += 2;
      if (final_output0 != N_CLS'(1 << label)) begin
        failures++;
        $display("digit %0d classified as %b", label + 1, final_output0);
      end
      if (p[label] < 5'd12) begin
        failures++;
        $display("digit %0d probability %0d/16", label + 1, p[label]);
      end
    end

    // hold start high: the result must stay in S8
    repeat (hold) begin
      @(posedge clk); #1;
      checks++;
      if (step != 10'h100 || !done) failures++;
      else n_hold++;
    end
    @(negedge clk) start = 0;
    @(posedge clk); #1;
    checks++;
    if (step != 10'h001 || !done) begin failures++; $display("no return to S0"); end
    else n_return++;
  endtask

  initial begin
    foreach (n_class[k]) n_class[k] = 0;
    repeat (3) @(negedge clk);
    reset = 1;

    // ---- part 1: template weights, the five digits ----
    foreach (wm[a]) wm[a] = '0;
    for (int d = 0; d < N_CLS; d++) begin
      automatic logic [N_PIX-1:0] img = image_of(d);
      for (int i = 0; i < N_PIX; i++) wm[W1_BASE + d * N_PIX + i] = img[i] ? 8'sd16 : -8'sd32;
      wm[W2_BASE + d * N_HID + d] = 8'sd32;
      wm[W3_BASE + d * N_HID + d] = 8'sd32;
      wm[W4_BASE + d * N_HID + d] = 8'sd96;
    end
    // other layer-1 neurons get random weights; layer 2 ignores them
    for (int o = N_CLS; o < N_HID; o++)
      for (int i = 0; i < N_PIX; i++) wm[W1_BASE + o * N_PIX + i] = W_W'($urandom);
    load_weights();
    for (int d = 0; d < N_CLS; d++) classify(image_of(d), d, d);
    checks++;
    if (final_output0 != 5'b10000 || final_output5 < 5'd12) failures++;
    classify(image_of(0), 0, 2);
    checks++;
    if (final_output0 != 5'b00001 || final_output1 != 5'b10000) begin
      failures++;
      $display("digit 1: %b %0d", final_output0, final_output1);
    end

    // ---- part 2: random weights and images ----
    for (int set = 0; set < 12; set++) begin
      automatic int mag = (set % 3 == 0) ? 256 : (set % 3 == 1) ? 32 : 16;
      for (int a = 0; a < N_WEIGHTS; a++)
        wm[a] = W_W'(int'($urandom % mag) - mag / 2);
      load_weights();
      for (int r = 0; r < 15; r++) classify(N_PIX'($urandom), -1, r % 3);
    end

    $display("idle=%0d relu_zero=%0d clip=%0d hold=%0d return=%0d reload=%0d",
             n_idle, n_relu_zero, n_clip, n_hold, n_return, n_reload);
    $display("class counts %0d %0d %0d %0d %0d",
             n_class[0], n_class[1], n_class[2], n_class[3], n_class[4]);
    checks += 6 + N_CLS;
    if (n_idle == 0) failures++;
    if (n_relu_zero == 0) failures++;
    if (n_clip == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_return == 0) failures++;
    if (n_reload < 2) failures++;
    foreach (n_class[k]) if (n_class[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
