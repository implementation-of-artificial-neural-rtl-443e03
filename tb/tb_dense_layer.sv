// tb_dense_layer: checks dense_layer against a dot product computed here
// with 64-bit integers, for the layer-1 shape (25 binary inputs, 20 outputs)
// and the hidden-layer shape (20 16-bit inputs, 20 outputs), with random
// weights including the extreme values -128 and +127.
module tb_dense_layer;
  localparam int NO = 20, NI1 = 25, NI2 = 20;
  localparam int ACC1 = 2 + 8 + $clog2(NI1);
  localparam int ACC2 = 16 + 8 + $clog2(NI2);

  logic signed [1:0]      x1 [NI1];
  logic signed [7:0]      w1 [NO][NI1];
  logic signed [ACC1-1:0] y1 [NO];
  logic signed [15:0]     x2 [NI2];
  logic signed [7:0]      w2 [NO][NI2];
  logic signed [ACC2-1:0] y2 [NO];

  dense_layer #(.N_OUT(NO), .N_IN(NI1), .IN_W(2), .W_W(8), .ACC_W(ACC1))
    dut1 (.x(x1), .w(w1), .y(y1));
  dense_layer #(.N_OUT(NO), .N_IN(NI2), .IN_W(16), .W_W(8), .ACC_W(ACC2))
    dut2 (.x(x2), .w(w2), .y(y2));

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [7:0] rnd_w(int mode);
    case (mode)
      0: return -8'sd128;
      1: return 8'sd127;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      automatic int mode = (t < 2) ? t : 2;  // two extreme cases first
      for (int i = 0; i < NI1; i++) x1[i] = (mode < 2) ? 2'sd1 : {1'b0, 1'($urandom)};
      for (int i = 0; i < NI2; i++)
        x2[i] = (mode == 0) ? 16'sh7fff : (mode == 1) ? -16'sh8000 : 16'($urandom);
      for (int o = 0; o < NO; o++) begin
        for (int i = 0; i < NI1; i++) w1[o][i] = rnd_w(mode);
        for (int i = 0; i < NI2; i++) w2[o][i] = rnd_w(mode);
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        automatic longint r1 = 0, r2 = 0;
        for (int i = 0; i < NI1; i++) r1 += longint'(x1[i]) * longint'(w1[o][i]);
        for (int i = 0; i < NI2; i++) r2 += longint'(x2[i]) * longint'(w2[o][i]);
        checks += 2;
        if (longint'(y1[o]) != r1) begin
          failures++;
          $display("L1 t=%0d o=%0d got %0d exp %0d", t, o, y1[o], r1);
        end
        if (longint'(y2[o]) != r2) begin
          failures++;
          $display("L2 t=%0d o=%0d got %0d exp %0d", t, o, y2[o], r2);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
