// tb_weight_memory: writes all 1400 weights with random values kept in a
// model here, then checks every element of W1..W4 against the model
// (address = base + out*N_IN + in), that writes with we low or an address
// beyond the last weight change nothing, and that a rewrite of single words
// lands where expected.
module tb_weight_memory;
  import ann_pkg::*;

  logic clk = 0, we = 0;
  logic [WADDR_W-1:0] addr = '0;
  logic signed [W_W-1:0] data = '0;
  logic signed [W_W-1:0] w1 [N_HID][N_PIX];
  logic signed [W_W-1:0] w2 [N_HID][N_HID];
  logic signed [W_W-1:0] w3 [N_HID][N_HID];
  logic signed [W_W-1:0] w4 [N_CLS][N_HID];

  weight_memory dut (.clk, .we, .addr, .data, .w1, .w2, .w3, .w4);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [W_W-1:0] model [N_WEIGHTS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic signed [W_W-1:0] d, input logic en);
    @(negedge clk);
    we = en; addr = WADDR_W'(a); data = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic compare_all();
    for (int o = 0; o < N_HID; o++) begin
      for (int i = 0; i < N_PIX; i++) begin
        checks++;
        if (w1[o][i] != model[o * 25 + i]) begin failures++; $display("w1[%0d][%0d]", o, i); end
      end
      for (int i = 0; i < N_HID; i++) begin
        checks += 2;
        if (w2[o][i] != model[500 + o * 20 + i]) begin failures++; $display("w2[%0d][%0d]", o, i); end
        if (w3[o][i] != model[900 + o * 20 + i]) begin failures++; $display("w3[%0d][%0d]", o, i); end
      end
    end
    for (int o = 0; o < N_CLS; o++)
      for (int i = 0; i < N_HID; i++) begin
        checks++;
        if (w4[o][i] != model[1300 + o * 20 + i]) begin failures++; $display("w4[%0d][%0d]", o, i); end
      end
  endtask

  initial begin
    for (int a = 0; a < 1400; a++) begin
      model[a] = W_W'($urandom);
      wr(a, model[a], 1'b1);
    end
    compare_all();
    // disabled writes and out-of-range addresses change nothing
    wr(17, ~model[17], 1'b0);
    for (int a = 1400; a < 2048; a += 97) wr(a, 8'sh55, 1'b1);
    compare_all();
    // single-word rewrites at each matrix boundary
    foreach (model[a]) if (a == 0 || a == 499 || a == 500 || a == 1299 || a == 1399) begin
      model[a] = W_W'($urandom);
      wr(a, model[a], 1'b1);
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
