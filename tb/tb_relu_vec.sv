// tb_relu_vec: checks relu_vec for negative inputs (zeroed), positive inputs
// rescaled from 13 to 8 fraction bits and from 5 to 8 fraction bits, and
// clipping at the largest 16-bit value, against values computed here.
module tb_relu_vec;
  localparam int N = 20;
  logic signed [28:0] xa [N];
  logic signed [15:0] ya [N];
  logic signed [14:0] xb [N];
  logic signed [15:0] yb [N];

  // hidden-layer shape: 29-bit Q.13 -> 16-bit Q.8
  relu_vec #(.N(N), .IN_W(29), .IN_FRAC(13), .OUT_W(16), .OUT_FRAC(8)) dut_a (.x(xa), .y(ya));
  // layer-1 shape: 15-bit Q.5 -> 16-bit Q.8
  relu_vec #(.N(N), .IN_W(15), .IN_FRAC(5), .OUT_W(16), .OUT_FRAC(8)) dut_b (.x(xb), .y(yb));

  int checks = 0, failures = 0;
  int n_zero = 0, n_clip = 0, n_pass = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_a(longint v);
    longint r;
    if (v < 0) return 0;
    r = v / 32;            // 13 -> 8 fraction bits, truncating (v >= 0)
    return (r > 32767) ? 32767 : r;
  endfunction
  function automatic longint ref_b(longint v);
    longint r;
    if (v < 0) return 0;
    r = v * 8;             // 5 -> 8 fraction bits
    return (r > 32767) ? 32767 : r;
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < N; k++) begin
        // mix of full-range values and small values near zero
        xa[k] = (k % 3 == 0) ? 29'($signed(12'($urandom))) : 29'($urandom);
        xb[k] = (k % 3 == 0) ? 15'($signed(10'($urandom))) : 15'($urandom);
      end
      #1;
      for (int k = 0; k < N; k++) begin
        automatic longint ea = ref_a(longint'(xa[k]));
        automatic longint eb = ref_b(longint'(xb[k]));
        checks += 2;
        if (longint'(ya[k]) != ea) begin
          failures++;
          $display("A x=%0d got %0d exp %0d", xa[k], ya[k], ea);
        end
        if (longint'(yb[k]) != eb) begin
          failures++;
          $display("B x=%0d got %0d exp %0d", xb[k], yb[k], eb);
        end
        if (xa[k] < 0) n_zero++;
        else if (ea == 32767) n_clip++;
        else n_pass++;
      end
      @(posedge clk);
    end
    // every case must have been exercised
    checks += 3;
    if (n_zero == 0) failures++;
    if (n_clip == 0) failures++;
    if (n_pass == 0) failures++;
    $display("zeroed=%0d clipped=%0d passed=%0d", n_zero, n_clip, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
