// tb_softmax_unit: checks softmax_unit against softmax computed here with
// real-valued exp(), allowing one output LSB (1/16) of error for the
// straight-line approximation of the exponential and the rounding. Also
// checks the one-hot prediction (lowest index on ties) and the two-cycle
// latency from in_valid to out_valid.
module tb_softmax_unit;
  localparam int N = 5, ZW = 29, ZF = 13, OW = 5, OF = 4;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [ZW-1:0] z [N];
  logic [OW-1:0] prob [N];
  logic [N-1:0]  pred;

  softmax_unit #(.N(N), .Z_W(ZW), .Z_FRAC(ZF), .OUT_W(OW), .OUT_FRAC(OF)) dut (
    .clk, .rst_n, .in_valid, .z, .out_valid, .prob, .pred
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_tie = 0, n_sure = 0, n_spread = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int scale);
    real ez [N];
    real s, zr, zmax;
    int  imax, lat;
    zmax = -1.0e30;
    imax = 0;
    for (int k = 0; k < N; k++) begin
      z[k] = ZW'($signed(32'($urandom) % (scale + 1)) - scale / 2);
    end
    if ($urandom % 4 == 0) z[3] = z[1];  // force a tie now and then
    for (int k = 0; k < N; k++) begin
      zr = real'(z[k]) / real'(1 << ZF);
      if (zr > zmax) begin zmax = zr; imax = k; end
    end
    s = 0.0;
    for (int k = 0; k < N; k++) begin
      ez[k] = $exp(real'(z[k]) / real'(1 << ZF) - zmax);
      s += ez[k];
    end
    @(negedge clk) in_valid = 1;
    @(negedge clk) in_valid = 0;
    lat = 1;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2) begin failures++; $display("latency %0d", lat); end
    for (int k = 0; k < N; k++) begin
      real ref_p = ez[k] / s * real'(1 << OF);
      real diff  = real'(prob[k]) - ref_p;
      checks++;
      if (diff > 1.0 || diff < -1.0) begin
        failures++;
        $display("k=%0d got %0d exp %f", k, prob[k], ref_p);
      end
    end
    checks++;
    if (pred != N'(1 << imax)) begin
      failures++;
      $display("pred %b exp index %0d", pred, imax);
    end
    if (z[3] == z[1] && imax == 1) n_tie++;
    if (ez[imax] / s > 0.97) n_sure++; else n_spread++;
  endtask

  initial begin
    for (int k = 0; k < N; k++) z[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) run_one((t % 2 != 0) ? (1 << ZF) * 4 : (1 << ZF) * 40);
    // the cases of interest all occurred
    checks += 3;
    if (n_tie == 0) failures++;
    if (n_sure == 0) failures++;
    if (n_spread == 0) failures++;
    $display("ties=%0d confident=%0d spread=%0d", n_tie, n_sure, n_spread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
