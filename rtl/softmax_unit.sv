// softmax_unit: softmax over N logits and the winning class, in two clock
// cycles.
//
// The source design ends with Q = Softmax(W4 * H3) and a one-hot prediction;
// how the exponential and the division are done in hardware is this design's
// own choice:
//   stage 1  Each logit is subtracted from the largest one, d = zmax - z >= 0,
//            so every exponential is e^-d in (0, 1]. e^-d = 2^-(d*log2 e);
//            with t = d*log2 e split into integer n and fraction f, the unit
//            uses 2^-t ~= (1 - f/2) * 2^-n, a straight-line fit whose error
//            is at most about 6 %. Results are E_FRAC-bit fractions (1.0 = 2^E_FRAC).
//            The index of the largest logit (lowest index on a tie) is found
//            here too.
//   stage 2  p = round(e * 2^OUT_FRAC / sum(e)) per class, OUT_W bits wide
//            with OUT_FRAC fraction bits (1.0 = 2^OUT_FRAC).
// Both stages are registered: out_valid follows in_valid by two cycles and
// prob/pred hold their value until the next result.
//
// Interface: z[N] signed logits with Z_FRAC fraction bits; prob[N] unsigned;
// pred one-hot, bit k set for class k+1.
module softmax_unit #(
  parameter int unsigned N        = 5,
  parameter int unsigned Z_W      = 29,
  parameter int unsigned Z_FRAC   = 13,
  parameter int unsigned OUT_W    = 5,
  parameter int unsigned OUT_FRAC = 4,
  parameter int unsigned E_FRAC   = 15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [Z_W-1:0]   z [N],
  output logic                    out_valid,
  output logic [OUT_W-1:0]        prob [N],
  output logic [N-1:0]            pred
);

  localparam int unsigned LOG2E_FRAC = 15;
  localparam logic [16:0] LOG2E = 17'd47274;  // round(log2(e) * 2^15)
  localparam int unsigned D_W   = Z_W + 1;     // zmax - z never overflows
  localparam int unsigned T_W   = D_W + 17;    // d * log2 e
  localparam int unsigned T_FR  = Z_FRAC + LOG2E_FRAC;
  localparam int unsigned EXP_W = E_FRAC + 1;  // holds 1.0
  localparam int unsigned SUM_W = EXP_W + $clog2(N);
  localparam int unsigned NUM_W = EXP_W + OUT_FRAC + 1;

  // ---------------- stage 1: max, exponentials, argmax ----------------
  logic [EXP_W-1:0] e_c [N];
  logic [N-1:0]     pred_c;

  always_comb begin
    logic signed [Z_W-1:0] zmax;
    logic [$clog2(N)-1:0]  imax;
    zmax = z[0];
    imax = 0;
    for (int k = 1; k < N; k++) begin
      if (z[k] > zmax) begin
        zmax = z[k];
        imax = $clog2(N)'(k);
      end
    end
    pred_c = '0;
    pred_c[imax] = 1'b1;

    for (int k = 0; k < N; k++) begin
      logic [D_W-1:0]    d;
      logic [T_W-1:0]    t;
      logic [T_W-1:0]    n;
      logic [E_FRAC-1:0] f;
      logic [EXP_W-1:0]  lin;
      d   = D_W'(D_W'(zmax) - D_W'(z[k]));
      t   = T_W'(d) * T_W'(LOG2E);
      n   = t >> T_FR;
      // top E_FRAC bits of the fraction of t (zero-padded when T_FR is short)
      f   = E_FRAC'((T_W'(t << (T_W - T_FR)) >> (T_W - E_FRAC)));
      lin = EXP_W'(1 << E_FRAC) - EXP_W'(f >> 1);
      if (n > T_W'(E_FRAC)) e_c[k] = '0;
      else                  e_c[k] = lin >> n;
    end
  end

  logic [EXP_W-1:0] e_q [N];
  logic [N-1:0]     pred_q;
  logic             v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      pred_q <= '0;
      for (int k = 0; k < N; k++) e_q[k] <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        pred_q <= pred_c;
        e_q    <= e_c;
      end
    end
  end

  // ---------------- stage 2: normalise ----------------
  logic [OUT_W-1:0] p_c [N];

  always_comb begin
    logic [SUM_W-1:0] sum;
    sum = '0;
    for (int k = 0; k < N; k++) sum += SUM_W'(e_q[k]);
    for (int k = 0; k < N; k++) begin
      logic [NUM_W+SUM_W-1:0] num;
      num = ((NUM_W+SUM_W)'(e_q[k]) << OUT_FRAC) + (NUM_W+SUM_W)'(sum >> 1);
      // sum >= 1.0 whenever the stage holds a result; guard the reset value
      if (sum == '0) p_c[k] = '0;
      else           p_c[k] = OUT_W'(num / (NUM_W+SUM_W)'(sum));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pred      <= '0;
      for (int k = 0; k < N; k++) prob[k] <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        pred <= pred_q;
        prob <= p_c;
      end
    end
  end

endmodule
