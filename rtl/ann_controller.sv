// ann_controller: the state machine that steps the classifier through its
// layers, one state per layer operation.
//
// States follow the source design's algorithmic state machine: S0 waits for
// start; S1..S7 alternate a layer's matrix-vector product (S1, S3, S5, S7)
// and its ReLU (S2, S4, S6), one clock each; S8 runs the softmax and raises
// done. The state is kept one-hot in the 10-bit step register (bit k is Sk,
// bit 9 is never set), as in the source design's waveform.
//
// This design's own choices: S8 lasts at least three clocks because the
// softmax unit is a two-stage pipeline: its first clock starts the softmax,
// the second ends with the result and done written, so done rises 10 rising
// edges after the edge that samples start in S0; the third and later clocks
// hold the result. done is cleared on leaving
// S0 and otherwise holds. The machine stays in S8 while start is still high
// and returns to S0 once start is low, so a held start runs one
// classification, not a loop.
//
// Interface: start is a level; step is one-hot; sm_start is the softmax
// input-valid pulse (first S8 clock); done is registered.
module ann_controller
  import ann_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic [9:0] step,
  output logic       sm_start,
  output logic       done
);

  step_e state, state_n;
  // clocks spent in S8: 0 starts the softmax, 1 ends with its result and
  // done written, 2 holds
  logic [1:0] s8_cnt;

  always_comb begin
    state_n = state;
    unique case (state)
      S0: if (start) state_n = S1;
      S1: state_n = S2;
      S2: state_n = S3;
      S3: state_n = S4;
      S4: state_n = S5;
      S5: state_n = S6;
      S6: state_n = S7;
      S7: state_n = S8;
      S8: if (s8_cnt == 2'd2 && !start) state_n = S0;
      default: state_n = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S0;
      s8_cnt   <= '0;
      done     <= 1'b0;
    end else begin
      state <= state_n;
      if (state == S0 && start) done <= 1'b0;
      if (state == S8) begin
        if (s8_cnt != 2'd2) s8_cnt <= s8_cnt + 2'd1;
        if (s8_cnt == 2'd1) done <= 1'b1;
      end else begin
        s8_cnt <= '0;
      end
    end
  end

  assign step     = state;
  assign sm_start = (state == S8) && (s8_cnt == 2'd0);

  // exactly one state bit is set at any time
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(step));

endmodule
