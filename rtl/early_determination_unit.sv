// early_determination_unit: stops the iteration early when the SAD value has
// stopped changing.
//
// DV1 = 0.001 x conv_threshold (one multiplier) and DV2 = |SAD_old - SAD_new|
// (one subtractor) are registered when eval pulses; one cycle later a
// comparator sets stop = (DV2 < DV1) and done pulses. stop = 1 sends the
// controller to the separated data generator, stop = 0 back to the four
// parallel one-units. The unit is only consulted when the convergence check
// has failed. Multiplier, subtractor, the two registers, the comparator and the
// 0.001 factor follow the document; taking the magnitude of the difference is
// this design's reading (SAD normally grows, so a signed difference would stop
// every run at the first check).
module early_determination_unit
  import fastica_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  eval,
  input  fp32_t conv_threshold,
  input  fp32_t sad_old,
  input  fp32_t sad_new,
  output logic  done,
  output logic  stop,
  output fp32_t dv1,
  output fp32_t dv2
);
  logic cmp_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv1 <= FP_ZERO;
      dv2 <= FP_ZERO;
      cmp_pending <= 1'b0;
      done <= 1'b0;
      stop <= 1'b0;
    end else begin
      cmp_pending <= eval;
      done        <= cmp_pending;
      if (eval) begin
        dv1 <= fp_mul(FP_MILLI, conv_threshold);
        dv2 <= fp_abs(fp_sub(sad_old, sad_new));
      end
      if (cmp_pending) stop <= fp_lt(dv2, dv1);
    end
  end
endmodule
