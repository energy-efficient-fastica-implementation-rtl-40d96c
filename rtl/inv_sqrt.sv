// inv_sqrt: floating-point inverse square root, y = 1 / sqrt(x).
//
// An initial approximation from a 32-entry table is refined by NR_STEPS
// Newton-Raphson steps y <- y * (1.5 - 0.5 * x * y * y), one step per cycle.
// Table: write x = m * 2^(2k) with m in [1, 4) (m = 1.f for an even unbiased
// exponent, 2 * 1.f for an odd one); the entry indexed by the exponent parity
// and the top four fraction bits holds 1/sqrt of the centre of that interval of
// m, a number in (0.5, 1) stored in single precision; the result exponent is
// then lowered by k. The table is good to about five bits, so three steps
// reach single precision. A zero or negative x gives 0.
// Interface: pulse start with x valid; done pulses NR_STEPS + 1 cycles later
// with y valid (held until the next start), or already one cycle later when x
// is zero or negative. The table-plus-Newton-Raphson
// structure follows the document's reference inverse square root; the table
// size, the step count and the zero result for x <= 0 are this design's
// choices.
module inv_sqrt
  import fastica_pkg::*;
#(
  parameter int unsigned NR_STEPS = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t x,
  output logic  busy,
  output logic  done,
  output fp32_t y
);
  // 1 / sqrt((1 + (i + 0.5) / 16) * (odd ? 2 : 1)), i = idx[3:0], odd = idx[4].
  function automatic fp32_t seed_tab(input logic [4:0] idx);
    case (idx)
      5'd0:  return 32'h3F7C1764;  5'd1:  return 32'h3F74C867;
      5'd2:  return 32'h3F6E133E;  5'd3:  return 32'h3F67E3ED;
      5'd4:  return 32'h3F6229ED;  5'd5:  return 32'h3F5CD76E;
      5'd6:  return 32'h3F57E0CF;  5'd7:  return 32'h3F533C2E;
      5'd8:  return 32'h3F4EE116;  5'd9:  return 32'h3F4AC83F;
      5'd10: return 32'h3F46EB5A;  5'd11: return 32'h3F4344E6;
      5'd12: return 32'h3F3FD012;  5'd13: return 32'h3F3C889F;
      5'd14: return 32'h3F396ACE;  5'd15: return 32'h3F36734A;
      5'd16: return 32'h3F32416A;  5'd17: return 32'h3F2D166C;
      5'd18: return 32'h3F285835;  5'd19: return 32'h3F23F8A2;
      5'd20: return 32'h3F1FEC04;  5'd21: return 32'h3F1C2896;
      5'd22: return 32'h3F18A61F;  5'd23: return 32'h3F155DA2;
      5'd24: return 32'h3F124925;  5'd25: return 32'h3F0F6381;
      5'd26: return 32'h3F0CA83F;  5'd27: return 32'h3F0A137D;
      5'd28: return 32'h3F07A1D2;  5'd29: return 32'h3F05503E;
      5'd30: return 32'h3F031C1A;  default: return 32'h3F01030A;
    endcase
  endfunction

  fp32_t xr, seed, nr;
  int    eu, k;
  logic [$clog2(NR_STEPS+1)-1:0] step;

  always_comb begin
    eu   = int'(x[30:23]) - 127;
    k    = eu >>> 1;
    seed = seed_tab({eu[0], x[22:19]});
    seed = {1'b0, 8'(126 - k), seed[22:0]};
    nr   = fp_mul(y, fp_sub(FP_1P5, fp_mul(fp_scale2(xr, -1), fp_mul(y, y))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      y    <= FP_ZERO;
      xr   <= FP_ZERO;
      step <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        xr   <= x;
        step <= '0;
        if (x[31] || fp_is_zero(x)) begin
          y    <= FP_ZERO;
          done <= 1'b1;
        end else begin
          y    <= seed;
          busy <= 1'b1;
        end
      end else if (busy) begin
        y    <= nr;
        step <= step + 1'b1;
        if (step == ($bits(step))'(NR_STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
