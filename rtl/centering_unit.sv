// centering_unit: removes the mean of each channel in place (Block 1 of the
// preprocessing unit).
//
// For each of the N_CH channels the unit reads the N_SMP samples (IN_W-bit
// two's complement, sign-extended in a 32-bit data-memory word) one per cycle and
// accumulates them; the mean is the sum shifted right by log2(N_SMP) bits
// (arithmetic shift, so it rounds toward minus infinity) instead of a divider.
// It then reads every sample again and writes back x - mean as an OUT_W-bit
// value, sign-extended to 32 bits, two cycles per sample (read, then write).
// Data-memory address = channel * N_SMP + sample, synchronous read with one
// cycle latency. start is a one-cycle pulse; done pulses for one cycle at the
// end. Timing: N_CH * (N_SMP + 1 + 2 * N_SMP) + 1 cycles. The accumulate,
// shift-by-8 and subtract structure and the 12/18-bit widths follow the
// document; the memory schedule is this design's.
module centering_unit
  import fastica_pkg::*;
#(
  parameter int unsigned N_CH  = 8,
  parameter int unsigned N_SMP = 256,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 18,
  localparam int unsigned AW   = $clog2(N_CH * N_SMP),
  localparam int unsigned SW   = $clog2(N_SMP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata
);
  typedef enum logic [2:0] {IDLE, ACC, ACC_LAST, SUB_RD, SUB_WR} state_t;
  state_t state;

  logic [$clog2(N_CH+1)-1:0]  ch;
  logic [SW:0]                idx;      // sample being issued
  logic                       rd_vld;   // a read issued last cycle
  logic signed [IN_W+SW-1:0]  sum;
  logic signed [IN_W-1:0]     mean;
  logic signed [IN_W-1:0]     sample;
  logic signed [OUT_W-1:0]    centered;

  assign sample   = mem_rdata[IN_W-1:0];
  assign mean     = IN_W'(sum >>> SW);
  assign centered = OUT_W'(sample) - OUT_W'(mean);

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = AW'(ch * N_SMP + idx[SW-1:0]);
    mem_wdata = 32'(centered);
    unique case (state)
      ACC:    mem_en = 1'b1;
      SUB_RD: mem_en = 1'b1;
      SUB_WR: begin mem_en = 1'b1; mem_we = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      ch     <= '0;
      idx    <= '0;
      rd_vld <= 1'b0;
      sum    <= '0;
      done   <= 1'b0;
    end else begin
      done   <= 1'b0;
      rd_vld <= (state == ACC);
      if (rd_vld) sum <= sum + (IN_W+SW)'(sample);
      unique case (state)
        IDLE: if (start) begin
          state <= ACC; ch <= '0; idx <= '0; sum <= '0;
        end
        ACC: begin
          if (idx == (SW+1)'(N_SMP - 1)) state <= ACC_LAST;
          idx <= idx + 1'b1;
        end
        ACC_LAST: begin   // last sample accumulated this cycle
          state <= SUB_RD;
          idx   <= '0;
        end
        SUB_RD: state <= SUB_WR;
        SUB_WR: begin
          if (idx == (SW+1)'(N_SMP - 1)) begin
            idx <= '0;
            sum <= '0;
            if (ch == ($bits(ch))'(N_CH - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              ch    <= ch + 1'b1;
              state <= ACC;
            end
          end else begin
            idx   <= idx + 1'b1;
            state <= SUB_RD;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
