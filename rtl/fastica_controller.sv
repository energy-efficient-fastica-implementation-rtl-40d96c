// fastica_controller: top-level sequencer of the FastICA engine.
//
// One run, started by a start pulse while idle:
//   INIT_W   write the initial weight matrix (identity: N unit vectors) into the
//            old weight matrix memory, one word per cycle
//   CENTER   centering unit          COV    covariance unit (streams into EVD)
//   EVD      eigenvalue decomposition WHITEN whitened data generator
//   then the fixed-point iteration loop:
//   ONEUNIT  four parallel one-units  GS     Gram-Schmidt orthonormalization
//   CONV     convergence check; converged or iteration limit -> SEPARATE,
//            otherwise
//   EARLY    early determination; stop -> SEPARATE, otherwise -> ONEUNIT
//   SEPARATE separated data generator, then back to IDLE with a done pulse.
// Each unit receives a one-cycle start pulse on the cycle after its phase is
// entered and reports with a one-cycle done pulse. The phase output selects
// which unit owns each memory port. early_stop tells whether the last run ended
// in the early determination unit. The order of the units and the three ways out
// of the loop follow the document; the identity start matrix and the
// pulse handshake are this design's choices.
module fastica_controller
  import fastica_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned WAW = $clog2(N * N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output phase_t         phase,
  output logic           busy,
  output logic           done,
  output logic           early_stop,
  output logic           unit_start,     // start pulse for the unit of phase
  output logic           conv_clear,
  input  logic           center_done,
  input  logic           cov_done,
  input  logic           evd_done,
  input  logic           whiten_done,
  input  logic           oneunit_done,
  input  logic           gs_done,
  input  logic           conv_done,
  input  logic           converged,
  input  logic           max_reached,
  input  logic           ed_done,
  input  logic           ed_stop,
  input  logic           sep_done,
  // OWMM write port used during INIT_W
  output logic           ow_en,
  output logic [WAW-1:0] ow_addr,
  output fp32_t          ow_wdata
);
  logic           launch;
  logic [WAW-1:0] a;

  assign busy       = (phase != PH_IDLE);
  assign unit_start = launch;
  assign ow_en      = (phase == PH_INIT_W);
  assign ow_addr    = a;
  assign ow_wdata   = (a / WAW'(N) == a % WAW'(N)) ? FP_ONE : FP_ZERO;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      launch     <= 1'b0;
      a          <= '0;
      done       <= 1'b0;
      early_stop <= 1'b0;
      conv_clear <= 1'b0;
    end else begin
      launch     <= 1'b0;
      done       <= 1'b0;
      conv_clear <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase <= PH_INIT_W; a <= '0; early_stop <= 1'b0; conv_clear <= 1'b1;
        end
        PH_INIT_W: begin
          a <= a + 1'b1;
          if (a == WAW'(N * N - 1)) begin phase <= PH_CENTER; launch <= 1'b1; end
        end
        PH_CENTER: if (center_done) begin phase <= PH_COV;     launch <= 1'b1; end
        PH_COV:    if (cov_done)    begin phase <= PH_EVD;     launch <= 1'b1; end
        PH_EVD:    if (evd_done)    begin phase <= PH_WHITEN;  launch <= 1'b1; end
        PH_WHITEN: if (whiten_done) begin phase <= PH_ONEUNIT; launch <= 1'b1; end
        PH_ONEUNIT: if (oneunit_done) begin phase <= PH_GS;    launch <= 1'b1; end
        PH_GS:     if (gs_done)     begin phase <= PH_CONV;    launch <= 1'b1; end
        PH_CONV: if (conv_done) begin
          launch <= 1'b1;
          phase  <= (converged || max_reached) ? PH_SEPARATE : PH_EARLY;
        end
        PH_EARLY: if (ed_done) begin
          launch <= 1'b1;
          if (ed_stop) begin
            phase      <= PH_SEPARATE;
            early_stop <= 1'b1;
          end else phase <= PH_ONEUNIT;
        end
        PH_SEPARATE: if (sep_done) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end
endmodule
