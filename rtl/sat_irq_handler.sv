// sat_irq_handler: interrupt handler and stage sequencer of the SAT.
//
// The DSP starts the SAT with a one-cycle `start` pulse carrying the buffer
// address of a control block. The handler then runs the control data
// loader, stage one summing, stage one thresholding and stage two in turn,
// each started by a one-cycle pulse and ending with its `done` pulse. The
// control field stop_after lets an operation end after stage one summing or
// after stage one thresholding, since each stage reports back to the
// handler. When the last stage is done the handler raises `irq` to the DSP
// and holds it until `irq_ack`. A `start` while busy is ignored (and
// flagged by an assertion in simulation). The order of
// the stages follows the SAT block diagram; the start/acknowledge handshake
// and the early stop are this design's choices.
//
// Timing: each start pulse is registered, one cycle after the event that
// causes it; `irq` rises the cycle after the last stage's `done`.
module sat_irq_handler
  import sat_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   irq_ack,
  input  stop_e  stop_after,
  input  logic   ld_done,
  input  logic   s1_done,
  input  logic   th_done,
  input  logic   s2_done,
  output logic   ld_start,
  output logic   s1_start,
  output logic   th_start,
  output logic   s2_start,
  output phase_e phase,
  output logic   busy,
  output logic   irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      irq      <= 1'b0;
      ld_start <= 1'b0;
      s1_start <= 1'b0;
      th_start <= 1'b0;
      s2_start <= 1'b0;
    end else begin
      ld_start <= 1'b0;
      s1_start <= 1'b0;
      th_start <= 1'b0;
      s2_start <= 1'b0;
      if (irq_ack) irq <= 1'b0;
      case (phase)
        PH_IDLE: if (start) begin
          phase    <= PH_LOAD;
          ld_start <= 1'b1;
        end
        PH_LOAD: if (ld_done) begin
          phase    <= PH_S1SUM;
          s1_start <= 1'b1;
        end
        PH_S1SUM: if (s1_done) begin
          if (stop_after == STOP_S1_SUM) begin
            phase <= PH_IDLE;
            irq   <= 1'b1;
          end else begin
            phase    <= PH_S1THR;
            th_start <= 1'b1;
          end
        end
        PH_S1THR: if (th_done) begin
          if (stop_after == STOP_S1_THRESH) begin
            phase <= PH_IDLE;
            irq   <= 1'b1;
          end else begin
            phase    <= PH_S2;
            s2_start <= 1'b1;
          end
        end
        PH_S2: if (s2_done) begin
          phase <= PH_IDLE;
          irq   <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

  // The DSP must not start a new operation while one is running.
  property p_no_start_when_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !start;
  endproperty
  a_no_start_when_busy: assert property (p_no_start_when_busy)
    else $error("SAT started while busy");

endmodule
