// cdl_ctrl: sequences one run of the loop nest on the custom layout.
//
// The host loads B into the single-memory (naive) layout and pulses start.
// The controller then distributes B into the custom layout (B is read by
// the loop, so its values must be in place before it runs), runs the
// kernel, and gathers A (written by the loop and live afterwards) back into
// the naive layout, where the host reads it. That only upward-exposed data
// is distributed and only live-out data gathered is the reference's rule;
// the three-phase sequence and the handshake are this design's.
//
// Interface: start/busy/done towards the host (done is a one-cycle pulse);
// start pulses and done pulses towards the reorganization engine and the
// kernel; phase tells the bank multiplexer who owns the banks.
//
// The assertions are switched off while rst_n is low; lint reports rst_n as
// used both asynchronously (the flops) and synchronously (the assertion
// disable), which is intended.
module cdl_ctrl
  import cdl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  output phase_e phase,
  output logic   reorg_start,
  output logic   reorg_gather,
  output arr_e   reorg_arr,
  input  logic   reorg_done,
  output logic   kern_start,
  input  logic   kern_done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      done        <= 1'b0;
      reorg_start <= 1'b0;
      kern_start  <= 1'b0;
    end else begin
      done        <= 1'b0;
      reorg_start <= 1'b0;
      kern_start  <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase       <= PH_DIST;
          reorg_start <= 1'b1;
        end
        PH_DIST: if (reorg_done) begin
          phase      <= PH_COMPUTE;
          kern_start <= 1'b1;
        end
        PH_COMPUTE: if (kern_done) begin
          phase       <= PH_GATHER;
          reorg_start <= 1'b1;
        end
        PH_GATHER: if (reorg_done) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy         = (phase != PH_IDLE);
  assign reorg_gather = (phase == PH_GATHER);
  assign reorg_arr    = (phase == PH_GATHER) ? ARR_A : ARR_B;

  // The engines are started only from the phase that owns the banks.
  a_reorg_phase: assert property (@(posedge clk) disable iff (!rst_n)
    reorg_start |-> (phase == PH_DIST || phase == PH_GATHER))
    else $error("reorganization started outside its phase");
  a_kern_phase: assert property (@(posedge clk) disable iff (!rst_n)
    kern_start |-> (phase == PH_COMPUTE))
    else $error("kernel started outside its phase");

endmodule
