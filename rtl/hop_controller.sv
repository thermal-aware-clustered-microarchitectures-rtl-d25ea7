// hop_controller: cluster hopping, rotating which clusters are powered.
//
// Only a subset of the clusters runs at any time; the others are Vdd-gated and
// dissipate neither dynamic nor leakage power. The active set follows a cycle
// of four patterns, advanced at the end of every control interval, so that heat
// is spread over the whole back end. The default pattern is 1dis-rot: one
// cluster is off and the off position moves clockwise each interval (cluster 0,
// 1, 2, 3 in turn, with clusters numbered clockwise). Any other four-step
// pattern can be given in PATTERN.
//
// A change of pattern is carried out in steps:
//   1. The next pattern is taken. Leaving clusters stop receiving micro-ops at
//      once; joining clusters are powered up (powered rises).
//   2. WAKE: after WAKE_CYCLES the joining clusters may receive micro-ops.
//   3. COPY: copy_start makes the copy generator save every register value
//      that lives only in a leaving cluster.
//   4. DRAIN: when every leaving cluster's queues are empty, and SETTLE_CYCLES
//      more have passed for values in flight, the leaving clusters are gated:
//      gate pulses for one cycle (clearing their queue counts, their data cache
//      and data TLB, whose contents are lost, and their entries in the register
//      location table) and powered falls.
// Gating at interval ends, the pattern, and copying before sleep follow the
// cluster-hopping scheme; the step order, the wake-up and settle delays and
// holding an interval end that arrives mid-change until the change is done are
// choices of this design. Reset starts in phase 0 with PATTERN[0] powered.
module hop_controller
  import tac_pkg::*;
#(
  parameter logic [3:0][NC-1:0] PATTERN = {4'b0111, 4'b1011, 4'b1101, 4'b1110},
  parameter int unsigned WAKE_CYCLES   = 64,
  parameter int unsigned SETTLE_CYCLES = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          interval_end,
  input  logic          copy_done,
  input  logic [NC-1:0] cluster_empty,
  output logic [NC-1:0] powered,
  output logic [NC-1:0] steer_mask,
  output logic [NC-1:0] leaving,
  output logic [NC-1:0] staying,
  output logic          copy_start,
  output logic [NC-1:0] gate,
  output logic [1:0]    phase,
  output logic          busy,
  output logic [15:0]   hops
);
  typedef enum logic [1:0] {S_RUN, S_WAKE, S_COPY, S_DRAIN} state_e;

  localparam int DW = $clog2(WAKE_CYCLES + SETTLE_CYCLES + 2);

  state_e         state;
  logic           pending;
  logic [DW-1:0]  delay;
  logic [NC-1:0]  nxt;

  assign nxt  = PATTERN[phase + 2'd1];
  assign busy = state != S_RUN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      phase      <= 2'd0;
      powered    <= PATTERN[0];
      steer_mask <= PATTERN[0];
      staying    <= PATTERN[0];
      leaving    <= '0;
      pending    <= 1'b0;
      delay      <= '0;
      copy_start <= 1'b0;
      gate       <= '0;
      hops       <= '0;
    end else begin
      copy_start <= 1'b0;
      gate       <= '0;
      if (interval_end && state != S_RUN) pending <= 1'b1;
      case (state)
        S_RUN: if (interval_end || pending) begin
          pending    <= 1'b0;
          phase      <= phase + 2'd1;
          leaving    <= powered & ~nxt;
          staying    <= nxt;
          powered    <= powered | nxt;
          steer_mask <= powered & nxt;
          delay      <= DW'(WAKE_CYCLES);
          state      <= S_WAKE;
        end
        S_WAKE: begin
          if (delay == '0) begin
            steer_mask <= staying;
            copy_start <= 1'b1;
            state      <= S_COPY;
          end else begin
            delay <= delay - 1'b1;
          end
        end
        S_COPY: if (copy_done) begin
          delay <= DW'(SETTLE_CYCLES);
          state <= S_DRAIN;
        end
        default: begin  // S_DRAIN
          if ((cluster_empty & leaving) != leaving) begin
            delay <= DW'(SETTLE_CYCLES);
          end else if (delay != '0) begin
            delay <= delay - 1'b1;
          end else begin
            gate    <= leaving;
            powered <= staying;
            leaving <= '0;
            hops    <= hops + 16'd1;
            state   <= S_RUN;
          end
        end
      endcase
    end
  end

  // Micro-ops only go to powered clusters; at least one cluster always runs.
  a_steer_powered: assert property (@(posedge clk) disable iff (!rst_n)
    (steer_mask & ~powered) == '0);
  a_one_active: assert property (@(posedge clk) disable iff (!rst_n) steer_mask != '0);

endmodule
