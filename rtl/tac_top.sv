// tac_top: thermal-aware control of a four-cluster out-of-order back end.
//
// This is the logic that sits between the front end and the four back-end
// clusters of a clustered superscalar core and keeps the back end cool. It
// combines the two mechanisms that together give the best balance of leakage,
// temperature and speed: T-Thermal steering and 1dis-rot cluster hopping.
//   - interval_counter counts retired instructions and marks the end of every
//     10-million-instruction interval.
//   - sensor_sampler then reads the thermal sensors and keeps, per cluster, the
//     hottest reading for the next interval.
//   - hop_controller at the same moment moves to the next active-cluster
//     pattern: one cluster is Vdd-gated and the gated position rotates
//     clockwise. It wakes the joining cluster, has copy_uop_gen save the
//     register values that live only in the leaving cluster, waits for the
//     leaving cluster to drain and gates it.
//   - steering_unit sends up to 8 micro-ops per cycle, each to the best active
//     cluster with room, preferring a cluster more than a threshold colder and
//     otherwise the one holding the micro-op's source operands.
//   - cluster_resources (one per cluster) count free queue and register entries.
// The back ends themselves (queues, register files, data caches, the copy
// network) are outside; they receive the steered micro-ops and copy micro-ops,
// report freed entries on release_, and obey powered and gate.
//
// Timing: steering decisions are combinational from registered state within the
// cycle the micro-ops are presented; all state updates at the rising clock
// edge; rst_n is an asynchronous active-low reset.
module tac_top
  import tac_pkg::*;
#(
  parameter int unsigned WIDTH         = 8,
  parameter int unsigned INTERVAL      = 10_000_000,
  parameter int unsigned SPC           = 8,
  parameter policy_e     POLICY        = POL_T_THERMAL,
  parameter int unsigned THRESH        = 4,
  parameter logic [3:0][NC-1:0] PATTERN = {4'b0111, 4'b1011, 4'b1101, 4'b1110},
  parameter int unsigned WAKE_CYCLES   = 64,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned IQ_SIZE       = 20,
  parameter int unsigned FPQ_SIZE      = 20,
  parameter int unsigned CPQ_SIZE      = 20,
  parameter int unsigned MEMQ_SIZE     = 96,
  parameter int unsigned INT_REGS      = 160,
  parameter int unsigned FP_REGS       = 160
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // retirement and sensors
  input  logic [3:0]                         retired,
  input  logic [NC-1:0][SPC-1:0][TEMP_W-1:0] sensor,
  // front end to steering
  input  uop_t [WIDTH-1:0]                   uops,
  output logic [WIDTH-1:0]                   accept,
  output logic [WIDTH-1:0][CW-1:0]           cluster,
  output logic [WIDTH-1:0][1:0]              remote,
  output logic                               stall,
  // copy micro-ops for clusters going to sleep
  output logic                               copy_valid,
  input  logic                               copy_ready,
  output copy_uop_t                          copy,
  // back-end status and control
  input  res_delta_t [NC-1:0]                release_,
  output res_t [NC-1:0]                      free,
  output logic [NC-1:0]                      powered,
  output logic [NC-1:0]                      steer_mask,
  output logic [NC-1:0]                      gate,
  output logic [NC-1:0][TEMP_W-1:0]          temp,
  output logic                               interval_end,
  output logic                               hop_busy,
  output logic [1:0]                         phase,
  // statistics
  output logic [$clog2(INTERVAL+16)-1:0]     icount,
  output logic [15:0]                        intervals,
  output logic [15:0]                        hops,
  output logic                               copy_busy
);
  logic [NC-1:0]                  leaving, staying, empty, cpq_room;
  logic                           copy_start, copy_done;
  logic                           loc_set_valid;
  logic [LRW-1:0]                 loc_set_reg;
  logic [CW-1:0]                  loc_set_cluster;
  logic [NUM_LREGS-1:0][NC-1:0]   loc;
  res_delta_t [NC-1:0]            steer_alloc, alloc;

  interval_counter #(.INTERVAL(INTERVAL)) u_interval (
    .clk, .rst_n, .retired, .interval_end, .count(icount), .intervals
  );

  sensor_sampler #(.SPC(SPC)) u_sensors (
    .clk, .rst_n, .sample(interval_end), .sensor, .temp
  );

  hop_controller #(
    .PATTERN(PATTERN), .WAKE_CYCLES(WAKE_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_hop (
    .clk, .rst_n, .interval_end, .copy_done, .cluster_empty(empty),
    .powered, .steer_mask, .leaving, .staying, .copy_start, .gate, .phase,
    .busy(hop_busy), .hops
  );

  copy_uop_gen u_copy (
    .clk, .rst_n, .start(copy_start), .leaving, .staying, .loc, .cpq_room,
    .copy_valid, .copy_ready, .copy, .loc_set_valid, .loc_set_reg, .loc_set_cluster,
    .busy(copy_busy), .done(copy_done)
  );

  steering_unit #(
    .WIDTH(WIDTH), .POLICY(POLICY), .THRESH(THRESH), .IQ_SIZE(IQ_SIZE),
    .FPQ_SIZE(FPQ_SIZE), .CPQ_SIZE(CPQ_SIZE), .MEMQ_SIZE(MEMQ_SIZE),
    .RESET_LOC(PATTERN[0])
  ) u_steer (
    .clk, .rst_n, .uops, .steer_mask, .temp, .free,
    .loc_set_valid, .loc_set_reg, .loc_set_cluster, .loc_clear(gate),
    .accept, .cluster, .remote, .stall, .alloc(steer_alloc), .loc
  );

  for (genvar c = 0; c < NC; c++) begin : g_cl
    always_comb begin
      alloc[c] = steer_alloc[c];
      if (copy_valid && copy_ready && copy.src == CW'(c)) alloc[c].cpq = 4'd1;
    end
    assign cpq_room[c] = free[c].cpq != '0;

    cluster_resources #(
      .IQ_SIZE(IQ_SIZE), .FPQ_SIZE(FPQ_SIZE), .CPQ_SIZE(CPQ_SIZE),
      .MEMQ_SIZE(MEMQ_SIZE), .INT_REGS(INT_REGS), .FP_REGS(FP_REGS)
    ) u_res (
      .clk, .rst_n, .clear(gate[c]), .alloc(alloc[c]), .release_(release_[c]),
      .free(free[c]), .empty(empty[c])
    );
  end

endmodule
