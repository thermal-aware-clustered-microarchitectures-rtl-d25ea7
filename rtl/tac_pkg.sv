// tac_pkg: types and constants shared by the thermal-aware cluster control logic.
//
// The machine has four back-end clusters laid out as a 2x2 square. Clusters are
// numbered clockwise (0 top-left, 1 top-right, 2 bottom-right, 3 bottom-left), so
// cluster k is adjacent to k+1 and k-1 (mod 4) and diagonal to k+2. The queue and
// register-file sizes are those of the evaluated machine: 20-entry integer, FP and
// copy queues, a 96-entry memory queue and 160 integer plus 160 FP registers per
// cluster, dispatch of up to 8 micro-ops per cycle, and a 10-million-instruction
// control interval. The temperature code (8 bits, 0.5 degC per step), the number of
// logical registers and the micro-op fields are choices of this design.
package tac_pkg;

  localparam int NC        = 4;           // clusters (quad-cluster back end)
  localparam int CW        = $clog2(NC);  // cluster index width
  localparam int TEMP_W    = 8;           // temperature code width, 0.5 degC per LSB
  localparam int NUM_LREGS = 32;          // logical registers tracked by steering
  localparam int LRW       = $clog2(NUM_LREGS);
  localparam int CNT_W     = 8;           // resource counter width (max 160 entries)

  // Queue a micro-op is dispatched to.
  typedef enum logic [1:0] {
    Q_INT = 2'd0,
    Q_FP  = 2'd1,
    Q_MEM = 2'd2
  } qclass_e;

  // Destination register file of a micro-op.
  typedef enum logic [1:0] {
    D_NONE = 2'd0,
    D_INT  = 2'd1,
    D_FP   = 2'd2
  } dkind_e;

  // Steering policies. T_THERMAL is the one used in the combined scheme.
  typedef enum logic [1:0] {
    POL_COLD      = 2'd0,
    POL_T_COLD    = 2'd1,
    POL_T_WLOAD   = 2'd2,
    POL_T_THERMAL = 2'd3
  } policy_e;

  // A decoded micro-op presented to the steering unit.
  typedef struct packed {
    logic              valid;
    qclass_e           qclass;
    logic [1:0]        src_valid;
    logic [1:0][LRW-1:0] src;
    dkind_e            dkind;
    logic [LRW-1:0]    dst;
  } uop_t;

  // Free entries of one cluster.
  typedef struct packed {
    logic [CNT_W-1:0] iq;
    logic [CNT_W-1:0] fpq;
    logic [CNT_W-1:0] cpq;
    logic [CNT_W-1:0] memq;
    logic [CNT_W-1:0] ireg;
    logic [CNT_W-1:0] freg;
  } res_t;

  // Entries taken or given back in one cycle by one cluster.
  typedef struct packed {
    logic [3:0] iq;
    logic [3:0] fpq;
    logic [3:0] cpq;
    logic [3:0] memq;
    logic [3:0] ireg;
    logic [3:0] freg;
  } res_delta_t;

  // A copy micro-op moving a logical register value from one cluster to another.
  typedef struct packed {
    logic [LRW-1:0] lreg;
    logic [CW-1:0]  src;
    logic [CW-1:0]  dst;
  } copy_uop_t;

  // Hop distance on the 2x2 point-to-point network (1 adjacent, 2 diagonal).
  function automatic int unsigned hop_dist(input int unsigned a, input int unsigned b);
    int unsigned d;
    d = (a > b) ? a - b : b - a;
    if (d == 0) return 0;
    if (d == 2) return 2;
    return 1;
  endfunction

endpackage
