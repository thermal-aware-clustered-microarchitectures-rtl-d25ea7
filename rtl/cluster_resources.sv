// cluster_resources: free-entry counters of one back-end cluster.
//
// The steering unit sends a micro-op only to a cluster that has room for it in
// the issue queue it needs and, if it writes a register, a free physical
// register. This module keeps those counts for one cluster: the integer, FP,
// copy and memory queues (20, 20, 20 and 96 entries) and the integer and FP
// register files (160 each). Each cycle the steering unit and the copy-micro-op
// generator report entries taken (alloc) and the back end reports entries given
// back (release: a queue entry when its micro-op issues, a register when it is
// freed at commit). When the cluster is Vdd-gated (clear) everything it held is
// lost and all counts return to the full size. Counting frees instead of reading
// the queues, and the per-cycle delta ports, are choices of this design.
//
// Timing: free is registered; alloc and release of cycle t show in cycle t+1.
// Assertions flag a count that would leave the range 0..size.
module cluster_resources
  import tac_pkg::*;
#(
  parameter int unsigned IQ_SIZE   = 20,
  parameter int unsigned FPQ_SIZE  = 20,
  parameter int unsigned CPQ_SIZE  = 20,
  parameter int unsigned MEMQ_SIZE = 96,
  parameter int unsigned INT_REGS  = 160,
  parameter int unsigned FP_REGS   = 160
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,     // cluster gated: all entries free
  input  res_delta_t alloc,
  input  res_delta_t release_,
  output res_t       free,
  output logic       empty      // no queue holds a micro-op
);
  function automatic logic [CNT_W-1:0] upd(input logic [CNT_W-1:0] cur,
                                           input logic [3:0] a, input logic [3:0] r);
    return cur - CNT_W'(a) + CNT_W'(r);
  endfunction

  localparam res_t FULL = '{iq: CNT_W'(IQ_SIZE), fpq: CNT_W'(FPQ_SIZE), cpq: CNT_W'(CPQ_SIZE),
                            memq: CNT_W'(MEMQ_SIZE), ireg: CNT_W'(INT_REGS),
                            freg: CNT_W'(FP_REGS)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free <= FULL;
    end else if (clear) begin
      free <= FULL;
    end else begin
      free.iq   <= upd(free.iq,   alloc.iq,   release_.iq);
      free.fpq  <= upd(free.fpq,  alloc.fpq,  release_.fpq);
      free.cpq  <= upd(free.cpq,  alloc.cpq,  release_.cpq);
      free.memq <= upd(free.memq, alloc.memq, release_.memq);
      free.ireg <= upd(free.ireg, alloc.ireg, release_.ireg);
      free.freg <= upd(free.freg, alloc.freg, release_.freg);
    end
  end

  assign empty = (free.iq == CNT_W'(IQ_SIZE)) && (free.fpq == CNT_W'(FPQ_SIZE)) &&
                 (free.cpq == CNT_W'(CPQ_SIZE)) && (free.memq == CNT_W'(MEMQ_SIZE));

  // A count may never go below zero or above the structure's size.
  function automatic logic in_range(input logic [CNT_W-1:0] cur, input logic [3:0] a,
                                    input logic [3:0] r, input int unsigned size);
    return (32'(cur) + 32'(r) >= 32'(a)) && (32'(cur) + 32'(r) - 32'(a) <= size);
  endfunction

  a_range: assert property (@(posedge clk) disable iff (!rst_n || clear)
    in_range(free.iq, alloc.iq, release_.iq, IQ_SIZE) &&
    in_range(free.fpq, alloc.fpq, release_.fpq, FPQ_SIZE) &&
    in_range(free.cpq, alloc.cpq, release_.cpq, CPQ_SIZE) &&
    in_range(free.memq, alloc.memq, release_.memq, MEMQ_SIZE) &&
    in_range(free.ireg, alloc.ireg, release_.ireg, INT_REGS) &&
    in_range(free.freg, alloc.freg, release_.freg, FP_REGS));

endmodule
