// copy_uop_gen: saves the register values of clusters about to be Vdd-gated.
//
// A gated cluster loses its register file, so before a cluster is put to sleep
// every logical register whose latest value lives only there must be copied to
// a cluster that stays on. On start the generator walks the register location
// table, one logical register per cycle. A register needs a copy when no
// staying cluster holds it but a leaving one does; its copy micro-op reads the
// value in the lowest-numbered leaving holder and sends it to the nearest
// staying cluster on the 2x2 point-to-point network: the clockwise neighbour,
// else the anticlockwise one, else the diagonal (two hops). Which holder and
// which of two equally near clusters are used, and the one-register-per-cycle
// walk, are choices of this design.
//
// Interface: copy_valid/copy_ready hand one copy micro-op per cycle to the
// leaving cluster's copy queue; a copy is offered only while that queue has a
// free entry (cpq_room). Each accepted copy is also reported to the location
// table through loc_set_* so the destination becomes a holder. busy is high from
// the cycle after start until the walk ends; done pulses once at the end.
module copy_uop_gen
  import tac_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [NC-1:0]                leaving,
  input  logic [NC-1:0]                staying,
  input  logic [NUM_LREGS-1:0][NC-1:0] loc,
  input  logic [NC-1:0]                cpq_room,
  output logic                         copy_valid,
  input  logic                         copy_ready,
  output copy_uop_t                    copy,
  output logic                         loc_set_valid,
  output logic [LRW-1:0]               loc_set_reg,
  output logic [CW-1:0]                loc_set_cluster,
  output logic                         busy,
  output logic                         done
);
  logic [LRW-1:0] idx;
  logic           need, last, advance;
  logic [NC-1:0]  held;
  logic [CW-1:0]  src, dst;

  always_comb begin
    held = loc[idx];
    need = busy && ((held & staying) == '0) && ((held & leaving) != '0);
    src  = '0;
    for (int c = NC - 1; c >= 0; c--)
      if (held[c] && leaving[c]) src = CW'(c);
    dst  = src;
    if      (staying[CW'(src + CW'(1))])      dst = CW'(src + CW'(1));
    else if (staying[CW'(src - CW'(1))])      dst = CW'(src - CW'(1));
    else if (staying[CW'(src + CW'(NC / 2))]) dst = CW'(src + CW'(NC / 2));
  end

  assign copy_valid      = need && cpq_room[src];
  assign copy            = '{lreg: idx, src: src, dst: dst};
  assign loc_set_valid   = copy_valid && copy_ready;
  assign loc_set_reg     = idx;
  assign loc_set_cluster = dst;
  assign last            = idx == LRW'(NUM_LREGS - 1);
  assign advance         = busy && (!need || (copy_valid && copy_ready));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        idx  <= '0;
        busy <= 1'b1;
      end else if (advance) begin
        idx <= idx + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A copy always has a staying destination that is not its source.
  a_dst: assert property (@(posedge clk) disable iff (!rst_n)
    copy_valid |-> (staying[copy.dst] && copy.dst != copy.src));

endmodule
