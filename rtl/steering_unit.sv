// steering_unit: thermal-aware instruction steering for a clustered back end.
//
// Each cycle up to WIDTH (8) micro-ops leave the front end in program order and
// each must be sent to one of the four clusters. For every micro-op the unit
// orders the clusters that are active (steer_mask) by a pairwise priority rule
// and sends the micro-op to the first cluster in that order with room for it:
// a free entry in the queue it needs and, if it writes a register, a free
// register. The rule is chosen by POLICY:
//   T_THERMAL (default): if two clusters differ in temperature by more than
//     THRESH the colder one wins; otherwise the one holding more of the
//     micro-op's source operands wins.
//   COLD: the colder cluster wins.
//   T_COLD: as COLD, but walking the clusters from coldest to hottest, a cluster
//     more than THRESH hotter than the previous one, and every hotter one, is
//     not used.
//   T_WLOAD: for clusters H (hotter) and C (colder) with temperature difference
//     d, an imbalance factor IT = 1 + d/IT_ONE is formed; if occupancy(H)*IT >
//     occupancy(C), C wins; otherwise the one holding more source operands wins.
// The rules and their use of temperature follow the thermal-aware steering
// proposals; everything below is this design's own choice. Ties fall to the
// less occupied cluster and then to the lower index. The order is formed by giving
// every cluster a score, the number of other active clusters it beats; the
// highest score comes first. Occupancy is the number of queue entries in use.
//
// The unit also holds the register location table: for each logical register,
// the set of clusters holding its latest value. A micro-op's destination then
// lives only in its cluster; a source read from another cluster is flagged in
// remote[] (a copy brings it over) and from then on is also held there. Later
// micro-ops of the same group see the effects of earlier ones, both in the
// table and in the free counts. The hopping logic adds a holder when a copy
// micro-op moves a value (loc_set_*) and removes a gated cluster (loc_clear).
//
// Steering is in order: the first valid micro-op that fits nowhere is not
// accepted, nor is any after it in the group, and stall is raised; the front
// end presents them again. Decisions are combinational from the registered
// table, temperatures and free counts; the table updates at the clock edge.
module steering_unit
  import tac_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter policy_e     POLICY    = POL_T_THERMAL,
  parameter int unsigned THRESH    = 4,        // 2 degC
  parameter int unsigned IT_ONE    = 16,       // T_WLOAD: IT grows by 1 per IT_ONE codes
  parameter int unsigned IQ_SIZE   = 20,
  parameter int unsigned FPQ_SIZE  = 20,
  parameter int unsigned CPQ_SIZE  = 20,
  parameter int unsigned MEMQ_SIZE = 96,
  parameter logic [NC-1:0] RESET_LOC = {NC{1'b1}}
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  uop_t [WIDTH-1:0]               uops,
  input  logic [NC-1:0]                  steer_mask,
  input  logic [NC-1:0][TEMP_W-1:0]      temp,
  input  res_t [NC-1:0]                  free,
  // register location table maintenance from the hopping logic
  input  logic                           loc_set_valid,
  input  logic [LRW-1:0]                 loc_set_reg,
  input  logic [CW-1:0]                  loc_set_cluster,
  input  logic [NC-1:0]                  loc_clear,
  // decisions
  output logic [WIDTH-1:0]               accept,
  output logic [WIDTH-1:0][CW-1:0]       cluster,
  output logic [WIDTH-1:0][1:0]          remote,
  output logic                           stall,
  output res_delta_t [NC-1:0]            alloc,
  output logic [NUM_LREGS-1:0][NC-1:0]   loc
);
  localparam int OCC_W = 9;

  logic [NUM_LREGS-1:0][NC-1:0] loc_base, loc_next;

  // Pairwise priority: does cluster i beat cluster j for this micro-op?
  function automatic logic beats(input int i, input int j,
                                 input logic [NC-1:0][TEMP_W-1:0] t,
                                 input logic [NC-1:0][1:0] ninp,
                                 input logic [NC-1:0][OCC_W-1:0] occ);
    logic [TEMP_W-1:0] d;
    logic              i_colder;
    int                h, c;
    logic [OCC_W+TEMP_W+1:0] lhs, rhs;
    i_colder = t[i] < t[j];
    d = i_colder ? t[j] - t[i] : t[i] - t[j];
    case (POLICY)
      POL_COLD, POL_T_COLD: begin
        if (d != 0) return i_colder;
        return i < j;
      end
      POL_T_WLOAD: begin
        if (i_colder) begin h = j; c = i; end
        else          begin h = i; c = j; end
        lhs = (OCC_W+TEMP_W+2)'(occ[h]) * (OCC_W+TEMP_W+2)'(IT_ONE + 32'(d));
        rhs = (OCC_W+TEMP_W+2)'(occ[c]) * (OCC_W+TEMP_W+2)'(IT_ONE);
        if (lhs > rhs) return c == i;               // hotter one overloaded
        if (d == 0 && rhs > lhs) return h == i;     // equal temperatures
      end
      default: begin  // POL_T_THERMAL
        if (32'(d) > THRESH) return i_colder;
      end
    endcase
    if (ninp[i] != ninp[j]) return ninp[i] > ninp[j];
    if (occ[i] != occ[j])   return occ[i] < occ[j];
    return i < j;
  endfunction

  // Table seen by this cycle's micro-ops: gated clusters removed, copies added.
  always_comb begin
    loc_base = loc;
    for (int r = 0; r < NUM_LREGS; r++) loc_base[r] = loc_base[r] & ~loc_clear;
    if (loc_set_valid) loc_base[loc_set_reg][loc_set_cluster] = 1'b1;
  end

  always_comb begin
    res_t [NC-1:0]            fr;
    logic [NC-1:0][OCC_W-1:0] occ;
    logic [NC-1:0][1:0]       ninp;
    logic [NC-1:0]            fits, incl;
    logic [NC-1:0][2:0]       score;
    logic                     stop, found;
    int                       best;

    loc_next = loc_base;
    fr       = free;
    stop     = 1'b0;
    accept   = '0;
    cluster  = '0;
    remote   = '0;
    alloc    = '0;
    stall    = 1'b0;

    for (int s = 0; s < WIDTH; s++) begin
      // occupancy and source operands per cluster, as left by earlier slots
      for (int c = 0; c < NC; c++) begin
        occ[c] = OCC_W'(IQ_SIZE - 32'(fr[c].iq)) + OCC_W'(FPQ_SIZE - 32'(fr[c].fpq)) +
                 OCC_W'(CPQ_SIZE - 32'(fr[c].cpq)) + OCC_W'(MEMQ_SIZE - 32'(fr[c].memq));
        ninp[c] = 2'(uops[s].src_valid[0] && loc_next[uops[s].src[0]][c]) +
                  2'(uops[s].src_valid[1] && loc_next[uops[s].src[1]][c]);
        case (uops[s].qclass)
          Q_FP:    fits[c] = fr[c].fpq  != 0;
          Q_MEM:   fits[c] = fr[c].memq != 0;
          default: fits[c] = fr[c].iq   != 0;
        endcase
        if (uops[s].dkind == D_INT) fits[c] = fits[c] && fr[c].ireg != 0;
        if (uops[s].dkind == D_FP)  fits[c] = fits[c] && fr[c].freg != 0;
        fits[c] = fits[c] && steer_mask[c];
      end

      // the order: score = number of other active clusters beaten
      for (int i = 0; i < NC; i++) begin
        score[i] = '0;
        for (int j = 0; j < NC; j++)
          if (j != i && steer_mask[j] && beats(i, j, temp, ninp, occ))
            score[i] = score[i] + 3'd1;
      end

      // T_COLD: only clusters reachable from the coldest in steps of at most THRESH
      incl = '1;
      if (POLICY == POL_T_COLD) begin
        logic [TEMP_W-1:0] tmin;
        logic              any;
        tmin = '1;
        any  = 1'b0;
        for (int c = 0; c < NC; c++)
          if (steer_mask[c] && temp[c] <= tmin) begin tmin = temp[c]; any = 1'b1; end
        incl = '0;
        for (int c = 0; c < NC; c++)
          if (steer_mask[c] && temp[c] == tmin && any) incl[c] = 1'b1;
        for (int it = 0; it < NC - 1; it++)
          for (int c = 0; c < NC; c++)
            for (int p = 0; p < NC; p++)
              if (steer_mask[c] && incl[p] && temp[c] >= temp[p] &&
                  32'(temp[c] - temp[p]) <= THRESH)
                incl[c] = 1'b1;
      end

      found = 1'b0;
      best  = 0;
      for (int c = 0; c < NC; c++)
        if (fits[c] && incl[c] && (!found || score[c] > score[best])) begin
          found = 1'b1;
          best  = c;
        end

      if (uops[s].valid) begin
        if (stop || !found) begin
          stop  = 1'b1;
          stall = 1'b1;
        end else begin
          accept[s]  = 1'b1;
          cluster[s] = CW'(best);
          for (int k = 0; k < 2; k++)
            if (uops[s].src_valid[k]) begin
              remote[s][k] = !loc_next[uops[s].src[k]][best];
              loc_next[uops[s].src[k]][best] = 1'b1;
            end
          if (uops[s].dkind != D_NONE) begin
            loc_next[uops[s].dst] = '0;
            loc_next[uops[s].dst][best] = 1'b1;
          end
          case (uops[s].qclass)
            Q_FP: begin
              fr[best].fpq   = fr[best].fpq - 1'b1;
              alloc[best].fpq = alloc[best].fpq + 4'd1;
            end
            Q_MEM: begin
              fr[best].memq   = fr[best].memq - 1'b1;
              alloc[best].memq = alloc[best].memq + 4'd1;
            end
            default: begin
              fr[best].iq   = fr[best].iq - 1'b1;
              alloc[best].iq = alloc[best].iq + 4'd1;
            end
          endcase
          if (uops[s].dkind == D_INT) begin
            fr[best].ireg    = fr[best].ireg - 1'b1;
            alloc[best].ireg = alloc[best].ireg + 4'd1;
          end
          if (uops[s].dkind == D_FP) begin
            fr[best].freg    = fr[best].freg - 1'b1;
            alloc[best].freg = alloc[best].freg + 4'd1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) loc <= {NUM_LREGS{RESET_LOC}};
    else        loc <= loc_next;
  end

  // A micro-op is never sent to a cluster that is not active.
  for (genvar s = 0; s < WIDTH; s++) begin : g_chk
    a_active: assert property (@(posedge clk) disable iff (!rst_n)
      accept[s] |-> steer_mask[cluster[s]]);
  end

endmodule
