// tb_steering_unit: self-checking test of the thermal-aware steering unit.
//
// Part 1, directed cases with hand-worked answers for the default T-Thermal
// policy: operands attract a micro-op when temperatures are within the
// threshold; a cluster more than the threshold colder wins otherwise; full
// queues or registers and inactive clusters are skipped; a micro-op that fits
// nowhere stalls it and every later one in the group; a later micro-op sees
// the destination of an earlier one in the same group; remote operands are
// flagged; copy and gating updates change the location table.
// Part 2, random groups of 8 micro-ops against a reference model of T-Thermal
// kept in this file (location table, free counts, in-order acceptance).
// Part 3, directed cases for the Cold, T-Cold and T-Wload policies.
module tb_steering_unit;
  import tac_pkg::*;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // one instance per policy, sharing the stimulus
  uop_t [W-1:0]              uops;
  logic [NC-1:0]             steer_mask;
  logic [NC-1:0][TEMP_W-1:0] temp;
  res_t [NC-1:0]             free;
  logic                      loc_set_valid;
  logic [LRW-1:0]            loc_set_reg;
  logic [CW-1:0]             loc_set_cluster;
  logic [NC-1:0]             loc_clear;

  logic [3:0][W-1:0]             accept;
  logic [3:0][W-1:0][CW-1:0]     cluster;
  logic [3:0][W-1:0][1:0]        remote;
  logic [3:0]                    stall;
  res_delta_t [3:0][NC-1:0]      alloc;
  logic [3:0][NUM_LREGS-1:0][NC-1:0] loc;

  localparam policy_e POLS[4] = '{POL_T_THERMAL, POL_COLD, POL_T_COLD, POL_T_WLOAD};
  for (genvar p = 0; p < 4; p++) begin : g_dut
    steering_unit #(.WIDTH(W), .POLICY(POLS[p]), .THRESH(4)) dut (
      .clk, .rst_n, .uops, .steer_mask, .temp, .free, .loc_set_valid, .loc_set_reg,
      .loc_set_cluster, .loc_clear, .accept(accept[p]), .cluster(cluster[p]),
      .remote(remote[p]), .stall(stall[p]), .alloc(alloc[p]), .loc(loc[p]));
  end

  // The clock is stepped by the test (tick) so that each group of micro-ops
  // can be examined, unclocked, before it is committed.
  task automatic tick();
    #1 clk = 1'b1;
    #1 clk = 1'b0;
    #1;
  endtask

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  function automatic res_t full_res();
    return '{iq: 20, fpq: 20, cpq: 20, memq: 96, ireg: 160, freg: 160};
  endfunction

  function automatic uop_t mk(qclass_e q, int s0, int s1, dkind_e dk, int d);
    uop_t u;
    u.valid = 1'b1; u.qclass = q;
    u.src_valid = {s1 >= 0, s0 >= 0};
    u.src[0] = LRW'(s0 < 0 ? 0 : s0);
    u.src[1] = LRW'(s1 < 0 ? 0 : s1);
    u.dkind = dk; u.dst = LRW'(d);
    return u;
  endfunction

  // reset all instances to "every register in every cluster", then place regs
  task automatic reset_all();
    rst_n = 1'b0;
    uops = '0; steer_mask = '1; temp = {NC{8'd120}};
    for (int c = 0; c < NC; c++) free[c] = full_res();
    loc_set_valid = 0; loc_set_reg = '0; loc_set_cluster = '0; loc_clear = '0;
    tick();
    rst_n = 1'b1;
    tick();
  endtask

  // apply one group: outputs are checked by the caller before the clock edge
  task automatic present(input uop_t [W-1:0] g);
    uops = g;
    #1;
  endtask

  task automatic commit_group();
    tick();
    uops = '0;
  endtask

  // place logical register r only in cluster c (through a one-uop group)
  task automatic place(int r, int c);
    logic [NC-1:0] sm;
    sm = steer_mask;
    steer_mask = NC'(1) << c;
    uops = '0;
    uops[0] = mk(Q_INT, -1, -1, D_INT, r);
    tick();
    uops = '0;
    steer_mask = sm;
  endtask

  // ---------------- reference model of T-Thermal ----------------
  logic [NUM_LREGS-1:0][NC-1:0] mloc;

  function automatic bit m_beats(int i, int j, int ti, int tj, int ni, int nj, int oi, int oj);
    int d;
    d = ti - tj;
    if (d < 0) d = -d;
    if (d > 4) return ti < tj;
    if (ni != nj) return ni > nj;
    if (oi != oj) return oi < oj;
    return i < j;
  endfunction

  initial begin
    #1ms;  // about 300,000 ticks
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uop_t [W-1:0] g;
    int stalls_seen = 0;
    // ================= Part 1: T-Thermal directed =================
    reset_all();
    place(5, 2);
    g = '0; g[0] = mk(Q_INT, 5, -1, D_INT, 9);
    present(g);
    check("operand attracts", accept[0][0] && cluster[0][0] == 2 && remote[0][0] == 2'b00);
    temp[2] = 8'd123;                       // 1.5 degC hotter: within threshold
    present(g);
    check("within threshold: operands win", cluster[0][0] == 2);
    temp[2] = 8'd125;                       // 2.5 degC hotter: beyond threshold
    present(g);
    check("beyond threshold: colder wins", cluster[0][0] == 0 && remote[0][0] == 2'b01);
    temp = {8'd130, 8'd110, 8'd130, 8'd130}; // cluster 2 coldest by far
    place(6, 3);
    g[0] = mk(Q_INT, 6, -1, D_INT, 9);
    present(g);
    check("coldest beats operands", cluster[0][0] == 2);
    free[2].iq = '0;                         // cluster 2 integer queue full
    present(g);
    check("full queue skipped", accept[0][0] && cluster[0][0] == 3);
    g[0] = mk(Q_FP, 6, -1, D_FP, 9);
    present(g);
    check("FP queue free there", cluster[0][0] == 2);
    free[2].freg = '0;
    present(g);
    check("no FP register: skipped", cluster[0][0] == 3);
    free[2] = full_res();
    steer_mask = 4'b1011;                    // cluster 2 inactive
    g[0] = mk(Q_INT, 6, -1, D_INT, 9);
    present(g);
    check("inactive skipped", cluster[0][0] == 3);
    steer_mask = '1;
    temp = {NC{8'd120}};
    // stall: all memory queues full
    for (int c = 0; c < NC; c++) free[c].memq = '0;
    g = '0;
    g[0] = mk(Q_INT, -1, -1, D_INT, 1);
    g[1] = mk(Q_MEM, -1, -1, D_INT, 2);
    g[2] = mk(Q_INT, -1, -1, D_INT, 3);
    present(g);
    check("stall stops group", accept[0] == 8'b0000_0001 && stall[0]);
    for (int c = 0; c < NC; c++) free[c] = full_res();
    // capacity inside a group: cluster 1 has 2 integer-queue entries, others none
    for (int c = 0; c < NC; c++) free[c].iq = (c == 1) ? 8'd2 : 8'd0;
    g = '0;
    for (int s = 0; s < 3; s++) g[s] = mk(Q_INT, -1, -1, D_NONE, 0);
    present(g);
    check("group uses up entries", accept[0] == 8'b0000_0011 && stall[0] &&
          cluster[0][0] == 1 && cluster[0][1] == 1 && alloc[0][1].iq == 2);
    for (int c = 0; c < NC; c++) free[c] = full_res();
    // dependency inside a group
    place(10, 3);
    g = '0;
    g[0] = mk(Q_INT, 10, -1, D_INT, 11);     // goes to 3 (holds r10)
    g[1] = mk(Q_INT, 11, 12, D_INT, 13);     // r11 now only in 3, r12 everywhere
    present(g);
    check("in-group dependency", cluster[0][0] == 3 && cluster[0][1] == 3 &&
          accept[0][1:0] == 2'b11 && !stall[0]);
    commit_group();
    check("table updated", loc[0][11] == 4'b1000 && loc[0][13] == 4'b1000);
    // copy update and gating clear
    loc_set_valid = 1; loc_set_reg = 5'd11; loc_set_cluster = 2'd0;
    tick();
    loc_set_valid = 0;
    check("copy adds holder", loc[0][11] == 4'b1001);
    loc_clear = 4'b1000;
    tick();
    loc_clear = '0;
    check("gating removes holder", loc[0][11] == 4'b0001 && loc[0][13] == 4'b0000);

    // ================= Part 2: random against the model =================
    reset_all();
    mloc = {NUM_LREGS{4'b1111}};
    for (int n = 0; n < 3000; n++) begin
      res_t [NC-1:0] mf;
      bit stop;
      tick();
      if (n % 50 == 0)
        for (int c = 0; c < NC; c++) temp[c] = TEMP_W'($urandom_range(110, 126));
      steer_mask = NC'($urandom_range(1, 15));
      for (int c = 0; c < NC; c++) begin
        free[c].iq = 8'($urandom_range(0, 6));  free[c].fpq = 8'($urandom_range(0, 6));
        free[c].cpq = 8'($urandom_range(0, 20)); free[c].memq = 8'($urandom_range(0, 6));
        free[c].ireg = 8'($urandom_range(0, 6)); free[c].freg = 8'($urandom_range(0, 6));
      end
      for (int s = 0; s < W; s++) begin
        g[s] = mk(qclass_e'($urandom_range(0, 2)),
                  ($urandom_range(0, 3) == 0) ? -1 : $urandom_range(0, 31),
                  ($urandom_range(0, 1) == 0) ? -1 : $urandom_range(0, 31),
                  dkind_e'($urandom_range(0, 2)), $urandom_range(0, 31));
        g[s].valid = ($urandom_range(0, 7) != 0);
      end
      present(g);
      // model
      mf = free;
      stop = 0;
      for (int s = 0; s < W; s++) begin
        int ni[NC], oc[NC], sc[NC], best;
        bit ok[NC], e_acc;
        if (!g[s].valid) begin
          check("invalid slot accepted", !accept[0][s]);
          continue;
        end
        for (int c = 0; c < NC; c++) begin
          ni[c] = (g[s].src_valid[0] && mloc[g[s].src[0]][c]) +
                  (g[s].src_valid[1] && mloc[g[s].src[1]][c]);
          oc[c] = (20 - mf[c].iq) + (20 - mf[c].fpq) + (20 - mf[c].cpq) + (96 - mf[c].memq);
          ok[c] = steer_mask[c] &&
                  (g[s].qclass == Q_INT ? mf[c].iq > 0 : g[s].qclass == Q_FP ? mf[c].fpq > 0 : mf[c].memq > 0) &&
                  (g[s].dkind != D_INT || mf[c].ireg > 0) && (g[s].dkind != D_FP || mf[c].freg > 0);
        end
        for (int i = 0; i < NC; i++) begin
          sc[i] = 0;
          for (int j = 0; j < NC; j++)
            if (i != j && steer_mask[j] && m_beats(i, j, temp[i], temp[j], ni[i], ni[j], oc[i], oc[j]))
              sc[i]++;
        end
        best = -1;
        for (int c = 0; c < NC; c++) if (ok[c] && (best < 0 || sc[c] > sc[best])) best = c;
        e_acc = !stop && best >= 0;
        if (!e_acc) stop = 1;
        check($sformatf("group %0d slot %0d accept", n, s), accept[0][s] == e_acc);
        if (e_acc) begin
          check($sformatf("group %0d slot %0d cluster %0d exp %0d", n, s, cluster[0][s], best),
                cluster[0][s] == CW'(best));
          for (int k = 0; k < 2; k++) if (g[s].src_valid[k]) begin
            check("remote flag", remote[0][s][k] == !mloc[g[s].src[k]][best]);
            mloc[g[s].src[k]][best] = 1'b1;
          end
          if (g[s].dkind != D_NONE) mloc[g[s].dst] = NC'(1) << best;
          case (g[s].qclass)
            Q_INT: mf[best].iq--;
            Q_FP:  mf[best].fpq--;
            default: mf[best].memq--;
          endcase
          if (g[s].dkind == D_INT) mf[best].ireg--;
          if (g[s].dkind == D_FP)  mf[best].freg--;
        end
      end
      if (stop) stalls_seen++;
      check("stall flag", stall[0] == stop);
      commit_group();
      check("location table", loc[0] == mloc);
    end
    check("stalls exercised", stalls_seen > 10);

    // ================= Part 3: other policies =================
    reset_all();
    place(5, 2);
    temp = {8'd121, 8'd122, 8'd120, 8'd124}; // clusters 3..0 ; cluster 1 coldest
    g = '0; g[0] = mk(Q_INT, 5, -1, D_INT, 9);
    present(g);
    check("Cold: coldest", cluster[1][0] == 1);
    check("T-Cold: coldest", cluster[2][0] == 1);
    check("T-Thermal: operands (all within 2 degC)", cluster[0][0] == 2);
    free[1].iq = '0;
    present(g);
    // order by temperature 1(120) 3(121) 2(122) 0(124)
    check("Cold: next coldest", cluster[1][0] == 3);
    check("T-Cold: next coldest", cluster[2][0] == 3);
    free[1] = full_res();
    temp = {8'd140, 8'd122, 8'd120, 8'd124}; // gap of 16 before cluster 3
    free[1].iq = '0; free[0].iq = '0; free[2].iq = '0;
    present(g);
    check("Cold: hot cluster still used", accept[1][0] && cluster[1][0] == 3);
    check("T-Cold: beyond gap excluded", !accept[2][0] && stall[2]);
    for (int c = 0; c < NC; c++) free[c] = full_res();
    // T-Wload: cluster 0 hot and loaded; cluster 1 colder and empty
    temp = {8'd120, 8'd120, 8'd120, 8'd152};  // cluster 0: 32 codes hotter
    steer_mask = 4'b0011;
    place(7, 0);
    free[0].iq = 8'd10;                      // occupancy 10 against 0
    g[0] = mk(Q_INT, 7, -1, D_INT, 9);
    present(g);
    check("T-Wload: imbalance sends to colder", cluster[3][0] == 1);
    temp = {8'd120, 8'd120, 8'd152, 8'd120};  // now cluster 1 is the hot one
    free[0].iq = 8'd17;                      // cluster 0 colder with occupancy 3
    free[1].iq = 8'd19;                      // cluster 1 occupancy 1: 1*(16+32) > 3*16? no (48 = 48)
    present(g);
    check("T-Wload: no imbalance, operands win", cluster[3][0] == 0);
    free[1].iq = 8'd18;                      // occupancy 2: 2*48 > 48 -> imbalance
    present(g);
    check("T-Wload: colder but busier still wins", cluster[3][0] == 0);
    temp = {NC{8'd120}};
    free[0].iq = 8'd15; free[1].iq = 8'd20;  // equal temperatures, 5 against 0
    present(g);
    check("T-Wload: equal temps balance load", cluster[3][0] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
