// tb_tac_top_full: the thermal-aware cluster control at its full default size.
//
// The same bench and checks as tb_tac_top, but with every parameter of the
// design at its default: 8-wide steering, the 10-million-instruction interval,
// 64-cycle wake-up. The core is taken to retire at its full width of 8
// instructions per cycle, so an interval lasts 1.25 million cycles; the run
// covers two interval ends and the two complete cluster hops they start
// (cluster 1, then cluster 2 is gated), with the register copies, drains and
// steering checks of the reduced test. The check for an interval end held
// during a change applies only to longer runs and is skipped here.
module tb_tac_top_full;
  import tac_pkg::*;
  localparam int W = 8, SPC = 8, INTERVAL = 10_000_000, THRESH = 4, NHOPS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] retired;
  logic [NC-1:0][SPC-1:0][TEMP_W-1:0] sensor;
  uop_t [W-1:0] uops;
  logic [W-1:0] accept;
  logic [W-1:0][CW-1:0] cluster;
  logic [W-1:0][1:0] remote;
  logic stall, copy_valid, copy_ready;
  copy_uop_t copy;
  res_delta_t [NC-1:0] release_;
  res_t [NC-1:0] free;
  logic [NC-1:0] powered, steer_mask, gate;
  logic [NC-1:0][TEMP_W-1:0] temp;
  logic interval_end, hop_busy, copy_busy;
  logic [1:0] phase;
  logic [$clog2(INTERVAL+16)-1:0] icount;
  logic [15:0] intervals, hops;

  tac_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_intervals = 0, n_hops = 0, n_copies = 0, n_stalls = 0, n_remote = 0;
  int n_thermal = 0, n_operand = 0, n_cycles = 0, n_held = 0;
  bit force_held = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog: hops %0d", n_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bench state
  int occ[NC][4];              // iq, fpq, cpq, memq in use
  int ireg_used[NC], freg_used[NC];
  int heat[NC], tmp[NC];
  logic [NUM_LREGS-1:0][NC-1:0] mloc;
  logic [NC-1:0][TEMP_W-1:0] smax, smax_at_end;
  bit check_temp = 0;
  int expect_off;

  function automatic uop_t rand_uop();
    uop_t u;
    int sa, sb;
    u.valid     = ($urandom_range(0, 9) != 0);
    u.qclass    = qclass_e'($urandom_range(0, 2));
    sa = $urandom_range(0, 3); sb = $urandom_range(0, 1);
    u.src_valid = {sb == 1, sa != 0};
    u.src[0]    = LRW'($urandom_range(0, NUM_LREGS - 1));
    u.src[1]    = LRW'($urandom_range(0, NUM_LREGS - 1));
    u.dkind     = dkind_e'($urandom_range(0, 2));
    u.dst       = LRW'($urandom_range(0, NUM_LREGS - 1));
    return u;
  endfunction

  initial begin
    int acc_prev;
    retired = '0; uops = '0; copy_ready = 1'b0; release_ = '0;
    for (int c = 0; c < NC; c++) begin
      tmp[c] = 126; heat[c] = 0; ireg_used[c] = 0; freg_used[c] = 0;
      for (int k = 0; k < 4; k++) occ[c][k] = 0;
      for (int s = 0; s < SPC; s++) sensor[c][s] = 8'd120;
    end
    mloc = {NUM_LREGS{4'b1110}};     // initial pattern: cluster 0 off
    expect_off = 0;
    acc_prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n_hops < NHOPS) begin
      int burst;
      @(negedge clk);
      n_cycles++;
      // ---- stimulus for this cycle ----
      burst = ((n_cycles / 300) % 4 == 3);    // now and then a stream of FP work
      for (int s = 0; s < W; s++) begin
        uops[s] = rand_uop();
        if (burst) begin uops[s].qclass = Q_FP; uops[s].dkind = D_FP; end
        // the front end idles during most changes, so that some values are
        // left only in the leaving cluster and must be copied out
        if (hop_busy && (hops % 4) != 3) uops[s].valid = 1'b0;
      end
      copy_ready = ($urandom_range(0, 3) != 0);
      retired = 4'd8;                      // the core retires at full width
      // During changes 5 to 8 (until it has happened once) the bench stretches
      // the change, holding the leaving cluster's work and the copy queue while
      // the core retires at full width, so that an interval ends mid-change.
      force_held = hop_busy && hops >= 5 && hops <= 8 && n_held == 0;
      if (force_held) begin
        copy_ready = 1'b0;
        retired = 4'd8;
      end
      for (int c = 0; c < NC; c++) begin
        res_delta_t r;
        r = '0;
        r.iq   = 4'(occ[c][0] > 0 && $urandom_range(0, 1));
        r.fpq  = 4'(occ[c][1] > 0 && $urandom_range(0, 3) == 0);
        r.cpq  = 4'(occ[c][2] > 0);
        r.memq = 4'(occ[c][3] > 0);
        if (force_held && powered[c] && !steer_mask[c]) r = '0;
        r.ireg = 4'((ireg_used[c] > 40 || (!steer_mask[c] && ireg_used[c] > 0)) ? 2 : 0);
        r.freg = 4'((freg_used[c] > 40 || (!steer_mask[c] && freg_used[c] > 0)) ? 2 : 0);
        if (r.ireg > ireg_used[c]) r.ireg = 4'(ireg_used[c]);
        if (r.freg > freg_used[c]) r.freg = 4'(freg_used[c]);
        release_[c] = r;
      end
      // sensors: temperature plus a per-sensor offset of 0..3 codes
      for (int c = 0; c < NC; c++)
        for (int s = 0; s < SPC; s++) sensor[c][s] = TEMP_W'(tmp[c] + $urandom_range(0, 3));
      #1;
      // ---- checks of this cycle's combinational decisions ----
      acc_prev = 0;
      if (stall) n_stalls++;
      for (int s = 0; s < W; s++) if (accept[s]) begin
        int c, nin[NC], best_in, coldest;
        c = cluster[s];
        acc_prev++;
        check("steered to a cluster that is not steerable", steer_mask[c] && powered[c]);
        // classify the decision
        for (int k = 0; k < NC; k++)
          nin[k] = (uops[s].src_valid[0] && mloc[uops[s].src[0]][k]) +
                   (uops[s].src_valid[1] && mloc[uops[s].src[1]][k]);
        best_in = 0; coldest = 1;
        for (int k = 0; k < NC; k++) if (steer_mask[k] && k != c) begin
          if (nin[k] > nin[c]) best_in = 1;
          if (temp[k] < temp[c]) coldest = 0;
        end
        if (best_in && coldest) n_thermal++;
        if (!best_in && nin[c] > 0) n_operand++;
        for (int k = 0; k < 2; k++) if (uops[s].src_valid[k]) begin
          check("remote flag", remote[s][k] == !mloc[uops[s].src[k]][c]);
          if (remote[s][k]) n_remote++;
          mloc[uops[s].src[k]][c] = 1'b1;
        end
        if (uops[s].dkind != D_NONE) mloc[uops[s].dst] = NC'(1) << c;
        case (uops[s].qclass)
          Q_INT:   occ[c][0]++;
          Q_FP:    occ[c][1]++;
          default: occ[c][3]++;
        endcase
        if (uops[s].dkind == D_INT) ireg_used[c]++;
        if (uops[s].dkind == D_FP)  freg_used[c]++;
        heat[c]++;
      end
      if (copy_valid && copy_ready) begin
        n_copies++;
        check("copy not to an adjacent powered cluster",
              powered[copy.dst] && hop_dist(copy.src, copy.dst) == 1);
        check("copy of a value held by a staying cluster",
              (mloc[copy.lreg] & steer_mask) == '0 && mloc[copy.lreg][copy.src]);
        mloc[copy.lreg][copy.dst] = 1'b1;
        occ[copy.src][2]++;
      end
      for (int c = 0; c < NC; c++) begin
        occ[c][0] -= release_[c].iq;  occ[c][1] -= release_[c].fpq;
        occ[c][2] -= release_[c].cpq; occ[c][3] -= release_[c].memq;
        ireg_used[c] -= release_[c].ireg; freg_used[c] -= release_[c].freg;
      end
      for (int c = 0; c < NC; c++) begin
        smax[c] = '0;
        for (int s = 0; s < SPC; s++) if (sensor[c][s] > smax[c]) smax[c] = sensor[c][s];
      end
      if (check_temp) smax_at_end = smax;
      // ---- after the clock edge ----
      @(posedge clk);
      #1;
      if (check_temp) check("sampled temperature is the hottest sensor", temp == smax_at_end);
      check_temp = 0;
      if (interval_end && hop_busy) n_held++;
      if (interval_end) begin
        // the sensors of the next cycle are sampled; compare one cycle later
        n_intervals++;
        check_temp = 1;
      end
      if (gate != '0) begin
        n_hops++;
        check($sformatf("gated %b, expected cluster %0d", gate, (expect_off + 1) % NC),
              gate == NC'(1) << ((expect_off + 1) % NC));
        expect_off = (expect_off + 1) % NC;
        for (int c = 0; c < NC; c++) if (gate[c]) begin
          check("gated before drained", occ[c][0] == 0 && occ[c][1] == 0 &&
                occ[c][2] == 0 && occ[c][3] == 0);
          for (int k = 0; k < 4; k++) occ[c][k] = 0;
          ireg_used[c] = 0; freg_used[c] = 0;
        end
        for (int r = 0; r < NUM_LREGS; r++) begin
          mloc[r] &= ~gate;
          check($sformatf("register %0d lost at gating", r), (mloc[r] & powered) != '0);
        end
      end
      for (int c = 0; c < NC; c++) begin
        check("free count", free[c].iq == 20 - occ[c][0] && free[c].fpq == 20 - occ[c][1] &&
              free[c].cpq == 20 - occ[c][2] && free[c].memq == 96 - occ[c][3] &&
              free[c].ireg == 160 - ireg_used[c] && free[c].freg == 160 - freg_used[c]);
      end
      // temperature model, every 32 cycles
      if (n_cycles % 32 == 0)
        for (int c = 0; c < NC; c++) begin
          tmp[c] = tmp[c] + heat[c] / 16 - (tmp[c] - 100) / 8;
          if (tmp[c] > 240) tmp[c] = 240;
          heat[c] = 0;
        end
    end
    $display("cycles %0d intervals %0d hops %0d copies %0d stalls %0d remote %0d thermal %0d operand %0d held %0d",
             n_cycles, n_intervals, n_hops, n_copies, n_stalls, n_remote, n_thermal, n_operand, n_held);
    check("interval ends occurred", n_intervals >= NHOPS);
    check("hops occurred", n_hops == NHOPS);
    check("copy micro-ops occurred", n_copies > 0);
    check("stalls occurred", n_stalls > 0);
    check("remote operands occurred", n_remote > 0);
    check("temperature-driven steering occurred", n_thermal > 0);
    check("operand-driven steering occurred", n_operand > 0);
    if (NHOPS > 8) check("interval end held during a change occurred", n_held > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
