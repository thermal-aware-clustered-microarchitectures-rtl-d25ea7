// tb_copy_uop_gen: self-checking test of the copy-micro-op generator.
//
// For many random register location tables and leaving/staying cluster sets
// (one, two or three clusters leaving), the test builds the expected list of
// copy micro-ops independently: every logical register held by no staying
// cluster but by a leaving one, taken from its lowest-numbered leaving holder
// and sent to the staying cluster at the least Manhattan distance on the 2x2
// floor plan (clockwise neighbour first on a tie). It applies random copy-queue
// back-pressure (copy_ready, cpq_room) and checks the accepted copies, in order,
// against that list, the location-table updates, and that done pulses once
// after 32 cycles of busy plus at most the cycles with back-pressure.
module tb_copy_uop_gen;
  import tac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NC-1:0] leaving, staying, cpq_room;
  logic [NUM_LREGS-1:0][NC-1:0] loc;
  logic copy_valid, copy_ready;
  copy_uop_t copy;
  logic loc_set_valid, busy, done;
  logic [LRW-1:0] loc_set_reg;
  logic [CW-1:0] loc_set_cluster;
  int checks = 0, failures = 0;

  copy_uop_gen dut (.*);

  always #5 clk = ~clk;

  // floor-plan coordinates of clusters numbered clockwise from top-left
  function automatic int mdist(int a, int b);
    int ax, ay, bx, by;
    ax = (a == 1 || a == 2); ay = (a >= 2);
    bx = (b == 1 || b == 2); by = (b >= 2);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    copy_uop_t expq[$];
    int total_copies = 0;
    start = 0; copy_ready = 0; cpq_room = '1; leaving = '0; staying = '1; loc = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int nleave, cycles, stalls, ndone;
      @(negedge clk);
      // choose the sets
      nleave = 1 + (t % 3);
      leaving = '0;
      while ($countones(leaving) != nleave) leaving[$urandom_range(0, NC - 1)] = 1'b1;
      staying = ~leaving;
      for (int r = 0; r < NUM_LREGS; r++) loc[r] = NC'($urandom_range(0, 15));
      // expected copies
      expq.delete();
      for (int r = 0; r < NUM_LREGS; r++)
        if ((loc[r] & staying) == 0 && (loc[r] & leaving) != 0) begin
          int s, d, best;
          s = -1;
          for (int c = 0; c < NC; c++) if (s < 0 && loc[r][c] && leaving[c]) s = c;
          d = -1; best = 99;
          for (int k = 1; k < NC; k++) begin
            int c;
            c = (s + k) % NC;
            if (staying[c] && mdist(s, c) < best) begin best = mdist(s, c); d = c; end
          end
          expq.push_back('{lreg: LRW'(r), src: CW'(s), dst: CW'(d)});
        end
      total_copies += expq.size();
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0; stalls = 0; ndone = 0;
      while (busy && cycles < 1000) begin
        copy_ready = ($urandom_range(0, 3) != 0);
        cpq_room   = NC'($urandom_range(0, 15)) | NC'($urandom_range(0, 15));
        #1;
        if (!copy_ready || cpq_room != '1) stalls++;
        if (copy_valid && copy_ready) begin
          checks++;
          if (expq.size() == 0 || copy != expq[0]) begin
            failures++;
            if (failures < 10) $display("test %0d: unexpected copy reg %0d %0d->%0d", t,
                                        copy.lreg, copy.src, copy.dst);
          end else begin
            void'(expq.pop_front());
          end
          checks++;
          if (!loc_set_valid || loc_set_reg != copy.lreg || loc_set_cluster != copy.dst) begin
            failures++;
            $display("test %0d: location update wrong", t);
          end
        end
        @(negedge clk);
        cycles++;
        if (done) ndone++;
      end
      checks++;
      if (expq.size() != 0) begin
        failures++;
        $display("test %0d: %0d copies missing", t, expq.size());
      end
      checks++;
      if (cycles < NUM_LREGS || cycles > NUM_LREGS + stalls || ndone != 1) begin
        failures++;
        $display("test %0d: %0d cycles, %0d stalls, done %0d", t, cycles, stalls, ndone);
      end
      copy_ready = 1'b0;
    end
    checks++;
    if (total_copies == 0) failures++;
    $display("copies checked: %0d", total_copies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
