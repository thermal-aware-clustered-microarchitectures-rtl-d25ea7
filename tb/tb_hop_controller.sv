// tb_hop_controller: self-checking test of the cluster-hopping sequence.
//
// Uses the default 1dis-rot pattern with short wake-up (5) and settle (3)
// delays. For each of eight interval ends it checks: the off cluster moves
// clockwise 0 -> 1 -> 2 -> 3 -> 0; in the cycle after the interval end the
// leaving cluster stops receiving micro-ops while the joining one is powered
// but not yet steerable; copy_start is seen WAKE+1 clock edges after the edge that takes the
// interval end, with the joining cluster steerable from then on; the leaving
// cluster stays powered until it has drained, and gate pulses (for exactly
// the leaving cluster) SETTLE+1 cycles after it reports empty. A second
// interval end arriving mid-change must start another change afterwards. Every
// cycle it also checks that micro-ops only go to powered clusters.
module tb_hop_controller;
  import tac_pkg::*;
  localparam int WAKE = 5, SETTLE = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic interval_end = 1'b0, copy_done = 1'b0;
  logic [NC-1:0] cluster_empty;
  logic [NC-1:0] powered, steer_mask, leaving, staying, gate;
  logic copy_start, busy;
  logic [1:0] phase;
  logic [15:0] hops;
  int checks = 0, failures = 0;

  hop_controller #(.WAKE_CYCLES(WAKE), .SETTLE_CYCLES(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) if (rst_n) check("steer outside powered", (steer_mask & ~powered) == 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cluster is off; returns its index
  function automatic int off_of(logic [NC-1:0] m);
    for (int c = 0; c < NC; c++) if (!m[c]) return c;
    return -1;
  endfunction

  initial begin
    cluster_empty = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("reset pattern", powered == 4'b1110 && steer_mask == 4'b1110 && phase == 0);
    rst_n = 1'b1;
    for (int n = 0; n < 8; n++) begin
      int off_old, off_new, cyc, drain_wait, gate_cycle;
      logic [NC-1:0] joining, leave;
      off_old = off_of(powered);
      off_new = (off_old + 1) % NC;
      joining = NC'(1) << off_old;
      leave   = NC'(1) << off_new;
      repeat ($urandom_range(2, 6)) @(negedge clk);
      cluster_empty = ~leave;                 // leaving cluster still holds work
      interval_end = 1'b1;
      @(negedge clk);
      interval_end = 1'b0;
      check("busy after interval end", busy);
      check("joining powered", (powered & joining) == joining && powered == 4'b1111);
      check("leaving not steered", (steer_mask & leave) == 0);
      check("joining not yet steered", (steer_mask & joining) == 0);
      check("leaving mask", leaving == leave);
      // wait for copy_start
      cyc = 1;
      while (!copy_start && cyc < 100) begin
        check("joining steered during wake", (steer_mask & joining) == 0);
        @(negedge clk);
        cyc++;
      end
      check($sformatf("copy_start after %0d cycles", cyc), cyc == WAKE + 2);
      check("joining steerable after wake", steer_mask == ~leave);
      if (n == 3) begin
        // an interval end during the change is held
        interval_end = 1'b1;
        @(negedge clk);
        interval_end = 1'b0;
      end
      repeat ($urandom_range(1, 10)) @(negedge clk);
      copy_done = 1'b1;
      @(negedge clk);
      copy_done = 1'b0;
      drain_wait = $urandom_range(0, 12);
      for (int k = 0; k < drain_wait; k++) begin
        check("gated before drained", gate == 0 && (powered & leave) == leave);
        @(negedge clk);
      end
      cluster_empty = '1;
      gate_cycle = 0;
      while (gate == 0 && gate_cycle < 50) begin
        @(negedge clk);
        gate_cycle++;
      end
      check($sformatf("gate after %0d cycles", gate_cycle), gate_cycle == SETTLE + 1);
      check("gate mask", gate == leave);
      check("powered after gate", powered == ~leave && steer_mask == ~leave);
      check("hop count", hops == 16'(n + 1 + (n > 3)));
      check("phase", phase == 2'(n + 1 + (n > 3)));
      if (n == 3) begin
        // the held interval end starts the next change by itself
        @(negedge clk);
        check("held interval end served", busy);
        while (!copy_start) @(negedge clk);
        copy_done = 1'b1;
        @(negedge clk);
        copy_done = 1'b0;
        while (busy) @(negedge clk);
        @(negedge clk);
        check("extra hop rotated", off_of(powered) == (off_new + 1) % NC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
