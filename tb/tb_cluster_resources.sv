// tb_cluster_resources: self-checking test of one cluster's free-entry counters.
//
// Drives random allocations and releases that never overfill or underflow any
// structure, tracks the expected free counts of the six structures (20-entry
// integer, FP and copy queues, 96-entry memory queue, 160 integer and 160 FP
// registers) in a model, and checks every cycle the registered counts and the
// empty flag. Occasional clear pulses (the cluster being gated) must restore
// all counts to the full sizes in the next cycle.
module tb_cluster_resources;
  import tac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  res_delta_t alloc, release_;
  res_t free;
  logic empty;
  int checks = 0, failures = 0, clears = 0;
  int size[6] = '{20, 20, 20, 96, 160, 160};
  int exp[6];

  cluster_resources dut (.*);

  always #5 clk = ~clk;

  function automatic int get(res_t f, int k);
    case (k)
      0: return f.iq;   1: return f.fpq;  2: return f.cpq;
      3: return f.memq; 4: return f.ireg; default: return f.freg;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] a[6], r[6];
    alloc = '0; release_ = '0;
    foreach (exp[k]) exp[k] = size[k];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (get(free, k) != exp[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d field %0d: %0d expected %0d", cyc, k, get(free, k), exp[k]);
        end
      end
      checks++;
      if (empty != (exp[0] == 20 && exp[1] == 20 && exp[2] == 20 && exp[3] == 96)) begin
        failures++;
        $display("cycle %0d: empty %0b wrong", cyc, empty);
      end
      clear = ($urandom_range(0, 499) == 0);
      for (int k = 0; k < 6; k++) begin
        int used, fr;
        fr   = exp[k];
        used = size[k] - fr;
        // bias towards filling in the first half of each 2000-cycle period
        a[k] = 4'($urandom_range(0, ((cyc / 1000) % 2 == 0) ? 8 : 2));
        if (a[k] > fr) a[k] = 4'(fr);
        r[k] = 4'($urandom_range(0, 4));
        if (r[k] > used) r[k] = 4'(used);
        if (clear) exp[k] = size[k];
        else       exp[k] = exp[k] - a[k] + r[k];
      end
      if (clear) clears++;
      alloc    = '{iq: a[0], fpq: a[1], cpq: a[2], memq: a[3], ireg: a[4], freg: a[5]};
      release_ = '{iq: r[0], fpq: r[1], cpq: r[2], memq: r[3], ireg: r[4], freg: r[5]};
    end
    checks++;
    if (clears == 0) begin failures++; $display("no clear exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
