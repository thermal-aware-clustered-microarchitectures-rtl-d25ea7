// tb_interval_counter: self-checking test of the interval counter.
//
// Retires a random 0..8 instructions per cycle (the commit width) into a
// counter with a 100-instruction interval and compares, every cycle, the
// running count and the end-of-interval pulse with a reference model that
// keeps the exact instruction total. It also checks that the pulse comes in
// the cycle after the boundary is crossed and that the number of intervals
// matches total/100. A watchdog ends the run if it hangs.
module tb_interval_counter;
  localparam int unsigned INTERVAL = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] retired;
  logic interval_end;
  logic [$clog2(INTERVAL+16)-1:0] count;
  logic [15:0] intervals;
  int checks = 0, failures = 0;
  longint total = 0;
  int exp_count = 0, exp_ivals = 0;
  bit exp_end = 0;

  interval_counter #(.INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    retired = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      checks++;
      if (count != exp_count || interval_end != exp_end || intervals != exp_ivals) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: count %0d/%0d end %0b/%0b intervals %0d/%0d", cyc, count,
                   exp_count, interval_end, exp_end, intervals, exp_ivals);
      end
      retired = 4'($urandom_range(0, 8));
      if (cyc % 97 == 0) retired = 4'd8;
      total += retired;
      exp_count += retired;
      exp_end = 0;
      if (exp_count >= INTERVAL) begin
        exp_count -= INTERVAL;
        exp_end = 1;
        exp_ivals++;
      end
    end
    @(negedge clk);
    checks++;
    if (longint'(intervals) != total / INTERVAL) begin
      failures++;
      $display("intervals %0d, expected %0d", intervals, total / INTERVAL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
