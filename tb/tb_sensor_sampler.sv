// tb_sensor_sampler: self-checking test of the per-cluster sensor readout.
//
// Two instances read the same random sensor codes, one reducing each cluster
// to its hottest sensor and one to the mean. The test checks the reset value
// (the warmed-up starting temperature), that the outputs hold while sample is
// low even though the sensors change, and that after a sample each cluster's
// value equals the maximum / truncated mean computed here, one cycle later.
module tb_sensor_sampler;
  import tac_pkg::*;
  localparam int SPC = 8;

  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  logic [NC-1:0][SPC-1:0][TEMP_W-1:0] sensor;
  logic [NC-1:0][TEMP_W-1:0] temp_max, temp_avg;
  logic [NC-1:0][TEMP_W-1:0] exp_max, exp_avg;
  int checks = 0, failures = 0;

  sensor_sampler #(.SPC(SPC), .AGG_MAX(1'b1)) dut_max (.clk, .rst_n, .sample, .sensor, .temp(temp_max));
  sensor_sampler #(.SPC(SPC), .AGG_MAX(1'b0)) dut_avg (.clk, .rst_n, .sample, .sensor, .temp(temp_avg));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [NC-1:0][TEMP_W-1:0] got,
                       input logic [NC-1:0][TEMP_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic randomize_sensors();
    for (int c = 0; c < NC; c++)
      for (int s = 0; s < SPC; s++) sensor[c][s] = TEMP_W'($urandom_range(90, 200));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    randomize_sensors();
    repeat (2) @(posedge clk);
    check("reset max", temp_max, {NC{TEMP_W'(126)}});
    check("reset avg", temp_avg, {NC{TEMP_W'(126)}});
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      randomize_sensors();
      for (int c = 0; c < NC; c++) begin
        int mx, sum;
        mx = 0; sum = 0;
        for (int s = 0; s < SPC; s++) begin
          if (sensor[c][s] > mx) mx = sensor[c][s];
          sum += sensor[c][s];
        end
        exp_max[c] = TEMP_W'(mx);
        exp_avg[c] = TEMP_W'(sum / SPC);
      end
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      check("max", temp_max, exp_max);
      check("avg", temp_avg, exp_avg);
      randomize_sensors();
      @(negedge clk);
      check("hold max", temp_max, exp_max);
      check("hold avg", temp_avg, exp_avg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
