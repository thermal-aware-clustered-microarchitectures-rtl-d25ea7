// sensor_sampler: per-cluster temperature for the steering unit.
//
// Every functional block carries a thermal sensor; the sensors are read at the
// end of each control interval, long enough for them to settle, and the result
// is handed to the steering unit, which keeps using it for the whole next
// interval. Each cluster's sensors are reduced to one number: the hottest
// reading (AGG_MAX = 1, the peak-temperature variant, which steers better) or
// the mean (AGG_MAX = 0). The sensors themselves are analog and are outside this
// module; it receives their digital codes. The number of sensors per cluster,
// the code width (8 bits, 0.5 degC per step) and the reset value (INIT_TEMP,
// 63 degC, the warmed-up starting temperature) are choices of this design.
//
// Timing: temp[] is registered and changes in the cycle after sample is high.
module sensor_sampler
  import tac_pkg::*;
#(
  parameter int unsigned SPC       = 8,      // sensors per cluster
  parameter bit          AGG_MAX   = 1'b1,   // 1: hottest sensor, 0: mean of sensors
  parameter logic [TEMP_W-1:0] INIT_TEMP = TEMP_W'(126)  // 63 degC
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              sample,
  input  logic [NC-1:0][SPC-1:0][TEMP_W-1:0] sensor,
  output logic [NC-1:0][TEMP_W-1:0]         temp
);
  localparam int SUM_W = TEMP_W + $clog2(SPC + 1);

  logic [NC-1:0][TEMP_W-1:0] agg;

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      logic [TEMP_W-1:0] mx;
      logic [SUM_W-1:0]  sum;
      mx  = '0;
      sum = '0;
      for (int s = 0; s < SPC; s++) begin
        if (sensor[c][s] > mx) mx = sensor[c][s];
        sum = sum + SUM_W'(sensor[c][s]);
      end
      if (AGG_MAX) agg[c] = mx;
      else         agg[c] = TEMP_W'(sum / SUM_W'(SPC));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      temp <= {NC{INIT_TEMP}};
    else if (sample) temp <= agg;
  end

endmodule
