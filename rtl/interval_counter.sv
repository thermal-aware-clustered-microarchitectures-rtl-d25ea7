// interval_counter: marks the end of each control interval.
//
// The thermal control acts once per interval of INTERVAL retired instructions
// (10 million in the evaluated machine): at its end the thermal sensors are read
// and the set of active clusters may change. Each cycle the core reports how many
// instructions retired (0 to 8, the commit width). The counter accumulates them
// and, in the cycle after the total reaches INTERVAL, pulses interval_end for one
// cycle; instructions beyond the boundary are carried into the next interval so
// that intervals stay exactly INTERVAL long on average. That carry, and counting
// in a register rather than in the simulator, are choices of this design.
//
// Interface: retired (count this cycle), interval_end (one-cycle pulse, registered),
// count (instructions so far in the current interval), intervals (number ended).
module interval_counter #(
  parameter int unsigned INTERVAL = 10_000_000,
  parameter int unsigned RET_W    = 4            // width of the per-cycle retire count
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [RET_W-1:0]              retired,
  output logic                          interval_end,
  output logic [$clog2(INTERVAL+16)-1:0] count,
  output logic [15:0]                   intervals
);
  localparam int W = $clog2(INTERVAL + 16);

  logic [W-1:0] sum;
  assign sum = count + W'(retired);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      interval_end <= 1'b0;
      intervals    <= '0;
    end else if (sum >= W'(INTERVAL)) begin
      count        <= sum - W'(INTERVAL);
      interval_end <= 1'b1;
      intervals    <= intervals + 16'd1;
    end else begin
      count        <= sum;
      interval_end <= 1'b0;
    end
  end

endmodule
