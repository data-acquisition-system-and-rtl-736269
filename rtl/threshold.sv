// threshold: digital comparator that issues the trigger.
//
// Each clock cycle the majority sum is compared with the user-programmed
// coincidence level; when the sum is higher than the level, `trig` goes high
// on the next clock edge (one cycle of latency). A sum that stays above the
// level keeps `trig` high.
//
// Following the description, the trigger fires when the sum "exceeds" the
// level, i.e. strictly greater. Register and reset behaviour are this
// design's own.
module threshold #(
  parameter int unsigned SUM_W = cactus_pkg::SUM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SUM_W-1:0] sum,    // from majority_logic
  input  logic [SUM_W-1:0] level,  // coincidence level from the host
  output logic             trig    // registered trigger decision
);

  always_ff @(posedge clk) begin
    if (!rst_n) trig <= 1'b0;
    else        trig <= (sum > level);
  end

endmodule
