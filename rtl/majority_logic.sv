// majority_logic: counts how many of the N_IN channels carry a hit in the
// current 10 ns window (one 100 MHz clock cycle).
//
// The count is formed by a binary tree of two-input adders with a register
// after every level, so each level is a single small adder and the tree runs
// at the full clock rate. The tree has LEVELS = ceil(log2(N_IN)) levels, so
// `sum` belongs to the hit vector presented LEVELS cycles earlier (7 cycles
// for 80 channels). The final value is clipped at 2**SUM_W-1 (63): any count
// above that reads as 63, which is why the threshold cannot exceed 63.
//
// Pipelining, and a 6-bit result, follow the system description. The
// choice of a balanced binary tree, and clipping (saturating) rather than
// dropping the high bit, are this design's reading of "truncated at six
// bits".
module majority_logic #(
  parameter int unsigned N_IN  = cactus_pkg::N_CH,
  parameter int unsigned SUM_W = cactus_pkg::SUM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  hits,  // delayed, time-aligned hits
  output logic [SUM_W-1:0] sum    // saturated count, LEVELS cycles later
);

  localparam int unsigned LEVELS = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned CNT_W  = $clog2(N_IN + 1);
  localparam logic [CNT_W-1:0] SAT = CNT_W'((1 << SUM_W) - 1);

  // node[l][i] is node i of level l; level 0 is the input vector.
  logic [CNT_W-1:0] node [LEVELS+1][N_IN];

  always_comb begin
    for (int unsigned i = 0; i < N_IN; i++)
      node[0][i] = CNT_W'(hits[i]);
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned N_PREV = (N_IN + (1 << (l - 1)) - 1) >> (l - 1);
    localparam int unsigned N_THIS = (N_PREV + 1) / 2;
    for (genvar i = 0; i < N_IN; i++) begin : g_node
      if (i < N_THIS) begin : g_add
        logic [CNT_W-1:0] a, b;
        assign a = node[l-1][2*i];
        if (2*i + 1 < N_PREV) begin : g_pair
          assign b = node[l-1][2*i+1];
        end else begin : g_odd
          assign b = '0;
        end
        always_ff @(posedge clk) begin
          if (!rst_n) node[l][i] <= '0;
          else        node[l][i] <= a + b;
        end
      end else begin : g_unused
        assign node[l][i] = '0;
      end
    end
  end

  assign sum = (node[LEVELS][0] > SAT) ? SUM_W'(SAT) : SUM_W'(node[LEVELS][0]);

endmodule
