// trigger_fpga: pattern trigger of the telescope, one 100 MHz clock domain.
//
// Every discriminator channel passes through its own adjustable delay line,
// which removes the flight-path difference of the light from its heliostat
// so that the hits of one air shower leave the lines in the same 10 ns clock
// cycle. The majority logic counts the aligned hits per cycle (clipped at
// 63) and the threshold comparator raises the trigger when the count is
// higher than the coincidence level. Delays and level are written by the
// host over the parallel port (trig_comm).
//
// Latency from an aligned hit leaving the delay lines to trig_out rising is
// LEVELS+2 cycles (7 adder levels, the comparator register and the output
// stretcher): 9 cycles, 90 ns, for 80 channels. trig_out is held high for
// TRIG_W cycles after the last cycle above level, so a readout board on
// another clock can see it.
//
// The structure (delay lines, majority logic, threshold, parallel port) is
// that of the system description; the output stretch of TRIG_W = 4 cycles
// is this design's choice.
module trigger_fpga #(
  parameter int unsigned N_CH        = cactus_pkg::N_CH,
  parameter int unsigned DELAY_DEPTH = cactus_pkg::DELAY_DEPTH,
  parameter int unsigned DELAY_W     = cactus_pkg::DELAY_W,
  parameter int unsigned SUM_W       = cactus_pkg::SUM_W,
  parameter int unsigned TRIG_W      = 4
) (
  input  logic             clk,       // 100 MHz global clock
  input  logic             rst_n,
  input  logic [N_CH-1:0]  hits,      // discriminator outputs (after LVDS)
  // parallel port to the host
  input  logic             n_datastb,
  input  logic             n_addrstb,
  input  logic             n_write,
  output logic             n_wait,
  input  logic [7:0]       pd_in,
  output logic [7:0]       pd_out,
  output logic             pd_oe,
  // to the readout FPGA
  output logic             trig_out,
  // observation
  output logic [SUM_W-1:0] sum,       // current majority count
  output logic [SUM_W-1:0] level      // current coincidence level
);

  logic [DELAY_W-1:0] delay_code [N_CH];
  logic [N_CH-1:0]    aligned;
  logic               trig;
  logic [$clog2(TRIG_W+1)-1:0] stretch;

  trig_comm #(.N_CH(N_CH), .DELAY_W(DELAY_W), .SUM_W(SUM_W)) u_comm (
    .clk, .rst_n, .n_datastb, .n_addrstb, .n_write, .n_wait,
    .pd_in, .pd_out, .pd_oe, .delay_code, .level
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    delay_line #(.DEPTH(DELAY_DEPTH), .CODE_W(DELAY_W)) u_dly (
      .clk, .rst_n, .code(delay_code[c]), .hit_in(hits[c]), .hit_out(aligned[c])
    );
  end

  majority_logic #(.N_IN(N_CH), .SUM_W(SUM_W)) u_maj (
    .clk, .rst_n, .hits(aligned), .sum
  );

  threshold #(.SUM_W(SUM_W)) u_thr (
    .clk, .rst_n, .sum, .level, .trig
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       stretch <= '0;
    else if (trig)    stretch <= ($bits(stretch))'(TRIG_W);
    else if (stretch != 0) stretch <= stretch - 1'b1;
  end

  assign trig_out = (stretch != 0);

endmodule
