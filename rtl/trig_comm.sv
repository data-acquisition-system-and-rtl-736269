// trig_comm: parallel-port communication block of the trigger FPGA.
//
// The host steers the trigger in real time over an EPP link (epp_slave):
//   data write    : one 8-bit delay code enters a shift register of N_CH
//                   bytes that drives the delay lines directly. A write
//                   shifts every byte one channel down and puts the new
//                   byte at channel N_CH-1, so after N_CH writes the first
//                   byte written sits at channel 0.
//   address write : the low SUM_W bits of the address byte set the
//                   coincidence level used by the threshold comparator.
//   address read  : returns the current coincidence level.
//   data read     : returns 0 (the trigger has nothing else to report).
// Delay codes take effect as soon as they are shifted in.
//
// Delay bytes through a shift register and the level through the address
// field follow the description; the shift direction, the read-back and the
// reset values (all delays 0, level 2**SUM_W-1) are this design's choices.
module trig_comm #(
  parameter int unsigned N_CH    = cactus_pkg::N_CH,
  parameter int unsigned DELAY_W = cactus_pkg::DELAY_W,
  parameter int unsigned SUM_W   = cactus_pkg::SUM_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               n_datastb,
  input  logic               n_addrstb,
  input  logic               n_write,
  output logic               n_wait,
  input  logic [7:0]         pd_in,
  output logic [7:0]         pd_out,
  output logic               pd_oe,
  output logic [DELAY_W-1:0] delay_code [N_CH],  // to the delay lines
  output logic [SUM_W-1:0]   level               // to the threshold
);

  logic       addr_wr, data_wr, data_rd;
  logic [7:0] wr_byte;

  epp_slave u_epp (
    .clk, .rst_n, .n_datastb, .n_addrstb, .n_write, .n_wait,
    .pd_in, .pd_out, .pd_oe,
    .addr_wr, .data_wr, .wr_byte,
    .addr_rd_byte (8'(level)),
    .rd_valid     (1'b1),
    .rd_byte      (8'h00),
    .data_rd
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < N_CH; c++) delay_code[c] <= '0;
      level <= '1;
    end else begin
      if (data_wr) begin
        for (int unsigned c = 0; c + 1 < N_CH; c++) delay_code[c] <= delay_code[c+1];
        delay_code[N_CH-1] <= DELAY_W'(wr_byte);
      end
      if (addr_wr) level <= wr_byte[SUM_W-1:0];
    end
  end

endmodule
