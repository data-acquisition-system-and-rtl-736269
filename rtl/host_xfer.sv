// host_xfer: event transfer to the host computer over EPP.
//
// The host polls the address register: an address read returns 0x0C while
// an event is ready or being sent, and 0x00 otherwise. The host then reads
// the event with data reads, one byte per EPP cycle, least significant
// byte of each W-bit word first: two header words (event number; truncated
// flag and length) followed by the record. Data reads are held off (nWAIT
// stays low) while RAM_READ has no word to offer, so the transfer proceeds
// whatever the TDC side is doing. Host writes are accepted and ignored.
//
// The EPP lines (nDATASTB, nADDRSTB, nWRITE from the host, nWAIT from the
// board, an 8-bit bidirectional bus; nRESET and nINTR unused) and the 0x0C
// ready code follow the description. The byte order and the 0x00 "nothing
// ready" code are this design's choices.
module host_xfer #(
  parameter int unsigned W = cactus_pkg::TDC_W,
  localparam int unsigned NB  = W / 8,
  localparam int unsigned NBW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // parallel port
  input  logic         n_datastb,
  input  logic         n_addrstb,
  input  logic         n_write,
  output logic         n_wait,
  input  logic [7:0]   pd_in,
  output logic [7:0]   pd_out,
  output logic         pd_oe,
  // word stream from RAM_READ
  input  logic         ev_busy,
  input  logic         in_valid,
  input  logic [W-1:0] in_word,
  output logic         in_ready
);

  logic           addr_wr, data_wr, data_rd;
  logic [7:0]     wr_byte, rd_byte;
  logic [NBW-1:0] bsel;

  assign rd_byte  = in_word[8*bsel +: 8];
  assign in_ready = data_rd && (32'(bsel) == NB - 1);

  epp_slave u_epp (
    .clk, .rst_n, .n_datastb, .n_addrstb, .n_write, .n_wait,
    .pd_in, .pd_out, .pd_oe,
    .addr_wr, .data_wr, .wr_byte,
    .addr_rd_byte (ev_busy ? cactus_pkg::EVENT_READY_CODE : 8'h00),
    .rd_valid     (in_valid),
    .rd_byte,
    .data_rd
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       bsel <= '0;
    else if (data_rd) bsel <= (32'(bsel) == NB - 1) ? '0 : bsel + 1'b1;
  end

endmodule
