// ram_read: reads buffered events back, oldest first, as a word stream.
//
// When RAM_SELECT reports a ready event, RAM_READ takes it and sends, on a
// valid/ready word stream towards HOST_XFER:
//   word 0 : event number (tag)
//   word 1 : {truncated flag, total length in words (W-1 bits)}
//   then   : the record, buffer after buffer, each from address 0 up to
//            its own length.
// Each buffer is marked READING when its readout starts and freed (rd_done,
// and `advance` to RAM_SELECT) when its last word has been taken, so the
// write side can reuse it while later buffers of the event are still being
// read. The buffers read with one cycle of latency; a word is offered one
// cycle after its address and held until accepted.
//
// Cyclic, oldest-first read-back follows the description; the two header
// words and their layout are this design's choice (the description says
// only that the host reads "a few header words" before the record).
module ram_read #(
  parameter int unsigned N_BUF = cactus_pkg::N_BUF,
  parameter int unsigned DEPTH = cactus_pkg::BUF_DEPTH,
  parameter int unsigned W     = cactus_pkg::TDC_W,
  parameter int unsigned TAG_W = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = (N_BUF > 1) ? $clog2(N_BUF) : 1,
  localparam int unsigned LW   = $clog2(N_BUF * DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // from RAM_SELECT
  input  logic             ev_ready,
  input  logic [BW-1:0]    ev_first,
  input  logic [BW:0]      ev_nbuf,
  input  logic [LW-1:0]    ev_len,
  input  logic             ev_trunc,
  input  logic [TAG_W-1:0] ev_tag,
  output logic             advance,
  // to / from the buffers
  output logic [N_BUF-1:0] rd_start,
  output logic [N_BUF-1:0] rd_done,
  output logic [AW-1:0]    rd_addr,
  input  logic [W-1:0]     rd_data  [N_BUF],
  input  logic [AW:0]      buf_len  [N_BUF],
  // word stream to HOST_XFER
  output logic             out_valid,
  output logic [W-1:0]     out_word,
  input  logic             out_ready,
  output logic             busy       // an event is being sent
);

  typedef enum logic [2:0] {
    R_IDLE, R_HDR0, R_HDR1, R_BUF, R_ADDR, R_DATA, R_FREE
  } rstate_t;

  rstate_t        state;
  logic [BW-1:0]  cur;
  logic [BW:0]    left;
  logic [AW:0]    addr, blen;
  logic [TAG_W-1:0] tag_q;
  logic [LW-1:0]  len_q;
  logic           trunc_q;

  assign busy    = (state != R_IDLE);
  assign rd_addr = addr[AW-1:0];
  assign advance = (state == R_FREE);

  always_comb begin
    rd_start = '0;
    rd_done  = '0;
    if (state == R_BUF)  rd_start[cur] = 1'b1;
    if (state == R_FREE) rd_done[cur]  = 1'b1;
  end

  always_comb begin
    out_valid = 1'b0;
    out_word  = '0;
    unique case (state)
      R_HDR0: begin out_valid = 1'b1; out_word = W'(tag_q); end
      R_HDR1: begin out_valid = 1'b1; out_word = {trunc_q, (W-1)'(len_q)}; end
      R_DATA: begin out_valid = 1'b1; out_word = rd_data[cur]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= R_IDLE;
      cur     <= '0;
      left    <= '0;
      addr    <= '0;
      blen    <= '0;
      tag_q   <= '0;
      len_q   <= '0;
      trunc_q <= 1'b0;
    end else begin
      unique case (state)
        R_IDLE: if (ev_ready) begin
          cur     <= ev_first;
          left    <= ev_nbuf;
          tag_q   <= ev_tag;
          len_q   <= ev_len;
          trunc_q <= ev_trunc;
          state   <= R_HDR0;
        end
        R_HDR0: if (out_ready) state <= R_HDR1;
        R_HDR1: if (out_ready) state <= R_BUF;
        R_BUF: begin
          addr  <= '0;
          blen  <= buf_len[cur];
          state <= (buf_len[cur] == 0) ? R_FREE : R_ADDR;
        end
        R_ADDR: state <= R_DATA;
        R_DATA: if (out_ready) begin
          addr  <= addr + 1'b1;
          state <= (addr + 1'b1 == blen) ? R_FREE : R_ADDR;
        end
        R_FREE: begin
          cur   <= (32'(cur) == N_BUF - 1) ? '0 : cur + 1'b1;
          left  <= left - 1'b1;
          state <= (left == 1) ? R_IDLE : R_BUF;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  a_ready_only_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    out_ready |-> out_valid);

endmodule
