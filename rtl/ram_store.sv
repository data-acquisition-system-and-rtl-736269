// ram_store: write sequencer of the 4-event buffer memory.
//
// Records are written to the N_BUF buffers in cyclic order. A new event is
// accepted only when the buffer at the write pointer is empty (`can_accept`,
// used by TDC_CTL to decide whether a trigger can be taken). Each word from
// TDC_CTL is written to the current buffer; when that buffer is full the
// record is closed with last=0 and the event continues in the next buffer,
// provided that one is empty. If it is not (all buffers are in use), the
// rest of the event is dropped: the current buffer stays open and is closed
// at the end of the event with trunc=1. At ev_end the current buffer is
// closed with last=1 and the write pointer moves to the buffer after it.
// Every buffer of an event carries the same event number (tag), counted up
// per accepted event from 0.
//
// Outputs to the buffers are combinational from the registered state and
// the (registered) strobes from TDC_CTL, so a word is written in the cycle
// its word_valid arrives.
//
// Cyclic storage and contiguous buffers for long events follow the
// description; the closing of a truncated event and the event tag are this
// design's choices.
module ram_store
  import cactus_pkg::mem_state_t, cactus_pkg::MEM_EMPTY;
#(
  parameter int unsigned N_BUF = cactus_pkg::N_BUF,
  parameter int unsigned W     = cactus_pkg::TDC_W,
  parameter int unsigned TAG_W = 16,
  localparam int unsigned BW   = (N_BUF > 1) ? $clog2(N_BUF) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // from TDC_CTL
  output logic             can_accept,  // the next buffer is free
  input  logic             ev_start,    // a trigger was accepted
  input  logic             word_valid,  // one TDC word
  input  logic [W-1:0]     word,
  input  logic             ev_end,      // the TDCs have passed the token on
  // to the buffers
  output logic [N_BUF-1:0] wr_start,
  output logic [N_BUF-1:0] wr_en,
  output logic [N_BUF-1:0] wr_close,
  output logic [W-1:0]     wr_data,
  output logic [TAG_W-1:0] wr_tag,
  output logic             wr_last,
  output logic             wr_trunc,
  // from the buffers
  input  mem_state_t       buf_state [N_BUF],
  input  logic [N_BUF-1:0] buf_full,
  // status
  output logic             active,      // an event is being stored
  output logic             word_lost    // pulse: a word was dropped
);

  logic [BW-1:0]    wr_ptr, cur, nxt;
  logic [TAG_W-1:0] ev_num;
  logic             dropping;

  function automatic logic [BW-1:0] inc(input logic [BW-1:0] i);
    return (32'(i) == N_BUF - 1) ? '0 : i + 1'b1;
  endfunction

  assign nxt        = inc(cur);
  assign can_accept = !active && (buf_state[wr_ptr] == MEM_EMPTY);
  assign wr_data    = word;
  assign wr_tag     = ev_num;

  always_comb begin
    wr_start  = '0;
    wr_en     = '0;
    wr_close  = '0;
    wr_last   = 1'b0;
    wr_trunc  = 1'b0;
    word_lost = 1'b0;
    if (!active) begin
      if (ev_start && can_accept) wr_start[wr_ptr] = 1'b1;
    end else if (ev_end) begin
      wr_close[cur] = 1'b1;
      wr_last       = 1'b1;
      wr_trunc      = dropping;
    end else if (word_valid) begin
      if (!buf_full[cur]) begin
        wr_en[cur] = 1'b1;
      end else if (!dropping && buf_state[nxt] == MEM_EMPTY) begin
        wr_close[cur] = 1'b1;   // last = 0: the event goes on
        wr_start[nxt] = 1'b1;
        wr_en[nxt]    = 1'b1;
      end else begin
        word_lost = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      cur      <= '0;
      ev_num   <= '0;
      active   <= 1'b0;
      dropping <= 1'b0;
    end else if (!active) begin
      if (ev_start && can_accept) begin
        active   <= 1'b1;
        cur      <= wr_ptr;
        dropping <= 1'b0;
      end
    end else if (ev_end) begin
      active <= 1'b0;
      wr_ptr <= nxt;
      ev_num <= ev_num + 1'b1;
    end else if (word_valid && buf_full[cur]) begin
      if (!dropping && buf_state[nxt] == MEM_EMPTY) cur <= nxt;
      else                                          dropping <= 1'b1;
    end
  end

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    !(word_valid && ev_end));
  a_start_needs_room: assert property (@(posedge clk) disable iff (!rst_n)
    ev_start |-> can_accept);

endmodule
