// ram_select: decides which buffered event is read out next.
//
// It keeps the read pointer, the oldest buffer not yet read, and looks at
// the MEMORY_STATE of the buffers in cyclic order from there. An event is
// ready when the buffers from the read pointer on are FULL up to and
// including one that holds the end of the event (last=1); an event may
// span up to N_BUF buffers. For a ready event it reports the first buffer,
// the number of buffers, the total length in words, the truncation flag of
// the closing buffer and the event tag. RAM_READ pulses `advance` each time
// it frees a buffer, moving the read pointer one buffer on.
//
// The outputs are combinational in the buffer status, so they are never
// stale when RAM_READ looks at them.
//
// Gathering the buffer states and reading oldest-first follow the
// description; the event summary it passes on is this design's choice.
module ram_select
  import cactus_pkg::mem_state_t, cactus_pkg::MEM_FULL;
#(
  parameter int unsigned N_BUF = cactus_pkg::N_BUF,
  parameter int unsigned DEPTH = cactus_pkg::BUF_DEPTH,
  parameter int unsigned TAG_W = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = (N_BUF > 1) ? $clog2(N_BUF) : 1,
  localparam int unsigned LW   = $clog2(N_BUF * DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mem_state_t       buf_state [N_BUF],
  input  logic [AW:0]      buf_len   [N_BUF],
  input  logic [N_BUF-1:0] buf_last,
  input  logic [N_BUF-1:0] buf_trunc,
  input  logic [TAG_W-1:0] buf_tag   [N_BUF],
  input  logic             advance,     // from RAM_READ: a buffer was freed
  output logic             ev_ready,
  output logic [BW-1:0]    ev_first,    // = read pointer
  output logic [BW:0]      ev_nbuf,     // buffers in the event
  output logic [LW-1:0]    ev_len,      // words in the event
  output logic             ev_trunc,
  output logic [TAG_W-1:0] ev_tag
);

  logic [BW-1:0] rd_ptr;

  always_ff @(posedge clk) begin
    if (!rst_n)       rd_ptr <= '0;
    else if (advance) rd_ptr <= (32'(rd_ptr) == N_BUF - 1) ? '0 : rd_ptr + 1'b1;
  end

  always_comb begin
    logic          run;
    logic [BW-1:0] idx;
    run      = 1'b1;
    idx      = rd_ptr;
    ev_ready = 1'b0;
    ev_nbuf  = '0;
    ev_len   = '0;
    ev_trunc = 1'b0;
    for (int unsigned i = 0; i < N_BUF; i++) begin
      if (run) begin
        if (buf_state[idx] == MEM_FULL) begin
          ev_len = ev_len + LW'(buf_len[idx]);
          if (buf_last[idx]) begin
            ev_ready = 1'b1;
            ev_nbuf  = (BW+1)'(i + 1);
            ev_trunc = buf_trunc[idx];
            run      = 1'b0;
          end
        end else begin
          run = 1'b0;
        end
      end
      idx = (32'(idx) == N_BUF - 1) ? '0 : idx + 1'b1;
    end
  end

  assign ev_first = rd_ptr;
  assign ev_tag   = buf_tag[rd_ptr];

endmodule
