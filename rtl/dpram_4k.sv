// dpram_4k: one event buffer of the readout FPGA, a dual-port RAM of DEPTH
// words that also keeps its own record length and status.
//
// Write side (RAM_STORE): wr_start claims an empty buffer, clears the
// length and records the event number (tag); every wr_en then writes
// wr_data at address `length` and counts it (wr_en may come with wr_start,
// the word then goes to address 0). wr_close ends the record and stores two
// flags: `last` (the event ends in this buffer; when clear it continues in
// the next buffer) and `trunc` (words of the event were lost because every
// buffer was full). Writes beyond DEPTH words are ignored; `full` tells the
// writer to move on.
//
// Read side (RAM_READ): rd_start marks the buffer as being read, rd_addr
// reads one word with one cycle of latency on rd_data, and rd_done frees the
// buffer.
//
// State (the MEMORY_STATE seen by RAM_SELECT):
//   EMPTY --wr_start--> WRITING --wr_close--> FULL --rd_start--> READING
//   READING --rd_done--> EMPTY
// Commands in the wrong state are ignored, and assertions flag them.
//
// A dual-port 4K buffer that tracks its record length and status follows
// the description; the 16-bit word, the flags, the tag and the command set
// are this design's choices.
module dpram_4k
  import cactus_pkg::*;
#(
  parameter int unsigned DEPTH = cactus_pkg::BUF_DEPTH,
  parameter int unsigned W     = cactus_pkg::TDC_W,
  parameter int unsigned TAG_W = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             wr_start,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic             wr_en,
  input  logic [W-1:0]     wr_data,
  input  logic             wr_close,
  input  logic             wr_last,
  input  logic             wr_trunc,
  // read port
  input  logic             rd_start,
  input  logic [AW-1:0]    rd_addr,
  output logic [W-1:0]     rd_data,
  input  logic             rd_done,
  // record status
  output mem_state_t       state,
  output logic [AW:0]      length,
  output logic             full,
  output logic             last,
  output logic             trunc,
  output logic [TAG_W-1:0] tag
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_addr;
  logic         do_write;

  assign full     = (length == (AW+1)'(DEPTH));
  assign wr_addr  = wr_start ? '0 : length;
  assign do_write = wr_en && (state == MEM_WRITING || (state == MEM_EMPTY && wr_start))
                    && (wr_start || !full);

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_addr[AW-1:0]] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= MEM_EMPTY;
      length <= '0;
      last   <= 1'b0;
      trunc  <= 1'b0;
      tag    <= '0;
    end else begin
      unique case (state)
        MEM_EMPTY: if (wr_start) begin
          state  <= MEM_WRITING;
          tag    <= wr_tag;
          length <= wr_en ? (AW+1)'(1) : '0;
          last   <= 1'b0;
          trunc  <= 1'b0;
        end
        MEM_WRITING: begin
          if (do_write) length <= length + 1'b1;
          if (wr_close) begin
            state <= MEM_FULL;
            last  <= wr_last;
            trunc <= wr_trunc;
          end
        end
        MEM_FULL:    if (rd_start) state <= MEM_READING;
        MEM_READING: if (rd_done)  state <= MEM_EMPTY;
        default:     state <= MEM_EMPTY;
      endcase
    end
  end

  a_start_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    wr_start |-> state == MEM_EMPTY);
  a_close_when_writing: assert property (@(posedge clk) disable iff (!rst_n)
    wr_close |-> state == MEM_WRITING);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && state == MEM_WRITING) |-> !full);
  a_read_order: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_start |-> state == MEM_FULL) and (rd_done |-> state == MEM_READING));

endmodule
