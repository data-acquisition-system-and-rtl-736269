// readout_fpga: TDC readout board with a 4-event buffer memory.
//
// A trigger makes TDC_CTL stop the TDCs (COM) and read their words out
// over the control bus. RAM_STORE writes the words into N_BUF dual-port
// buffers (DPRAM_4K) in cyclic order, spilling a long event into the next
// buffers. RAM_SELECT watches the buffer states and points RAM_READ at the
// oldest complete event, which HOST_XFER sends to the host over EPP. Write
// and read sides work at the same time, so transfers to the host add no
// dead time until the buffers fill; while no buffer is free new triggers
// are refused and counted on trig_lost.
//
// One clock runs the whole board (100 MHz assumed); trig_in, the TDC
// status lines and the host strobes are synchronized inside. The block
// structure and names are those of the readout FPGA of the description;
// word width, header and handshake details are documented in each block.
module readout_fpga
  import cactus_pkg::mem_state_t;
#(
  parameter int unsigned N_BUF = cactus_pkg::N_BUF,
  parameter int unsigned DEPTH = cactus_pkg::BUF_DEPTH,
  parameter int unsigned W     = cactus_pkg::TDC_W,
  parameter int unsigned COM_W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trig_in,
  // TDC front-panel control and data bus
  output logic         com,
  output logic         wak,
  output logic         ren,
  input  logic         wst,
  input  logic         bsy,
  input  logic         pass,
  input  logic [W-1:0] tdc_data,
  // parallel port to the host
  input  logic         n_datastb,
  input  logic         n_addrstb,
  input  logic         n_write,
  output logic         n_wait,
  input  logic [7:0]   pd_in,
  output logic [7:0]   pd_out,
  output logic         pd_oe,
  // status
  output logic         trig_lost,   // pulse: trigger refused (dead time)
  output logic         word_lost,   // pulse: word dropped, buffers full
  output logic         ev_stored,   // pulse: an event finished storing
  output logic         ev_sent,     // pulse: a buffer was freed after reading
  output logic         storing      // an event is being written to the buffers
);

  localparam int unsigned TAG_W = 16;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned BW    = (N_BUF > 1) ? $clog2(N_BUF) : 1;
  localparam int unsigned LW    = $clog2(N_BUF * DEPTH + 1);

  // TDC_CTL <-> RAM_STORE
  logic         can_accept, ev_start, word_valid, ev_end;
  logic [W-1:0] word;
  logic         store_active;

  // RAM_STORE -> buffers
  logic [N_BUF-1:0] wr_start, wr_en, wr_close;
  logic [W-1:0]     wr_data;
  logic [TAG_W-1:0] wr_tag;
  logic             wr_last, wr_trunc;

  // buffers -> RAM_SELECT / RAM_READ
  mem_state_t       buf_state [N_BUF];
  logic [AW:0]      buf_len   [N_BUF];
  logic [N_BUF-1:0] buf_full, buf_last, buf_trunc;
  logic [TAG_W-1:0] buf_tag   [N_BUF];
  logic [W-1:0]     rd_data   [N_BUF];

  // RAM_READ -> buffers
  logic [N_BUF-1:0] rd_start, rd_done;
  logic [AW-1:0]    rd_addr;

  // RAM_SELECT <-> RAM_READ
  logic             ev_ready, advance, ev_trunc;
  logic [BW-1:0]    ev_first;
  logic [BW:0]      ev_nbuf;
  logic [LW-1:0]    ev_len;
  logic [TAG_W-1:0] ev_tag;

  // RAM_READ -> HOST_XFER
  logic             out_valid, out_ready, rd_busy;
  logic [W-1:0]     out_word;

  tdc_ctl #(.W(W), .COM_W(COM_W)) u_tdc_ctl (
    .clk, .rst_n, .trig_in, .com, .wak, .ren, .wst, .bsy, .pass, .tdc_data,
    .can_accept, .ev_start, .word_valid, .word, .ev_end, .trig_lost
  );

  ram_store #(.N_BUF(N_BUF), .W(W), .TAG_W(TAG_W)) u_ram_store (
    .clk, .rst_n, .can_accept, .ev_start, .word_valid, .word, .ev_end,
    .wr_start, .wr_en, .wr_close, .wr_data, .wr_tag, .wr_last, .wr_trunc,
    .buf_state, .buf_full, .active(store_active), .word_lost
  );

  for (genvar b = 0; b < N_BUF; b++) begin : g_buf
    dpram_4k #(.DEPTH(DEPTH), .W(W), .TAG_W(TAG_W)) u_dpram (
      .clk, .rst_n,
      .wr_start(wr_start[b]), .wr_tag, .wr_en(wr_en[b]), .wr_data,
      .wr_close(wr_close[b]), .wr_last, .wr_trunc,
      .rd_start(rd_start[b]), .rd_addr, .rd_data(rd_data[b]), .rd_done(rd_done[b]),
      .state(buf_state[b]), .length(buf_len[b]), .full(buf_full[b]),
      .last(buf_last[b]), .trunc(buf_trunc[b]), .tag(buf_tag[b])
    );
  end

  ram_select #(.N_BUF(N_BUF), .DEPTH(DEPTH), .TAG_W(TAG_W)) u_ram_select (
    .clk, .rst_n, .buf_state, .buf_len, .buf_last, .buf_trunc, .buf_tag,
    .advance, .ev_ready, .ev_first, .ev_nbuf, .ev_len, .ev_trunc, .ev_tag
  );

  ram_read #(.N_BUF(N_BUF), .DEPTH(DEPTH), .W(W), .TAG_W(TAG_W)) u_ram_read (
    .clk, .rst_n, .ev_ready, .ev_first, .ev_nbuf, .ev_len, .ev_trunc, .ev_tag,
    .advance, .rd_start, .rd_done, .rd_addr, .rd_data, .buf_len,
    .out_valid, .out_word, .out_ready, .busy(rd_busy)
  );

  host_xfer #(.W(W)) u_host_xfer (
    .clk, .rst_n, .n_datastb, .n_addrstb, .n_write, .n_wait, .pd_in, .pd_out, .pd_oe,
    .ev_busy(rd_busy), .in_valid(out_valid), .in_word(out_word), .in_ready(out_ready)
  );

  assign ev_stored = ev_end;
  assign ev_sent   = advance;
  assign storing   = store_active;

endmodule
