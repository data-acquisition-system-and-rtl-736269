// tb_ram_store: self-checking test of the buffer write sequencer.
//
// RAM_STORE drives four real buffers scaled to 8 words each so that long
// events are short to simulate. The testbench plays the part of TDC_CTL
// (ev_start, words, ev_end) and of the read side (it frees buffers through
// their read ports). It checks:
//   - a short event goes to the buffer at the write pointer, last=1;
//   - a 20-word event spans three buffers (8+8+4) with last only on the third
//     and the same event tag on all three;
//   - the write pointer wraps around cyclically;
//   - can_accept is low while the buffer at the write pointer is not empty;
//   - a 40-word event with every buffer free fills all four (32 words),
//     drops 8 (word_lost) and is closed with trunc=1;
//   - every stored word, read back through the buffer read ports.
module tb_ram_store;
  import cactus_pkg::*;
  localparam int NB = 4, D = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ev_start = 0, word_valid = 0, ev_end = 0;
  logic [15:0] word = 0;
  logic        can_accept, active, word_lost;
  logic [NB-1:0] wr_start, wr_en, wr_close, buf_full, buf_last, buf_trunc;
  logic [15:0] wr_data, wr_tag;
  logic        wr_last, wr_trunc;
  mem_state_t  buf_state [NB];
  logic [3:0]  buf_len [NB];
  logic [15:0] buf_tag [NB], rd_data [NB];
  logic [NB-1:0] rd_start = 0, rd_done = 0;
  logic [2:0]  rd_addr = 0;
  int          checks = 0, failures = 0, lost = 0;

  ram_store #(.N_BUF(NB)) dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_buf
    dpram_4k #(.DEPTH(D)) u_buf (
      .clk, .rst_n, .wr_start(wr_start[b]), .wr_tag, .wr_en(wr_en[b]), .wr_data,
      .wr_close(wr_close[b]), .wr_last, .wr_trunc,
      .rd_start(rd_start[b]), .rd_addr, .rd_data(rd_data[b]), .rd_done(rd_done[b]),
      .state(buf_state[b]), .length(buf_len[b]), .full(buf_full[b]),
      .last(buf_last[b]), .trunc(buf_trunc[b]), .tag(buf_tag[b]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && word_lost) lost++;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%0t FAIL: %s", $time, what); end
  endtask

  function automatic logic [15:0] val(input int e, input int i);
    return 16'(e * 256 + i);
  endfunction

  task automatic event_words(input int e, input int n);
    @(negedge clk);
    ev_start = 1;
    @(negedge clk);
    ev_start = 0;
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      word_valid = 1; word = val(e, i);
      @(negedge clk);
      word_valid = 0;
    end
    @(negedge clk);
    ev_end = 1;
    @(negedge clk);
    ev_end = 0;
    @(negedge clk);
  endtask

  // check buffer b holds words first..first+n-1 of event e, then free it
  task automatic drain(input int b, input int e, input int first, input int n,
                       input logic lst, input logic trc);
    check(buf_state[b] == MEM_FULL, $sformatf("buffer %0d full", b));
    check(32'(buf_len[b]) == n, $sformatf("buffer %0d length %0d expected %0d", b, buf_len[b], n));
    check(buf_last[b] == lst && buf_trunc[b] == trc, $sformatf("buffer %0d flags", b));
    check(buf_tag[b] == 16'(e), $sformatf("buffer %0d tag %0d expected %0d", b, buf_tag[b], e));
    rd_start[b] = 1;
    @(negedge clk);
    rd_start[b] = 0;
    for (int i = 0; i < n; i++) begin
      rd_addr = 3'(i);
      @(negedge clk);
      check(rd_data[b] == val(e, first + i), $sformatf("buffer %0d word %0d", b, i));
    end
    rd_done[b] = 1;
    @(negedge clk);
    rd_done[b] = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(can_accept, "accepts after reset");
    event_words(0, 5);                       // buffer 0
    event_words(1, 20);                      // buffers 1, 2, 3
    check(!can_accept, "no free buffer at write pointer");
    drain(0, 0, 0, 5, 1, 0);
    check(can_accept, "buffer 0 free again");
    drain(1, 1, 0, 8, 0, 0);
    drain(2, 1, 8, 8, 0, 0);
    drain(3, 1, 16, 4, 1, 0);
    event_words(2, 3);                       // wraps to buffer 0
    drain(0, 2, 0, 3, 1, 0);
    check(lost == 0, "no word lost so far");
    event_words(3, 40);                      // buffers 1,2,3,0 then overflow
    check(lost == 8, $sformatf("%0d words lost, expected 8", lost));
    drain(1, 3, 0, 8, 0, 0);
    drain(2, 3, 8, 8, 0, 0);
    drain(3, 3, 16, 8, 0, 0);
    drain(0, 3, 24, 8, 1, 1);
    event_words(4, 0);                       // empty event in buffer 1
    drain(1, 4, 0, 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
