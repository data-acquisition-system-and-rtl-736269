// tb_dpram_4k: self-checking test of one event buffer at its full 4096-word
// depth.
//
// Records of several lengths (0, 1, random, exactly 4096) are written with
// random gaps, closed with different last/trunc flags and read back. The
// test checks the state sequence EMPTY -> WRITING -> FULL -> READING ->
// EMPTY, the length count, the `full` flag, the stored flags and tag, every
// word read back (one cycle read latency), that writes past 4096 words are
// not stored, and that commands in the wrong state change nothing.
module tb_dpram_4k;
  import cactus_pkg::*;
  localparam int DEPTH = 4096;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        wr_start = 0, wr_en = 0, wr_close = 0, wr_last = 0, wr_trunc = 0;
  logic [15:0] wr_tag = 0, wr_data = 0;
  logic        rd_start = 0, rd_done = 0;
  logic [11:0] rd_addr = 0;
  logic [15:0] rd_data, tag;
  mem_state_t  state;
  logic [12:0] length;
  logic        full, last, trunc;
  int          checks = 0, failures = 0;

  dpram_4k dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%0t FAIL: %s", $time, what); end
  endtask

  function automatic logic [15:0] pattern(input int r, input int i);
    return 16'(i * 31 + r * 1001 + 7);
  endfunction

  task automatic record(input int r, input int n, input logic lst, input logic trc);
    check(state == MEM_EMPTY, "empty before start");
    @(negedge clk);
    wr_start = 1; wr_tag = 16'(r + 100);
    wr_en = (n > 0); wr_data = pattern(r, 0);
    @(negedge clk);
    wr_start = 0; wr_en = 0;
    check(state == MEM_WRITING, "writing after start");
    for (int i = 1; i < n; i++) begin
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      wr_en = 1; wr_data = pattern(r, i);
      @(negedge clk);
      wr_en = 0;
    end
    check(length == 13'(n), $sformatf("length %0d expected %0d", length, n));
    check(full == (n == DEPTH), "full flag");
    // a close arriving now ends the record
    wr_close = 1; wr_last = lst; wr_trunc = trc;
    @(negedge clk);
    wr_close = 0;
    check(state == MEM_FULL && last == lst && trunc == trc && tag == 16'(r + 100), "closed record");
    rd_start = 1;
    @(negedge clk);
    rd_start = 0;
    check(state == MEM_READING, "reading after rd_start");
    for (int i = 0; i < n; i++) begin
      rd_addr = 12'(i);
      @(negedge clk);
      check(rd_data == pattern(r, i), $sformatf("record %0d word %0d = %h", r, i, rd_data));
    end
    rd_done = 1;
    @(negedge clk);
    rd_done = 0;
    check(state == MEM_EMPTY, "empty after rd_done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    record(0, 0, 1, 0);
    record(1, 1, 0, 0);
    record(2, 37, 1, 1);
    record(3, $urandom_range(100, 900), 1, 0);
    record(4, DEPTH, 0, 0);
    record(5, 5, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
