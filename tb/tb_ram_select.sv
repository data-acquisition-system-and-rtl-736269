// tb_ram_select: self-checking test of the read-sequencing logic.
//
// The buffer status inputs are driven with random combinations of states,
// lengths, last/trunc flags and tags, and the read pointer is moved on with
// `advance` pulses. A reference model in the testbench walks the buffers
// cyclically from its own copy of the read pointer and computes whether an
// event is ready, its first buffer, number of buffers, total length,
// truncation flag and tag; every output is compared with it.
module tb_ram_select;
  import cactus_pkg::*;
  localparam int NB = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  mem_state_t  buf_state [NB];
  logic [12:0] buf_len [NB];
  logic [NB-1:0] buf_last, buf_trunc;
  logic [15:0] buf_tag [NB];
  logic        advance = 0;
  logic        ev_ready, ev_trunc;
  logic [1:0]  ev_first;
  logic [2:0]  ev_nbuf;
  logic [14:0] ev_len;
  logic [15:0] ev_tag;
  int          checks = 0, failures = 0, n_ready = 0, n_multi = 0;
  int          ptr = 0;

  ram_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%0t FAIL: %s", $time, what); end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      buf_state[b] = MEM_EMPTY; buf_len[b] = 0; buf_tag[b] = 0;
    end
    buf_last = '0; buf_trunc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 5000; it++) begin
      logic r_ready, r_trunc;
      int   r_nbuf, r_len, idx;
      @(negedge clk);
      advance = 1'b0;
      for (int b = 0; b < NB; b++) begin
        buf_state[b] = ($urandom_range(0, 2) != 0) ? MEM_FULL : mem_state_t'($urandom_range(0, 3));
        buf_len[b]   = 13'($urandom_range(0, 4096));
        buf_last[b]  = ($urandom_range(0, 2) == 0);
        buf_trunc[b] = ($urandom_range(0, 1) == 0);
        buf_tag[b]   = 16'($urandom);
      end
      #1;
      // reference
      r_ready = 0; r_trunc = 0; r_nbuf = 0; r_len = 0; idx = ptr;
      for (int i = 0; i < NB; i++) begin
        if (buf_state[idx] != MEM_FULL) break;
        r_len += buf_len[idx];
        if (buf_last[idx]) begin
          r_ready = 1; r_nbuf = i + 1; r_trunc = buf_trunc[idx]; break;
        end
        idx = (idx + 1) % NB;
      end
      check(ev_ready == r_ready, "ready");
      check(32'(ev_first) == ptr, "first buffer");
      check(ev_tag == buf_tag[ptr], "tag");
      if (r_ready) begin
        n_ready++;
        if (r_nbuf > 1) n_multi++;
        check(32'(ev_nbuf) == r_nbuf, $sformatf("nbuf %0d expected %0d", ev_nbuf, r_nbuf));
        check(32'(ev_len) == r_len, $sformatf("len %0d expected %0d", ev_len, r_len));
        check(ev_trunc == r_trunc, "trunc");
      end
      if ($urandom_range(0, 1) == 1) begin
        advance = 1'b1;
        ptr = (ptr + 1) % NB;
      end
    end
    check(n_ready > 100 && n_multi > 20, "coverage of ready and multi-buffer events");
    $display("ready %0d multi-buffer %0d", n_ready, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
