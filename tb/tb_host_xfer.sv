// tb_host_xfer: self-checking test of the EPP event transfer.
//
// An EPP host model polls the address register and reads bytes; the
// testbench plays RAM_READ with a queue of 16-bit words. Checked: the
// address read gives 0x00 with no event and 0x0C with one; data reads
// return each word low byte first, then high byte; each word is taken
// (in_ready) exactly once, after its second byte; a data read issued while
// no word is available is held off and completes with the right byte once
// the word appears; host writes disturb nothing.
module tb_host_xfer;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        n_datastb, n_addrstb, n_write, n_wait, pd_oe;
  logic [7:0]  pd_in, pd_out;
  logic        ev_busy = 0, in_valid, in_ready;
  logic [15:0] in_word;
  int          checks = 0, failures = 0, taken = 0;
  logic [15:0] words [$];
  logic        hold = 0;

  host_xfer dut (.*);

  epp_host #(.TIMEOUT(5000)) u_host (.clk, .n_datastb, .n_addrstb, .n_write, .pd(pd_in),
                                     .n_wait, .pd_periph(pd_out), .pd_oe);

  always #5 clk = ~clk;

  assign in_valid = !hold && words.size() > 0;
  assign in_word  = (words.size() > 0) ? words[0] : 16'h0;
  always @(posedge clk) if (rst_n && in_ready) begin
    void'(words.pop_front());
    taken++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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
    logic [7:0]  b, lo, hi;
    logic [15:0] ref_words [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    u_host.read_addr(b);
    check(b == 8'h00, $sformatf("idle status %h", b));
    u_host.write_addr(8'h55);
    u_host.write_data(8'hAA);
    for (int i = 0; i < 50; i++) begin
      words.push_back(16'($urandom));
      ref_words.push_back(words[i]);
    end
    ev_busy = 1;
    u_host.read_addr(b);
    check(b == 8'h0C, $sformatf("ready status %h", b));
    for (int i = 0; i < 50; i++) begin
      if (i == 20) begin
        hold = 1;
        fork
          begin repeat (300) @(posedge clk); hold = 0; end
        join_none
      end
      u_host.read_data(lo);
      u_host.read_data(hi);
      check({hi, lo} == ref_words[i], $sformatf("word %0d: %h expected %h", i, {hi, lo}, ref_words[i]));
      check(taken == i + 1, $sformatf("words taken %0d after word %0d", taken, i));
    end
    check(!u_host.timed_out, "no EPP timeout");
    ev_busy = 0;
    u_host.read_addr(b);
    check(b == 8'h00, "status back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
