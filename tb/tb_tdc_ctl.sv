// tb_tdc_ctl: self-checking test of the TDC control-bus interface.
//
// Two TDC models form a PASS->REN daisy chain. For a series of events with
// random word counts per module (zero included) the testbench triggers
// TDC_CTL and checks: one ev_start per accepted trigger, the COM pulse
// width, every word delivered in chain order with the expected value, one
// ev_end after the last word, the word rate (at most 10 clock cycles, i.e.
// 10 MHz at 100 MHz, per word), and that a trigger is refused and counted
// when can_accept is low or readout is still running.
module tb_tdc_ctl;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        trig_in = 1'b0;
  logic        com, wak, ren, wst, bsy, pass;
  logic [15:0] tdc_data;
  logic        can_accept = 1'b1;
  logic        ev_start, word_valid, ev_end, trig_lost;
  logic [15:0] word;
  int          checks = 0, failures = 0;

  logic        wst0, wst1, bsy0, bsy1, pass0, pass1;
  logic [15:0] d0, d1;
  int          nw0 = 0, nw1 = 0, evs0, evs1;

  tdc_ctl dut (.clk, .rst_n, .trig_in, .com, .wak, .ren, .wst, .bsy, .pass, .tdc_data,
               .can_accept, .ev_start, .word_valid, .word, .ev_end, .trig_lost);

  tdc_model #(.ID(1)) u_t0 (.clk, .com, .ren(ren),   .wak, .n_words(nw0),
                            .wst(wst0), .bsy(bsy0), .pass(pass0), .data(d0), .events(evs0));
  tdc_model #(.ID(2)) u_t1 (.clk, .com, .ren(pass0), .wak, .n_words(nw1),
                            .wst(wst1), .bsy(bsy1), .pass(pass1), .data(d1), .events(evs1));

  assign wst      = wst0 | wst1;
  assign bsy      = bsy0 | bsy1;
  assign pass     = pass1;
  assign tdc_data = bsy0 ? d0 : d1;

  always #5 clk = ~clk;

  // capture what TDC_CTL hands on
  logic [15:0] got [$];
  int          n_start = 0, n_end = 0, n_lost = 0, com_len = 0, com_max = 0;
  always @(posedge clk) if (rst_n) begin
    if (word_valid) got.push_back(word);
    if (ev_start && rst_n) n_start++;
    if (ev_end)   n_end++;
    if (trig_lost) n_lost++;
    if (com) com_len++; else com_len = 0;
    if (com_len > com_max) com_max = com_len;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expect_word(input int id, input int e, input int i);
    return 16'(id * 4096 + i) ^ 16'(e * 257);
  endfunction

  task automatic pulse_trig();
    @(negedge clk); trig_in = 1'b1;
    repeat (4) @(negedge clk); trig_in = 1'b0;
  endtask

  initial begin
    int t0, t1, lost0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int e = 0; e < 12; e++) begin
      nw0 = (e == 3) ? 0 : $urandom_range(0, 40);
      nw1 = (e == 5) ? 0 : $urandom_range(0, 40);
      got.delete();
      pulse_trig();
      t0 = $time;
      // a second trigger during readout must be refused
      lost0 = n_lost;
      repeat (30) @(negedge clk);
      if (nw0 + nw1 > 10) begin
        pulse_trig();
        repeat (6) @(posedge clk);
        checks++;
        if (n_lost != lost0 + 1) begin failures++; $display("busy trigger not refused"); end
      end
      while (n_end <= e) @(posedge clk);
      t1 = $time;
      checks++;
      if (n_start != e + 1) begin failures++; $display("ev_start count %0d", n_start); end
      checks++;
      if (got.size() != nw0 + nw1) begin
        failures++; $display("event %0d: %0d words, expected %0d", e, got.size(), nw0 + nw1);
      end else begin
        for (int i = 0; i < nw0 + nw1; i++) begin
          logic [15:0] x;
          x = (i < nw0) ? expect_word(1, e, i) : expect_word(2, e, i - nw0);
          checks++;
          if (got[i] !== x) begin failures++; $display("event %0d word %0d: %h expected %h", e, i, got[i], x); end
        end
      end
      // word rate: cycles per word at most 10 (10 MHz at a 100 MHz clock)
      if (nw0 + nw1 >= 20) begin
        checks++;
        if ((t1 - t0) / 10 > 10 * (nw0 + nw1) + 60) begin
          failures++; $display("event %0d too slow: %0d cycles for %0d words", e, (t1 - t0) / 10, nw0 + nw1);
        end
      end
      repeat (10) @(posedge clk);
    end
    checks++;
    if (com_max != 5) begin failures++; $display("COM width %0d", com_max); end
    // no buffer free: trigger refused, no COM
    can_accept = 1'b0;
    lost0 = n_lost;
    pulse_trig();
    repeat (20) @(posedge clk);
    checks++;
    if (n_lost != lost0 + 1 || n_start != 12) begin
      failures++; $display("trigger taken without buffer: lost %0d->%0d start %0d", lost0, n_lost, n_start);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
