// tb_daq_rate: trigger-rate and dead-time run of the readout board at full
// size (four 4096-word buffers), with the host reading all the time.
//
// Triggers arrive at random (exponentially distributed) intervals. Each
// event has a random size of 50 to 6000 words, split over two daisy-chained
// TDC models. An EPP host model polls for events without pause and
// compares every word with what the TDC models sent. The run has two
// phases, with the time scaled down about a hundredfold from a real
// telescope:
//   low rate  : mean interval 500k cycles (5 ms). The buffers never fill,
//               so the board is dead only while the TDCs are being read
//               (COM or REN high). That fraction of the time must stay
//               under 10%.
//   high rate : mean interval 15k cycles. The host cannot keep up, so the
//               buffers fill and triggers must be refused.
// In both phases every accepted event must reach the host intact and in
// order. The lost triggers of each phase are printed.
module tb_daq_rate;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        trig_in = 1'b0;
  logic        com, wak, ren, wst, bsy, pass;
  logic [15:0] tdc_data;
  logic        n_datastb, n_addrstb, n_write, n_wait, pd_oe;
  logic [7:0]  pd_in, pd_out;
  logic        trig_lost, word_lost, ev_stored, ev_sent, storing;
  int          checks = 0, failures = 0;

  logic        wst0, wst1, bsy0, bsy1, pass0, pass1;
  logic [15:0] d0, d1;
  int          nw0 = 0, nw1 = 0, evs0, evs1;
  int          n_lost_trig = 0, n_lost_word = 0;

  readout_fpga dut (.*);

  tdc_model #(.ID(1)) u_t0 (.clk, .com, .ren(ren),   .wak, .n_words(nw0),
                            .wst(wst0), .bsy(bsy0), .pass(pass0), .data(d0), .events(evs0));
  tdc_model #(.ID(2)) u_t1 (.clk, .com, .ren(pass0), .wak, .n_words(nw1),
                            .wst(wst1), .bsy(bsy1), .pass(pass1), .data(d1), .events(evs1));
  assign wst      = wst0 | wst1;
  assign bsy      = bsy0 | bsy1;
  assign pass     = pass1;
  assign tdc_data = bsy0 ? d0 : d1;

  epp_host #(.TIMEOUT(100000)) u_host (.clk, .n_datastb, .n_addrstb, .n_write, .pd(pd_in),
                                       .n_wait, .pd_periph(pd_out), .pd_oe);

  always #5 clk = ~clk;

  longint busy_cycles = 0, all_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    all_cycles++;
    if (com || ren) busy_cycles++;
    if (trig_lost) n_lost_trig++;
    if (word_lost) n_lost_word++;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%0t FAIL: %s", $time, what); end
  endtask

  function automatic logic [15:0] wv(input int id, input int e, input int i);
    return 16'(id * 4096 + i) ^ 16'(e * 257);
  endfunction

  typedef struct { int tag; int n0; int n1; int e; } exp_t;
  exp_t expq [$];
  int   n_accepted = 0, n_read = 0;
  logic host_stop = 1'b0;

  // One trigger; returns 1 if the board took it.
  task automatic trigger(output logic taken);
    int lost0;
    lost0 = n_lost_trig;
    nw0 = $urandom_range(25, 3000);
    nw1 = $urandom_range(25, 3000);
    @(negedge clk); trig_in = 1'b1;
    repeat (4) @(negedge clk); trig_in = 1'b0;
    repeat (12) @(posedge clk);
    taken = (n_lost_trig == lost0);
    if (taken) begin
      exp_t x;
      x.tag = n_accepted; x.n0 = nw0; x.n1 = nw1; x.e = evs0;
      expq.push_back(x);
      n_accepted++;
    end
  endtask

  task automatic read_word(output logic [15:0] w);
    logic [7:0] lo, hi;
    u_host.read_data(lo);
    u_host.read_data(hi);
    w = {hi, lo};
  endtask

  // the host: poll, read, compare, forever
  initial begin
    logic [7:0]  st;
    logic [15:0] w, tag, hdr;
    exp_t        x;
    int          errs;
    wait (rst_n);
    forever begin
      u_host.read_addr(st);
      if (st == 8'h0C) begin
        read_word(tag);
        read_word(hdr);
        if (expq.size() == 0) begin
          check(1'b0, "event read that was never accepted");
        end else begin
          x = expq.pop_front();
          check(tag == 16'(x.tag), $sformatf("tag %0d expected %0d", tag, x.tag));
          check(hdr == {1'b0, 15'(x.n0 + x.n1)}, $sformatf("header %h expected %0d", hdr, x.n0 + x.n1));
          errs = 0;
          for (int i = 0; i < 32'(hdr[14:0]); i++) begin
            logic [15:0] e;
            read_word(w);
            e = (i < x.n0) ? wv(1, x.e, i) : wv(2, x.e, i - x.n0);
            if (w != e) errs++;
          end
          check(errs == 0, $sformatf("event %0d: %0d words wrong", x.tag, errs));
          n_read++;
        end
      end
    end
  end

  task automatic phase(input int n_trig, input real mean, output int lost);
    logic tk;
    int   lost0;
    lost0 = n_lost_trig;
    for (int i = 0; i < n_trig; i++) begin
      int gap;
      gap = int'(-mean * $ln(real'($urandom_range(1, 1000000)) / 1.0e6));
      if (gap < 50) gap = 50;
      repeat (gap) @(posedge clk);
      trigger(tk);
    end
    lost = n_lost_trig - lost0;
  endtask

  initial begin
    int lost_lo, lost_hi;
    real dead;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    phase(25, 500000.0, lost_lo);
    dead = real'(busy_cycles) / real'(all_cycles);
    phase(25, 15000.0, lost_hi);
    while (n_read < n_accepted) @(posedge clk);
    repeat (100) @(posedge clk);
    $display("low rate: %0d of 25 triggers lost; high rate: %0d of 25 lost; %0d events read",
             lost_lo, lost_hi, n_read);
    $display("low-rate dead time %0.1f%%", dead * 100.0);
    check(dead < 0.10, "low-rate dead time under 10%");
    check(lost_hi > 0, "buffers fill at high rate");
    check(n_read == n_accepted && n_read == 50 - lost_lo - lost_hi, "every accepted event read");
    check(n_lost_word == 0, "no event over 16K words");
    check(!u_host.timed_out, "no EPP timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
