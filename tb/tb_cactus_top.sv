// tb_cactus_top: end-to-end test of the whole system at its full size
// (80 channels, 64-step delay lines, four 4096-word buffers).
//
// Two host models program the trigger board (80 random delay codes, a
// coincidence level) and read events from the readout board. Showers of
// K hits, timed so that the programmed delays line them up, are fed to the
// discriminator inputs; two TDC models on a PASS->REN daisy chain supply
// the event words. The trigger clock runs at 100 MHz and the readout clock
// at 100 MHz with a different phase, so the trigger crosses clock domains.
//
// The testbench predicts each outcome and compares every byte read by the
// host. Each mechanism is counted and must occur at least once:
//   aligned shower above level -> trigger -> event read out
//   shower at or below level -> no event
//   same hits without the delay alignment -> no event
//   all 80 channels hit -> sum saturates at 63
//   event longer than one buffer (spills into the next)
//   four events buffered, next trigger refused (dead time)
//   event longer than all four buffers (truncated)
//   host reading while the next event is being stored
module tb_cactus_top;
  localparam int D = 4096;

  logic        clk_trig = 1'b0, clk_ro = 1'b0;
  logic        rst_n = 1'b0;
  logic [79:0] hits = '0;
  logic        t_n_datastb, t_n_addrstb, t_n_write, t_n_wait, t_pd_oe;
  logic [7:0]  t_pd_in, t_pd_out;
  logic        r_n_datastb, r_n_addrstb, r_n_write, r_n_wait, r_pd_oe;
  logic [7:0]  r_pd_in, r_pd_out;
  logic        tdc_com, tdc_wak, tdc_ren, tdc_wst, tdc_bsy, tdc_pass;
  logic [15:0] tdc_data;
  logic        trig_out, trig_lost, word_lost, ev_stored, ev_sent, storing;
  logic [5:0]  sum, level;
  int          checks = 0, failures = 0;

  cactus_top dut (.*);

  logic        wst0, wst1, bsy0, bsy1, pass0, pass1;
  logic [15:0] d0, d1;
  int          nw0 = 0, nw1 = 0, evs0, evs1;
  tdc_model #(.ID(1)) u_t0 (.clk(clk_ro), .com(tdc_com), .ren(tdc_ren), .wak(tdc_wak),
                            .n_words(nw0), .wst(wst0), .bsy(bsy0), .pass(pass0), .data(d0), .events(evs0));
  tdc_model #(.ID(2)) u_t1 (.clk(clk_ro), .com(tdc_com), .ren(pass0), .wak(tdc_wak),
                            .n_words(nw1), .wst(wst1), .bsy(bsy1), .pass(pass1), .data(d1), .events(evs1));
  assign tdc_wst  = wst0 | wst1;
  assign tdc_bsy  = bsy0 | bsy1;
  assign tdc_pass = pass1;
  assign tdc_data = bsy0 ? d0 : d1;

  epp_host u_thost (.clk(clk_trig), .n_datastb(t_n_datastb), .n_addrstb(t_n_addrstb),
                    .n_write(t_n_write), .pd(t_pd_in), .n_wait(t_n_wait),
                    .pd_periph(t_pd_out), .pd_oe(t_pd_oe));
  epp_host u_rhost (.clk(clk_ro), .n_datastb(r_n_datastb), .n_addrstb(r_n_addrstb),
                    .n_write(r_n_write), .pd(r_pd_in), .n_wait(r_n_wait),
                    .pd_periph(r_pd_out), .pd_oe(r_pd_oe));

  always #5 clk_trig = ~clk_trig;
  initial begin
    #3;
    forever #5 clk_ro = ~clk_ro;
  end

  // ---- mechanism counters -------------------------------------------------
  int n_events = 0, n_below = 0, n_spread = 0, n_sat = 0, n_spill = 0;
  int n_dead = 0, n_trunc = 0, n_overlap = 0;
  int n_lost_trig = 0, n_lost_word = 0, n_stored = 0, n_trig = 0, max_sum = 0;
  logic trig_q = 0;

  always @(posedge clk_ro) if (rst_n) begin
    if (trig_lost) n_lost_trig++;
    if (word_lost) n_lost_word++;
    if (ev_stored) n_stored++;
  end

  // ---- shower scheduling on the trigger clock ------------------------------
  int          cyc = 0;
  int          dly [80];
  logic [79:0] sched [int];
  always @(posedge clk_trig) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      trig_q <= trig_out;
      if (trig_out && !trig_q) n_trig++;
      if (32'(sum) > max_sum) max_sum = 32'(sum);
    end
  end
  always @(negedge clk_trig) begin
    hits = sched.exists(cyc) ? sched[cyc] : '0;
    if (sched.exists(cyc)) sched.delete(cyc);
  end

  initial begin
    repeat (3000000) @(posedge clk_trig);
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

  function automatic logic [79:0] pick(input int k);
    logic [79:0] m;
    int n;
    m = '0; n = 0;
    while (n < k) begin
      int c;
      c = $urandom_range(0, 79);
      if (!m[c]) begin m[c] = 1'b1; n++; end
    end
    return m;
  endfunction

  typedef struct { int tag; int n0; int n1; int e; } exp_t;
  exp_t expq [$];
  int   n_accepted = 0;

  // A shower of k hits; aligned or all at one time. Returns after the
  // trigger decision and, if an event was taken, after it is stored.
  task automatic shower(input int k, input logic aligned, input int a_words, input int b_words,
                        output logic triggered, output logic taken);
    logic [79:0] m;
    int a, trig0, lost0, stored0;
    m = pick(k);
    nw0 = a_words; nw1 = b_words;
    trig0 = n_trig; lost0 = n_lost_trig; stored0 = n_stored;
    a = cyc + 80;
    for (int c = 0; c < 80; c++) if (m[c]) begin
      int t;
      t = aligned ? a - dly[c] : a - 30;
      if (!sched.exists(t)) sched[t] = '0;
      sched[t][c] = 1'b1;
    end
    while (cyc < a + 40) @(posedge clk_trig);
    triggered = (n_trig != trig0);
    taken = triggered && (n_lost_trig == lost0);
    if (taken) begin
      exp_t x;
      x.tag = n_accepted; x.n0 = a_words; x.n1 = b_words; x.e = evs0;
      expq.push_back(x);
      n_accepted++;
      while (n_stored == stored0) @(posedge clk_ro);
    end
  endtask

  task automatic read_word(output logic [15:0] w);
    logic [7:0] lo, hi;
    u_rhost.read_data(lo);
    u_rhost.read_data(hi);
    w = {hi, lo};
  endtask

  task automatic host_read_event();
    logic [7:0]  st;
    logic [15:0] w, tag, hdr;
    exp_t        x;
    int          n_exp, errs;
    st = 8'h00;
    while (st != 8'h0C) u_rhost.read_addr(st);
    read_word(tag);
    read_word(hdr);
    x = expq.pop_front();
    n_exp = (x.n0 + x.n1 > 4 * D) ? 4 * D : x.n0 + x.n1;
    check(tag == 16'(x.tag), $sformatf("tag %0d expected %0d", tag, x.tag));
    check(hdr == {(x.n0 + x.n1 > 4 * D), 15'(n_exp)},
          $sformatf("header %h expected %0d words", hdr, n_exp));
    if (x.n0 + x.n1 > D) n_spill++;
    if (x.n0 + x.n1 > 4 * D) n_trunc++;
    errs = 0;
    for (int i = 0; i < 32'(hdr[14:0]); i++) begin
      logic [15:0] e;
      read_word(w);
      e = (i < x.n0) ? wv(1, x.e, i) : wv(2, x.e, i - x.n0);
      if (w != e) errs++;
    end
    check(errs == 0, $sformatf("event %0d: %0d words wrong", x.tag, errs));
    n_events++;
  endtask

  initial begin
    logic tr, tk;
    logic [7:0] b;
    repeat (4) @(posedge clk_trig);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_trig);
    for (int c = 0; c < 80; c++) begin
      dly[c] = $urandom_range(0, 63);
      u_thost.write_data(8'(dly[c]));
    end
    u_thost.write_addr(8'd8);
    u_thost.read_addr(b);
    check(b == 8'd8, "level programmed");

    shower(12, 1, 30, 20, tr, tk);       // above level
    check(tr && tk, "trigger on 12 aligned hits");
    host_read_event();
    shower(8, 1, 5, 5, tr, tk);          // at level
    check(!tr, "no trigger at level"); if (!tr) n_below++;
    shower(30, 0, 5, 5, tr, tk);         // not aligned
    check(!tr, "no trigger without alignment"); if (!tr) n_spread++;
    shower(80, 1, 7, 9, tr, tk);         // saturated sum
    check(tr && max_sum == 63, $sformatf("saturated sum %0d", max_sum)); if (max_sum == 63) n_sat++;
    host_read_event();
    shower(15, 1, 5000, 3000, tr, tk);   // spills into a second buffer
    check(tk, "long event taken");
    host_read_event();
    // fill all four buffers, then one more trigger
    for (int i = 0; i < 4; i++) begin
      shower(20, 1, 100 + i, 50, tr, tk);
      check(tk, "buffered event taken");
    end
    shower(20, 1, 10, 10, tr, tk);
    check(tr && !tk, "trigger refused with all buffers full"); if (tr && !tk) n_dead++;
    repeat (4) host_read_event();
    // longer than all buffers
    shower(20, 1, 10000, 8000, tr, tk);
    check(tk && n_lost_word == 18000 - 4 * D, $sformatf("%0d words lost", n_lost_word));
    host_read_event();
    // read while the next event is stored
    shower(20, 1, 300, 300, tr, tk);
    fork
      host_read_event();
      begin
        shower(20, 1, 200, 100, tr, tk);
        if (tk && expq.size() > 0) n_overlap++;
      end
    join
    host_read_event();

    check(expq.size() == 0, "every event read");
    check(!u_thost.timed_out && !u_rhost.timed_out, "no EPP timeout");
    $display("events %0d below %0d spread %0d saturated %0d spill %0d dead %0d truncated %0d overlap %0d",
             n_events, n_below, n_spread, n_sat, n_spill, n_dead, n_trunc, n_overlap);
    check(n_events > 0,  "mechanism: event read out");
    check(n_below > 0,   "mechanism: below level");
    check(n_spread > 0,  "mechanism: no alignment");
    check(n_sat > 0,     "mechanism: saturation");
    check(n_spill > 0,   "mechanism: buffer spill");
    check(n_dead > 0,    "mechanism: dead time");
    check(n_trunc > 0,   "mechanism: truncation");
    check(n_overlap > 0, "mechanism: read during write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
