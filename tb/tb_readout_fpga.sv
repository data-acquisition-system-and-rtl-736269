// tb_readout_fpga: self-checking test of the readout board, with its four
// buffers scaled to 16 words so that long events stay short.
//
// Two TDC models on a PASS->REN daisy chain deliver the event words; an
// EPP host model polls for 0x0C and reads events out. The testbench keeps
// its own list of the events it expects (tag, words in chain order,
// truncation) and compares every byte the host reads. Scenarios:
//   - single-buffer events;
//   - an event spanning three buffers;
//   - four events stored while the host is idle, a fifth trigger refused
//     (dead time), then all four read back oldest first;
//   - an event longer than all four buffers: 64 words kept, the rest
//     counted as lost, the header's truncation flag set;
//   - the host reading one event while the next is being written.
module tb_readout_fpga;
  localparam int D = 16;

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
  int          n_lost_trig = 0, n_lost_word = 0, n_stored = 0;

  readout_fpga #(.DEPTH(D)) dut (.*);

  tdc_model #(.ID(1)) u_t0 (.clk, .com, .ren(ren),   .wak, .n_words(nw0),
                            .wst(wst0), .bsy(bsy0), .pass(pass0), .data(d0), .events(evs0));
  tdc_model #(.ID(2)) u_t1 (.clk, .com, .ren(pass0), .wak, .n_words(nw1),
                            .wst(wst1), .bsy(bsy1), .pass(pass1), .data(d1), .events(evs1));
  assign wst      = wst0 | wst1;
  assign bsy      = bsy0 | bsy1;
  assign pass     = pass1;
  assign tdc_data = bsy0 ? d0 : d1;

  epp_host u_host (.clk, .n_datastb, .n_addrstb, .n_write, .pd(pd_in),
                   .n_wait, .pd_periph(pd_out), .pd_oe);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (trig_lost) n_lost_trig++;
    if (word_lost) n_lost_word++;
    if (ev_stored) n_stored++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // expected events
  typedef struct { int tag; int n0; int n1; int e; logic trunc; } exp_t;
  exp_t expq [$];
  int   n_accepted = 0;

  // Trigger one event of a+b words and wait until it is stored.
  task automatic trigger(input int a, input int b, input logic expect_taken);
    int stored0 = n_stored;
    nw0 = a; nw1 = b;
    @(negedge clk); trig_in = 1'b1;
    repeat (4) @(negedge clk); trig_in = 1'b0;
    if (expect_taken) begin
      exp_t x;
      x.tag = n_accepted; x.n0 = a; x.n1 = b; x.e = evs0; x.trunc = (a + b > 4 * D);
      expq.push_back(x);
      n_accepted++;
      while (n_stored == stored0) @(posedge clk);
    end else begin
      repeat (20) @(posedge clk);
    end
  endtask

  task automatic read_word(output logic [15:0] w);
    logic [7:0] lo, hi;
    u_host.read_data(lo);
    u_host.read_data(hi);
    w = {hi, lo};
  endtask

  // Host side: wait for 0x0C, read one event and compare with expq.
  task automatic host_read_event();
    logic [7:0]  st;
    logic [15:0] w, tag, hdr;
    exp_t        x;
    int          n_exp;
    st = 8'h00;
    while (st != 8'h0C) u_host.read_addr(st);
    read_word(tag);
    read_word(hdr);
    x = expq.pop_front();
    n_exp = (x.n0 + x.n1 > 4 * D) ? 4 * D : x.n0 + x.n1;
    check(tag == 16'(x.tag), $sformatf("tag %0d expected %0d", tag, x.tag));
    check(hdr == {x.trunc, 15'(n_exp)}, $sformatf("header %h expected %0d words trunc %0b", hdr, n_exp, x.trunc));
    for (int i = 0; i < 32'(hdr[14:0]); i++) begin
      logic [15:0] e;
      read_word(w);
      e = (i < x.n0) ? wv(1, x.e, i) : wv(2, x.e, i - x.n0);
      check(w == e, $sformatf("event %0d word %0d: %h expected %h", x.tag, i, w, e));
    end
  endtask

  initial begin
    logic [7:0] st;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    u_host.read_addr(st);
    check(st == 8'h00, "idle status");
    trigger(5, 4, 1);          host_read_event();
    trigger(0, 0, 1);          host_read_event();
    trigger(20, 20, 1);        host_read_event();   // three buffers
    // four events with the host idle, a fifth refused
    trigger(3, 3, 1); trigger(7, 2, 1); trigger(0, 10, 1); trigger(12, 1, 1);
    check(n_lost_trig == 0, "no trigger lost yet");
    trigger(2, 2, 0);
    check(n_lost_trig == 1, "fifth trigger refused");
    repeat (4) host_read_event();
    // longer than all buffers together
    trigger(50, 30, 1);
    check(n_lost_word == 80 - 4 * D, $sformatf("%0d words lost", n_lost_word));
    host_read_event();
    // read while writing
    trigger(10, 10, 1);
    fork
      host_read_event();
      trigger(15, 15, 1);
    join
    host_read_event();
    check(expq.size() == 0, "all events read");
    check(!u_host.timed_out, "no EPP timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
