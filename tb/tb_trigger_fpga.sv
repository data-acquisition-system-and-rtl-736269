// tb_trigger_fpga: self-checking test of the trigger board.
//
// The host model loads 80 random delay codes (0..60) and a coincidence
// level over the parallel port. Simulated showers then hit K channels, each
// hit arriving (D - delay) cycles after a common origin so that the delay
// lines bring them together in one cycle. For every shower the expected
// outcome is worked out in the testbench: trigger when K > level, with
// trig_out rising exactly 9 cycles after the aligned cycle and staying high
// 4 cycles; no trigger when K <= level, or when the same hits arrive at one
// time so the delays spread them apart. With all 80 channels hit the sum
// must read 63 (saturated), and with level 63 that must not trigger.
module tb_trigger_fpga;
  localparam int LAT = 9;   // aligned cycle -> trig_out high

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [79:0] hits = '0;
  logic        n_datastb, n_addrstb, n_write, n_wait, pd_oe, trig_out;
  logic [7:0]  pd_in, pd_out;
  logic [5:0]  sum, level;
  int          checks = 0, failures = 0;
  int          cyc = 0;
  int          dly [80];
  logic [79:0] sched [int];
  int          rise [$];
  int          max_sum = 0, width = 0, max_width = 0;
  int          n_trig = 0, n_quiet = 0, n_spread = 0, n_sat = 0;

  trigger_fpga dut (.*);

  epp_host u_host (.clk, .n_datastb, .n_addrstb, .n_write, .pd(pd_in),
                   .n_wait, .pd_periph(pd_out), .pd_oe);

  always #5 clk = ~clk;

  logic trig_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      trig_q <= trig_out;
      if (trig_out && !trig_q) rise.push_back(cyc);
      if (trig_out) width = width + 1; else width = 0;
      if (width > max_width) max_width = width;
      if (32'(sum) > max_sum) max_sum = 32'(sum);
    end
  end
  always @(negedge clk) begin
    hits = sched.exists(cyc) ? sched[cyc] : '0;
    if (sched.exists(cyc)) sched.delete(cyc);
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%0t FAIL: %s", $time, what); end
  endtask

  // Schedule a shower on the channels in `mask`; aligned at cycle `a`.
  // Hits applied at the negedge of cycle n are sampled by the edge that
  // ends cycle n; a channel with delay d presents them d cycles later.
  task automatic shower(input logic [79:0] mask, input int a, input logic aligned);
    for (int c = 0; c < 80; c++) if (mask[c]) begin
      int t;
      t = aligned ? a - dly[c] : a - 30;
      if (!sched.exists(t)) sched[t] = '0;
      sched[t][c] = 1'b1;
    end
  endtask

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

  task automatic run(input int k, input int lvl, input logic aligned);
    int a;
    logic expect_trig;
    rise.delete();
    max_sum = 0; max_width = 0;
    a = cyc + 80;
    shower(pick(k), a, aligned);
    while (cyc < a + 40) @(posedge clk);
    expect_trig = aligned && (k > 63 ? 63 : k) > lvl;
    if (expect_trig) begin
      n_trig++;
      check(rise.size() == 1, $sformatf("k=%0d level=%0d: %0d triggers", k, lvl, rise.size()));
      if (rise.size() == 1)
        check(rise[0] == a + LAT, $sformatf("trigger at %0d expected %0d", rise[0], a + LAT));
      check(max_width == 4, $sformatf("trigger width %0d", max_width));
    end else begin
      if (aligned) n_quiet++; else n_spread++;
      check(rise.size() == 0, $sformatf("k=%0d level=%0d aligned=%0b: unexpected trigger", k, lvl, aligned));
    end
    if (aligned) begin
      check(max_sum == (k > 63 ? 63 : k), $sformatf("peak sum %0d for %0d hits", max_sum, k));
      if (k > 63) n_sat++;
    end
  endtask

  task automatic set_level(input int lvl);
    logic [7:0] b;
    u_host.write_addr(8'(lvl));
    u_host.read_addr(b);
    check(b == 8'(lvl) && level == 6'(lvl), "level loaded");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int c = 0; c < 80; c++) begin
      dly[c] = $urandom_range(0, 60);
      u_host.write_data(8'(dly[c]));
    end
    set_level(10);
    run(11, 10, 1);    // just above level: trigger
    run(10, 10, 1);    // at level: no trigger
    run(3, 10, 1);
    run(25, 10, 0);    // not aligned: delays spread them
    run(40, 10, 1);
    set_level(7);
    for (int i = 0; i < 10; i++) run($urandom_range(1, 20), 7, 1);
    run(80, 7, 1);     // all channels, sum saturates at 63
    set_level(63);
    run(80, 63, 1);    // 63 is not above 63: no trigger
    run(70, 63, 1);
    check(n_trig > 3 && n_quiet > 2 && n_spread > 0 && n_sat > 1, "all cases seen");
    check(!u_host.timed_out, "no EPP timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
