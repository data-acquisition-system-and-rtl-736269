// tb_trig_comm: self-checking test of the trigger board's parallel-port
// block.
//
// An EPP host model writes 80 random delay bytes with data writes and a
// coincidence level with an address write. Checked: after the 80 writes
// channel c holds the c-th byte written; each further write shifts every
// channel down by one; the level takes the low six bits of the address
// byte and reads back on an address read; reset values are delay 0 and
// level 63.
module tb_trig_comm;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       n_datastb, n_addrstb, n_write, n_wait, pd_oe;
  logic [7:0] pd_in, pd_out;
  logic [7:0] delay_code [80];
  logic [5:0] level;
  int         checks = 0, failures = 0;
  logic [7:0] sent [$];

  trig_comm dut (.*);

  epp_host u_host (.clk, .n_datastb, .n_addrstb, .n_write, .pd(pd_in),
                   .n_wait, .pd_periph(pd_out), .pd_oe);

  always #5 clk = ~clk;

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

  task automatic check_codes();
    for (int c = 0; c < 80; c++)
      check(delay_code[c] == sent[sent.size() - 80 + c],
            $sformatf("channel %0d: %h expected %h", c, delay_code[c], sent[sent.size() - 80 + c]));
  endtask

  initial begin
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(level == 6'd63, "reset level");
    for (int c = 0; c < 80; c++) check(delay_code[c] == 0, "reset delay");
    for (int c = 0; c < 80; c++) begin
      b = 8'($urandom);
      sent.push_back(b);
      u_host.write_data(b);
    end
    repeat (4) @(posedge clk);
    check_codes();
    for (int k = 0; k < 5; k++) begin
      b = 8'($urandom);
      sent.push_back(b);
      u_host.write_data(b);
    end
    repeat (4) @(posedge clk);
    check_codes();
    u_host.write_addr(8'hC9);        // level = 9
    repeat (4) @(posedge clk);
    check(level == 6'd9, $sformatf("level %0d", level));
    u_host.read_addr(b);
    check(b == 8'd9, $sformatf("level read back %h", b));
    u_host.write_addr(8'd14);
    u_host.read_addr(b);
    check(level == 6'd14 && b == 8'd14, "second level");
    check_codes();                   // address writes leave delays alone
    check(!u_host.timed_out, "no EPP timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
