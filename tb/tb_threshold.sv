// tb_threshold: self-checking test of the trigger comparator.
//
// Every (sum, level) pair of 6-bit values is applied; one cycle later the
// trigger must be high exactly when sum > level.
module tb_threshold;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [5:0] sum = '0, level = '0;
  logic       trig;
  int         checks = 0, failures = 0;

  threshold dut (.clk, .rst_n, .sum, .level, .trig);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_trig;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < 64; l++) begin
      for (int s = 0; s < 64; s++) begin
        @(negedge clk);
        sum = 6'(s); level = 6'(l);
        exp_trig = (s > l);
        @(negedge clk);
        checks++;
        if (trig !== exp_trig) begin
          failures++;
          if (failures < 10) $display("sum %0d level %0d: trig %0b", s, l, trig);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
