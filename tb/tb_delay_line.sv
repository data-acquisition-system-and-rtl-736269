// tb_delay_line: self-checking test of one delay line.
//
// A random pulse train drives the line while the delay code steps through
// 0, 1, 2, a spread of values up to DEPTH and codes above DEPTH. A
// reference model keeps the input history and, after the code has been
// stable for DEPTH+1 cycles, every output sample must equal the input from
// min(code, DEPTH) cycles earlier. The delay is thus checked cycle by cycle.
module tb_delay_line;
  localparam int unsigned DEPTH = 64;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] code = '0;
  logic       hit_in = 1'b0, hit_out;
  int         checks = 0, failures = 0;
  logic       hist [$];

  delay_line dut (.clk, .rst_n, .code, .hit_in, .hit_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(input int unsigned c);
    int unsigned d = (c > DEPTH) ? DEPTH : c;
    code = 8'(c);
    for (int cyc = 0; cyc < 3 * DEPTH + 20; cyc++) begin
      @(negedge clk);
      hit_in = ($urandom_range(0, 3) == 0);
      hist.push_front(hit_in);
      if (hist.size() > 400) void'(hist.pop_back());
      #1;
      if (cyc > DEPTH + 1) begin
        checks++;
        if (hit_out !== hist[d]) begin
          failures++;
          if (failures < 10) $display("code %0d: out %0b expected %0b", c, hit_out, hist[d]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_code(0);  run_code(1);  run_code(2);  run_code(3);  run_code(7);
    run_code(13); run_code(31); run_code(32); run_code(50); run_code(63);
    run_code(64); run_code(65); run_code(255);
    for (int i = 0; i < 10; i++) run_code($urandom_range(0, 70));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
