// tb_majority_logic: self-checking test of the pipelined hit counter.
//
// Random 80-bit hit vectors of varying density (including all-zero,
// all-one and counts near 63) are applied one per cycle. The expected sum
// is the population count of the vector applied LATENCY = 7 cycles earlier,
// clipped at 63; it is checked every cycle, which also checks the latency
// and the one-result-per-cycle throughput.
module tb_majority_logic;
  localparam int unsigned N = 80;
  localparam int unsigned LATENCY = 7;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] hits = '0;
  logic [5:0]   sum;
  int           checks = 0, failures = 0, saturated = 0;
  logic [N-1:0] hist [$];

  majority_logic dut (.clk, .rst_n, .hits, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_vec(input int unsigned pct);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = ($urandom_range(0, 99) < pct);
    return v;
  endfunction

  initial begin
    int unsigned exp_sum;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      unique case (cyc % 7)
        0: hits = '0;
        1: hits = '1;
        default: hits = rand_vec($urandom_range(0, 100));
      endcase
      hist.push_front(hits);
      #1;
      if (hist.size() > LATENCY) begin
        exp_sum = $countones(hist[LATENCY]);
        if (exp_sum > 63) begin exp_sum = 63; saturated++; end
        checks++;
        if (sum !== 6'(exp_sum)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: sum %0d expected %0d", cyc, sum, exp_sum);
        end
      end
    end
    if (saturated == 0) failures++;
    $display("saturated sums checked: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
