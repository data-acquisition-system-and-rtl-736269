// tb_ram_read: self-checking test of the buffer read-back engine.
//
// The testbench models four 16-word buffers (one-cycle read latency) and
// the event summary RAM_SELECT would give. For a series of events, each
// spanning one to four buffers starting at a rotating buffer, with random
// lengths (zero included) and a random truncation flag, it checks the word
// stream RAM_READ produces under random back-pressure: the event tag, the
// {trunc, length} header word and every record word in buffer order. It
// also checks that each buffer gets exactly one rd_start and one rd_done,
// in order, and that `advance` pulses once per buffer.
module tb_ram_read;
  localparam int NB = 4, D = 16;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ev_ready = 0, ev_trunc = 0;
  logic [1:0]  ev_first = 0;
  logic [2:0]  ev_nbuf = 0;
  logic [6:0]  ev_len = 0;
  logic [15:0] ev_tag = 0;
  logic        advance;
  logic [NB-1:0] rd_start, rd_done;
  logic [3:0]  rd_addr;
  logic [15:0] rd_data [NB];
  logic [4:0]  buf_len [NB];
  logic        out_valid, out_ready = 0, busy;
  logic [15:0] out_word;
  int          checks = 0, failures = 0;

  logic [15:0] mem [NB][D];
  int          starts [$], dones [$];
  int          n_adv = 0;
  logic [15:0] got [$];

  ram_read #(.N_BUF(NB), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) rd_data[b] <= mem[b][rd_addr];
    if (rst_n) begin
      for (int b = 0; b < NB; b++) begin
        if (rd_start[b]) starts.push_back(b);
        if (rd_done[b])  dones.push_back(b);
      end
      if (advance) n_adv++;
      if (out_valid && out_ready) got.push_back(out_word);
    end
  end

  always @(negedge clk) out_ready <= out_valid && ($urandom_range(0, 2) != 0);

  initial begin
    repeat (100000) @(posedge clk);
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
    int first = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 40; e++) begin
      int nbuf, total;
      logic [15:0] expected [$];
      logic trunc;
      nbuf = $urandom_range(1, NB);
      total = 0;
      expected.delete();
      trunc = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < nbuf; k++) begin
        int b, n;
        b = (first + k) % NB;
        n = (k < nbuf - 1) ? D : $urandom_range(0, D);
        buf_len[b] = 5'(n);
        for (int i = 0; i < n; i++) begin
          mem[b][i] = 16'($urandom);
          expected.push_back(mem[b][i]);
        end
        total += n;
      end
      expected.push_front({trunc, 15'(total)});
      expected.push_front(16'(e * 3 + 1));
      got.delete(); starts.delete(); dones.delete(); n_adv = 0;
      @(negedge clk);
      ev_ready = 1; ev_first = 2'(first); ev_nbuf = 3'(nbuf);
      ev_len = 7'(total); ev_trunc = trunc; ev_tag = 16'(e * 3 + 1);
      while (starts.size() == 0) @(negedge clk);
      ev_ready = 0;
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      check(got.size() == expected.size(), $sformatf("event %0d: %0d words, expected %0d", e, got.size(), expected.size()));
      for (int i = 0; i < expected.size() && i < got.size(); i++)
        check(got[i] == expected[i], $sformatf("event %0d word %0d: %h expected %h", e, i, got[i], expected[i]));
      check(starts.size() == nbuf && dones.size() == nbuf && n_adv == nbuf, "one start/done/advance per buffer");
      for (int k = 0; k < nbuf && k < starts.size() && k < dones.size(); k++)
        check(starts[k] == (first + k) % NB && dones[k] == (first + k) % NB, "buffer order");
      first = (first + nbuf) % NB;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
