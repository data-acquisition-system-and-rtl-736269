// epp_host: behavioural model of the host computer's EPP parallel port,
// for testbenches. The tasks run one EPP cycle each, clocked by `clk`:
// the strobe goes low, the model waits for nWAIT high (acknowledge),
// samples the bus on reads, releases the strobe and waits for nWAIT low.
// A cycle that gets no acknowledge within TIMEOUT clocks sets `timed_out`.
module epp_host #(
  parameter int TIMEOUT = 2000
) (
  input  logic       clk,
  output logic       n_datastb,
  output logic       n_addrstb,
  output logic       n_write,
  output logic [7:0] pd,
  input  logic       n_wait,
  input  logic [7:0] pd_periph,
  input  logic       pd_oe
);
  logic timed_out = 1'b0;
  int   cycles    = 0;   // completed EPP cycles

  initial begin
    n_datastb = 1'b1;
    n_addrstb = 1'b1;
    n_write   = 1'b1;
    pd        = '0;
  end

  task automatic wait_wait(input logic level);
    int n = 0;
    while (n_wait !== level && n < TIMEOUT) begin
      @(posedge clk);
      n++;
    end
    if (n >= TIMEOUT) timed_out = 1'b1;
  endtask

  task automatic cycle(input logic is_addr, input logic is_write,
                       input logic [7:0] wbyte, output logic [7:0] rbyte);
    @(posedge clk);
    n_write = !is_write;
    if (is_write) pd = wbyte;
    @(posedge clk);
    if (is_addr) n_addrstb = 1'b0; else n_datastb = 1'b0;
    wait_wait(1'b1);
    rbyte = pd_oe ? pd_periph : 8'hzz;
    @(posedge clk);
    n_addrstb = 1'b1;
    n_datastb = 1'b1;
    wait_wait(1'b0);
    n_write = 1'b1;
    cycles++;
  endtask

  task automatic write_addr(input logic [7:0] b);
    logic [7:0] r;
    cycle(1'b1, 1'b1, b, r);
  endtask

  task automatic write_data(input logic [7:0] b);
    logic [7:0] r;
    cycle(1'b0, 1'b1, b, r);
  endtask

  task automatic read_addr(output logic [7:0] b);
    cycle(1'b1, 1'b0, 8'h00, b);
  endtask

  task automatic read_data(output logic [7:0] b);
    cycle(1'b0, 1'b0, 8'h00, b);
  endtask
endmodule
