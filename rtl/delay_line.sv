// delay_line: programmable delay for one discriminator channel.
//
// The line is a chain of DEPTH flip-flops with a 2:1 multiplexer after each
// one. Each multiplexer either passes the previous flip-flop on down the
// chain (input "1") or takes the undelayed input pulse (input "0"). A small
// decoder per multiplexer compares the delay code with that multiplexer's
// position, so exactly one multiplexer injects the pulse: the one with
// `code` flip-flops left between it and the output. From there the pulse
// moves one flip-flop per rising clock edge (100 MHz, 10 ns per step).
//
//   code = 0       : out follows hit_in combinationally (no delay)
//   code = d       : out(t) = hit_in(t - d) in clock cycles
//   code >= DEPTH  : the full DEPTH cycles (the first flip-flop always
//                    takes the input, so no multiplexer needs to inject)
//
// The flip-flop/multiplexer/decoder chain follows the system description.
// The depth of 64 steps (640 ns) is this design's choice: the delay byte
// allows 255, but the trigger decision has to be made within 1 us. Codes
// above DEPTH are clamped. Flip-flops clear on the synchronous active-low
// reset.
module delay_line #(
  parameter int unsigned DEPTH  = cactus_pkg::DELAY_DEPTH,
  parameter int unsigned CODE_W = cactus_pkg::DELAY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code,    // delay in clock cycles
  input  logic              hit_in,  // discriminator output, sampled
  output logic              hit_out  // delayed hit
);

  logic [DEPTH-1:0] ff;       // the flip-flop chain
  logic [DEPTH:1]   inject;   // decoder outputs: multiplexer k selects "0"
  logic [DEPTH:1]   mux;      // multiplexer outputs

  // Decoder k drives the select of multiplexer k; it fires when the code
  // asks for DEPTH-k more flip-flops after that point.
  always_comb begin
    for (int unsigned k = 1; k <= DEPTH; k++)
      inject[k] = (32'(code) == DEPTH - k);
  end

  always_comb begin
    for (int unsigned k = 1; k <= DEPTH; k++)
      mux[k] = inject[k] ? hit_in : ff[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff <= '0;
    end else begin
      ff[0] <= hit_in;
      for (int unsigned k = 1; k < DEPTH; k++)
        ff[k] <= mux[k];
    end
  end

  assign hit_out = mux[DEPTH];

endmodule
