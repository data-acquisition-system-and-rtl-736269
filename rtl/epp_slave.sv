// epp_slave: peripheral side of an IEEE 1284 EPP (enhanced parallel port)
// link, shared by the trigger FPGA and the readout FPGA.
//
// The host starts a cycle by pulling nDATASTB (data cycle) or nADDRSTB
// (address cycle) low, with nWRITE low for a write and high for a read.
// The three host lines pass through two-flip-flop synchronizers. When a
// strobe is seen low the slave
//   write: latches the byte on the bus and pulses addr_wr or data_wr;
//   read:  drives the address-read byte, or the data-read byte and pulses
//          data_rd (the byte has then been consumed);
// and raises nWAIT to acknowledge. When the host releases the strobe the
// slave releases the bus and drops nWAIT, ready for the next cycle. A data
// read is held off (nWAIT stays low) while rd_valid is low.
//
// The bidirectional 8-bit bus is split into pd_in, pd_out and pd_oe; the pad
// buffer that joins them sits outside this module. The four host lines and
// the byte-wide bus follow the description of the parallel-port link; the
// handshake sequence is standard EPP, and the synchronizers, the split bus
// and the hold-off are this design's choices.
module epp_slave (
  input  logic       clk,
  input  logic       rst_n,
  // parallel port pins (active-low control lines)
  input  logic       n_datastb,
  input  logic       n_addrstb,
  input  logic       n_write,
  output logic       n_wait,
  input  logic [7:0] pd_in,
  output logic [7:0] pd_out,
  output logic       pd_oe,
  // user side
  output logic       addr_wr,      // pulse: host wrote an address byte
  output logic       data_wr,      // pulse: host wrote a data byte
  output logic [7:0] wr_byte,      // the byte written
  input  logic [7:0] addr_rd_byte, // byte returned on an address read
  input  logic       rd_valid,     // a data byte is available
  input  logic [7:0] rd_byte,      // byte returned on a data read
  output logic       data_rd       // pulse: rd_byte was handed to the host
);

  typedef enum logic {S_IDLE, S_ACK} state_t;

  state_t     state;
  logic [1:0] dstb_q, astb_q, wr_q;
  logic       dstb, astb, wr_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dstb_q <= 2'b11;
      astb_q <= 2'b11;
      wr_q   <= 2'b11;
    end else begin
      dstb_q <= {dstb_q[0], n_datastb};
      astb_q <= {astb_q[0], n_addrstb};
      wr_q   <= {wr_q[0],   n_write};
    end
  end

  assign dstb = ~dstb_q[1];  // data strobe active
  assign astb = ~astb_q[1];  // address strobe active
  assign wr_n = wr_q[1];     // 1 = read cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      n_wait  <= 1'b0;
      pd_out  <= '0;
      pd_oe   <= 1'b0;
      addr_wr <= 1'b0;
      data_wr <= 1'b0;
      data_rd <= 1'b0;
      wr_byte <= '0;
    end else begin
      addr_wr <= 1'b0;
      data_wr <= 1'b0;
      data_rd <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (astb && !wr_n) begin
            wr_byte <= pd_in;
            addr_wr <= 1'b1;
            n_wait  <= 1'b1;
            state   <= S_ACK;
          end else if (dstb && !wr_n) begin
            wr_byte <= pd_in;
            data_wr <= 1'b1;
            n_wait  <= 1'b1;
            state   <= S_ACK;
          end else if (astb && wr_n) begin
            pd_out  <= addr_rd_byte;
            pd_oe   <= 1'b1;
            n_wait  <= 1'b1;
            state   <= S_ACK;
          end else if (dstb && wr_n && rd_valid) begin
            pd_out  <= rd_byte;
            pd_oe   <= 1'b1;
            data_rd <= 1'b1;
            n_wait  <= 1'b1;
            state   <= S_ACK;
          end
        end
        S_ACK: begin
          if (!astb && !dstb) begin
            pd_oe  <= 1'b0;
            n_wait <= 1'b0;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The bus is driven only inside an acknowledged read cycle.
  a_oe_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    pd_oe |-> n_wait);
  // One user pulse per cycle at most.
  a_one_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({addr_wr, data_wr, data_rd}));

endmodule
