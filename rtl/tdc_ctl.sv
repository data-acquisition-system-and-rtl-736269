// tdc_ctl: interface to the bank of TDCs over their front-panel control bus.
//
// The TDCs run in common-stop mode: they record continuously until COM.
// On a rising edge of the trigger from the trigger FPGA, and only if the
// buffer memory can take an event (can_accept), TDC_CTL pulses COM for
// COM_W cycles and tells RAM_STORE an event starts. It then raises REN,
// the read enable of the first TDC; the TDCs hand the enable on from one to
// the next through their PASS/REN daisy chain. Each word is one handshake:
// the TDC puts the word on the data bus and raises WST; TDC_CTL latches it,
// passes it to RAM_STORE and raises WAK; the TDC drops WST; TDC_CTL drops
// WAK. BSY is high while a TDC is sending. The event ends when PASS from the
// last TDC of the chain is high, BSY is low and no word is pending; TDC_CTL
// then drops REN and signals ev_end. A trigger that arrives while an event
// is being read, or when no buffer is free, is not taken (dead time) and is
// counted on trig_lost.
//
// WST, BSY, PASS and the trigger come from other boards and pass through
// two-flip-flop synchronizers; the data bus is sampled when the
// synchronized WST is seen, by which time it has been stable for two
// cycles. With a 100 MHz clock a word takes about 8 cycles, above the
// 10 MHz word rate of the description.
//
// The six control lines, common-stop mode, the per-word handshake, BSY,
// and PASS closing the chain follow the description. The line polarities
// (all active high here), the COM width and the end-of-event condition
// are this design's choices.
module tdc_ctl #(
  parameter int unsigned W     = cactus_pkg::TDC_W,
  parameter int unsigned COM_W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trig_in,     // from the trigger FPGA
  // TDC control bus
  output logic         com,
  output logic         wak,
  output logic         ren,
  input  logic         wst,
  input  logic         bsy,
  input  logic         pass,
  input  logic [W-1:0] tdc_data,
  // to RAM_STORE
  input  logic         can_accept,
  output logic         ev_start,
  output logic         word_valid,
  output logic [W-1:0] word,
  output logic         ev_end,
  // status
  output logic         trig_lost    // pulse: trigger not taken
);

  typedef enum logic [1:0] {T_IDLE, T_COM, T_READ, T_ACK} tstate_t;

  tstate_t    state;
  logic [2:0] trig_q;
  logic [1:0] wst_q, bsy_q, pass_q;
  logic       trig_rise, wst_s, bsy_s, pass_s;
  logic [$clog2(COM_W+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_q <= '0;
      wst_q  <= '0;
      bsy_q  <= '0;
      pass_q <= '0;
    end else begin
      trig_q <= {trig_q[1:0], trig_in};
      wst_q  <= {wst_q[0],  wst};
      bsy_q  <= {bsy_q[0],  bsy};
      pass_q <= {pass_q[0], pass};
    end
  end

  assign trig_rise = trig_q[1] && !trig_q[2];
  assign wst_s     = wst_q[1];
  assign bsy_s     = bsy_q[1];
  assign pass_s    = pass_q[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      com        <= 1'b0;
      wak        <= 1'b0;
      ren        <= 1'b0;
      cnt        <= '0;
      ev_start   <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
      ev_end     <= 1'b0;
      trig_lost  <= 1'b0;
    end else begin
      ev_start   <= 1'b0;
      word_valid <= 1'b0;
      ev_end     <= 1'b0;
      trig_lost  <= 1'b0;
      unique case (state)
        T_IDLE: if (trig_rise) begin
          if (can_accept) begin
            ev_start <= 1'b1;
            com      <= 1'b1;
            cnt      <= ($bits(cnt))'(COM_W);
            state    <= T_COM;
          end else begin
            trig_lost <= 1'b1;
          end
        end
        T_COM: begin
          if (trig_rise) trig_lost <= 1'b1;
          if (cnt == 1) begin
            com   <= 1'b0;
            ren   <= 1'b1;
            state <= T_READ;
          end
          cnt <= cnt - 1'b1;
        end
        T_READ: begin
          if (trig_rise) trig_lost <= 1'b1;
          if (wst_s) begin
            word       <= tdc_data;
            word_valid <= 1'b1;
            wak        <= 1'b1;
            state      <= T_ACK;
          end else if (pass_s && !bsy_s) begin
            ren    <= 1'b0;
            ev_end <= 1'b1;
            state  <= T_IDLE;
          end
        end
        T_ACK: begin
          if (trig_rise) trig_lost <= 1'b1;
          if (!wst_s) begin
            wak   <= 1'b0;
            state <= T_READ;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_com_then_ren: assert property (@(posedge clk) disable iff (!rst_n)
    !(com && ren));
  a_wak_only_reading: assert property (@(posedge clk) disable iff (!rst_n)
    wak |-> ren);

endmodule
