// cactus_top: the digital part of the CACTUS data acquisition system.
//
// Two boards share the 80 discriminator channels. The trigger FPGA aligns
// the channels in time with programmable delays, counts coincident hits and
// raises a trigger when the count is higher than the programmed level. Its
// trigger output starts the readout FPGA, which stops the TDCs, reads their
// words into a 4-event buffer and hands complete events to the host
// computer. Each board has its own parallel-port link to the host and its
// own clock; the trigger crosses between them as a pulse stretched to
// four trigger-clock cycles and is synchronized on the readout side.
//
// Outside this module: the amplifiers, discriminators, ECL/LVDS level
// translators, the TDCs themselves (their control and data bus are ports
// here), the anode-current monitor and the host computer. The bidirectional
// parallel-port buses are split into in/out/enable ports.
module cactus_top
  import cactus_pkg::*;
(
  input  logic              clk_trig,   // 100 MHz trigger clock
  input  logic              clk_ro,     // readout clock
  input  logic              rst_n,
  input  logic [N_CH-1:0]   hits,       // discriminator outputs
  // trigger board parallel port
  input  logic              t_n_datastb,
  input  logic              t_n_addrstb,
  input  logic              t_n_write,
  output logic              t_n_wait,
  input  logic [7:0]        t_pd_in,
  output logic [7:0]        t_pd_out,
  output logic              t_pd_oe,
  // readout board parallel port
  input  logic              r_n_datastb,
  input  logic              r_n_addrstb,
  input  logic              r_n_write,
  output logic              r_n_wait,
  input  logic [7:0]        r_pd_in,
  output logic [7:0]        r_pd_out,
  output logic              r_pd_oe,
  // TDC control and data bus
  output logic              tdc_com,
  output logic              tdc_wak,
  output logic              tdc_ren,
  input  logic              tdc_wst,
  input  logic              tdc_bsy,
  input  logic              tdc_pass,
  input  logic [TDC_W-1:0]  tdc_data,
  // observation
  output logic              trig_out,
  output logic [SUM_W-1:0]  sum,
  output logic [SUM_W-1:0]  level,
  output logic              trig_lost,
  output logic              word_lost,
  output logic              ev_stored,
  output logic              ev_sent,
  output logic              storing
);

  trigger_fpga u_trigger (
    .clk(clk_trig), .rst_n, .hits,
    .n_datastb(t_n_datastb), .n_addrstb(t_n_addrstb), .n_write(t_n_write),
    .n_wait(t_n_wait), .pd_in(t_pd_in), .pd_out(t_pd_out), .pd_oe(t_pd_oe),
    .trig_out, .sum, .level
  );

  readout_fpga u_readout (
    .clk(clk_ro), .rst_n, .trig_in(trig_out),
    .com(tdc_com), .wak(tdc_wak), .ren(tdc_ren),
    .wst(tdc_wst), .bsy(tdc_bsy), .pass(tdc_pass), .tdc_data,
    .n_datastb(r_n_datastb), .n_addrstb(r_n_addrstb), .n_write(r_n_write),
    .n_wait(r_n_wait), .pd_in(r_pd_in), .pd_out(r_pd_out), .pd_oe(r_pd_oe),
    .trig_lost, .word_lost, .ev_stored, .ev_sent, .storing
  );

endmodule
