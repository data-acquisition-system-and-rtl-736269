// cactus_pkg: constants and types shared by the trigger FPGA and the TDC
// readout FPGA of the CACTUS data acquisition system.
//
// The channel count (80), the 6-bit width of the majority sum, the 8-bit
// delay-code format, the four 4K-word event buffers and the 0x0C "event
// ready" code come from the system description. The 16-bit TDC word, the
// 64-step delay depth and the buffer state encoding are this design's own
// choices.
package cactus_pkg;

  // ---- trigger FPGA -------------------------------------------------------
  localparam int unsigned N_CH        = 80;  // PMT / discriminator channels
  localparam int unsigned SUM_W       = 6;   // majority sum saturates at 63
  localparam int unsigned DELAY_W     = 8;   // one delay byte per channel
  localparam int unsigned DELAY_DEPTH = 64;  // flip-flops per delay line

  // ---- readout FPGA -------------------------------------------------------
  localparam int unsigned TDC_W       = 16;    // one TDC data word
  localparam int unsigned BUF_DEPTH   = 4096;  // words per DPRAM_4K buffer
  localparam int unsigned N_BUF       = 4;     // 4-event buffer memory
  localparam logic [7:0]  EVENT_READY_CODE = 8'h0C;

  // Status each buffer reports to RAM_SELECT (its MEMORY_STATE).
  typedef enum logic [1:0] {
    MEM_EMPTY   = 2'd0,  // free for the next record
    MEM_WRITING = 2'd1,  // being filled from the TDCs
    MEM_FULL    = 2'd2,  // record complete, waiting to be read
    MEM_READING = 2'd3   // being read back to the host
  } mem_state_t;

endpackage
