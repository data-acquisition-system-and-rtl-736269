// tdc_model: behavioural model of one common-stop TDC module on the
// front-panel control bus, for testbenches. It is not synthesizable logic
// of this design; the real part is a commercial TDC.
//
// COM (rising edge) stops it and latches `n_words`, the number of words it
// will deliver for this event. Once its read enable `ren` is high it raises
// BSY and sends the words one handshake each (data, then WST; WAK seen ->
// drop WST; WAK low -> next word), then drops BSY and raises PASS, which
// enables the next module of the daisy chain. PASS falls when REN falls.
// Word i of event e from module ID is word_value(ID, e, i).
module tdc_model #(
  parameter int ID = 0
) (
  input  logic        clk,
  input  logic        com,
  input  logic        ren,
  input  logic        wak,
  input  int          n_words,
  output logic        wst,
  output logic        bsy,
  output logic        pass,
  output logic [15:0] data,
  output int          events     // events delivered so far
);
  logic armed = 1'b0;
  int   todo  = 0;
  logic com_q = 1'b0;

  function automatic logic [15:0] word_value(input int id, input int e, input int i);
    return 16'(id * 4096 + i) ^ 16'(e * 257);
  endfunction

  initial begin
    wst = 1'b0; bsy = 1'b0; pass = 1'b0; data = '0; events = 0;
  end

  initial begin
    forever begin
      @(posedge clk);
      if (com && !com_q) begin
        armed = 1'b1;
        todo  = n_words;
      end
      com_q = com;
      if (ren && armed) begin
        bsy = 1'b1;
        for (int i = 0; i < todo; i++) begin
          data = word_value(ID, events, i);
          @(posedge clk);
          wst = 1'b1;
          while (!wak) @(posedge clk);
          @(posedge clk);
          wst = 1'b0;
          while (wak) @(posedge clk);
        end
        bsy   = 1'b0;
        armed = 1'b0;
        events++;
        pass  = 1'b1;
        while (ren) @(posedge clk);
        pass = 1'b0;
      end else if (ren && !armed && !pass) begin
        pass = 1'b1;
        while (ren) @(posedge clk);
        pass = 1'b0;
      end
    end
  end
endmodule
