// dec_en_ctrl -- decoder pipeline control (Dec_en Ctrl).
//
// The decoder is a three-stage pipeline: bit stream selector plus VLC decoder,
// symbol memory, then symbol recoverer.  The pipeline moves (adv) while the
// receiver asserts dec_receive.  A new codeword is decoded (fire3) only when
// the selector's buffers are filled and, if this codeword empties the MSB
// buffer (need_shift), the Input FIFO holds the 32 bits that refill it;
// otherwise a bubble enters the pipeline.  v3/v2 follow each decoded codeword
// through stages 3 and 2 (the recoverer registers the final valid flag).
// The two stall conditions follow the original; refining "input FIFO empty"
// to "empty while a refill is due" and the valid bits are this design's.
// adv is dec_receive itself; it is kept as a named output so that the stall
// rule for the decoder pipeline lives in this one module.
module dec_en_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic dec_receive,
  input  logic sel_ready,
  input  logic need_shift,
  input  logic fifo_has32,
  output logic adv,
  output logic fire3,
  output logic starved,   // decode held back by an empty Input FIFO
  output logic v3,
  output logic v2
);
  assign adv     = dec_receive;
  assign starved = !sel_ready || (need_shift && !fifo_has32);
  assign fire3   = adv && !starved;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3        <= 1'b0;
      v2        <= 1'b0;
    end else if (adv) begin
      v3        <= fire3;
      v2        <= v3;
    end
  end

endmodule
