// enc_en_ctrl -- encoder pipeline control (Enc_en Ctrl).
//
// The encoder is a three-stage pipeline: symbol converter, symbol address
// memory, then VLC encoder plus concatenator.  All three stages move together
// (adv) unless the Output FIFO lacks room for a 32-bit word, in which case
// the whole pipeline holds and enc_ready drops, so no new pair is taken.
// v1/v2 record which stage registers hold a real pair; fire3 tells the
// concatenator that stage 3 has a pair this cycle.  The stall rule follows the
// original; the valid-bit bookkeeping is this design's.
module enc_en_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic enc_valid,
  input  logic out_full,
  output logic enc_ready,
  output logic adv,
  output logic v1,
  output logic v2,
  output logic fire3
);
  assign adv       = !out_full;
  assign enc_ready = adv;
  assign fire3     = adv && v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else if (adv) begin
      v1 <= enc_valid;
      v2 <= v1;
    end
  end

endmodule
