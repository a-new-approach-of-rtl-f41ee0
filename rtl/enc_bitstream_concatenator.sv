// enc_bitstream_concatenator -- packs codewords and their side bits into 32-bit words.
//
// Two 32-bit buffers, MSB and LSB, collect the encoded stream; encCL_acc
// (6 bits) is the number of bits already placed in MSB.  Each symbol's
// payload is its CL-bit codeword followed by one sign bit, nothing (EOB) or
// the 18-bit escRL field.  A barrel shifter moves
// {32'b0, enc_codeword, escRL/sign, 30'b0} left by 48 - (encCL_acc + encCL),
// which lands the payload at bit position encCL_acc of {MSB, LSB}; a second
// barrel shifter moves {32'b0, 32'b1..1, 32'b0} left by 32 - encCL_acc to
// form buf_en, the per-bit write enables of the 32 bits from the pointer on,
// so earlier bits are never overwritten.  The pointer advances by
// encCL-1 + 1 + {1, 0, 18}; when it reaches 32 the shift_out register is set,
// 32 is subtracted, and in the next active cycle MSB goes to the Output FIFO
// while each MSB bit not being written takes the LSB bit.  This follows the
// original.  Choices of this design: a flush input that pads the current word
// with zeros so the tail of a stream leaves the buffers, and an adv input
// that freezes the whole block while the Output FIFO is full.  The payload
// (codeword + escRL) must fit in 32 bits: escape codewords of at most 14 bits.
module enc_bitstream_concatenator import vlc_pkg::*; (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,         // pipeline not stalled
  input  logic               fire,        // a symbol is present this cycle (with adv)
  input  logic               flush,       // pad to a 32-bit boundary (used when !fire)
  input  logic [CW_W-1:0]    codeword,    // {0..0, CL-bit codeword}
  input  logic [CL_W-1:0]    clm1,        // encCL-1
  input  logic               esc,
  input  logic               eob,
  input  logic [ESCRL_W-1:0] escrl_sign,  // escRL, or {sign, 17'b0}
  output logic               push,        // 32-bit word to the Output FIFO
  output logic [WORD_W-1:0]  push_data,
  output logic [PTR_W-1:0]   acc_o,
  output logic               shift_out_o
);
  localparam int unsigned VW = 3 * WORD_W;       // 96-bit shifter input
  localparam int unsigned LOW_PAD = VW - WORD_W - CW_W - ESCRL_W;  // 30

  logic [WORD_W-1:0]   msb_q, lsb_q;
  logic [PTR_W-1:0]    acc_q;
  logic                shift_out_q;
  logic [VW-1:0]       pay96, en96;
  logic [2*WORD_W-1:0] bits, buf_en;
  logic [6:0]          sh_amt;
  logic [PTR_W:0]      current;
  logic                do_flush, step;

  always_comb begin
    do_flush = flush && !fire && (acc_q != '0);
    step     = fire || do_flush;
    sh_amt   = 7'd48 - 7'(acc_q) - 7'(clm1) - 7'd1;
    if (fire) pay96 = {{WORD_W{1'b0}}, codeword, escrl_sign, {LOW_PAD{1'b0}}} << sh_amt;
    else      pay96 = '0;
    en96     = {{WORD_W{1'b0}}, {WORD_W{1'b1}}, {WORD_W{1'b0}}} << (7'd32 - 7'(acc_q));
    bits     = pay96[VW-1 -: 2*WORD_W];
    buf_en   = step ? en96[VW-1 -: 2*WORD_W] : '0;
    if (fire) current = {1'b0, acc_q} + (PTR_W+1)'(clm1) + 1'b1 + (PTR_W+1)'(extra_bits(esc, eob));
    else      current = (PTR_W+1)'(WORD_W);
    push      = adv && shift_out_q;
    push_data = msb_q;
    acc_o       = acc_q;
    shift_out_o = shift_out_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msb_q       <= '0;
      lsb_q       <= '0;
      acc_q       <= '0;
      shift_out_q <= 1'b0;
    end else if (adv) begin
      for (int i = 0; i < int'(WORD_W); i++) begin
        if (buf_en[WORD_W + i])  msb_q[i] <= bits[WORD_W + i];
        else if (shift_out_q)    msb_q[i] <= lsb_q[i];
        if (buf_en[i])           lsb_q[i] <= bits[i];
      end
      if (step) begin
        shift_out_q <= (current >= (PTR_W+1)'(WORD_W));
        acc_q       <= (current >= (PTR_W+1)'(WORD_W)) ? PTR_W'(current - (PTR_W+1)'(WORD_W))
                                                       : PTR_W'(current);
      end else begin
        shift_out_q <= 1'b0;
      end
    end
  end

endmodule
