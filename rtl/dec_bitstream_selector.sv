// dec_bitstream_selector -- finds the next codeword and its side bits in the input stream.
//
// Two 32-bit buffers, MSB and LSB, hold the next 64 undecoded-or-partly-decoded
// bits; decCL_acc (6 bits) points at the first undecoded bit of the MSB buffer.
// A barrel shifter moves {MSB, LSB} left by decCL_acc to give dec_bitstream32;
// its 16 MSBs are the window the VLC decoder works on.  Once the decoder
// returns decCL-1, a second barrel shifter moves the 31 LSBs of
// dec_bitstream32 left by decCL-1 and keeps 18 bits: the bits right after the
// codeword, i.e. the escRL field {run, level} or the sign bit.  With the
// special code detector's {dec_esc, dec_EOB}, the pointer advances by
// decCL-1 + 1 + {1, 0, 18} (normal, EOB, escape).  When the new pointer
// reaches 32, LSB replaces MSB, the next 32 bits from the Input FIFO enter
// LSB, and 32 is subtracted.  This all follows the original.  Additions of
// this design: after reset the two buffers are first filled from the FIFO
// (ready goes high when both hold data), and need_shift is brought out so the
// controller can stall when a refill is due but the FIFO is empty.  An escape
// codeword may be at most 14 bits, so that codeword plus 18 escRL bits fit in
// the 32-bit window.
//
// Timing: fire (from the decoder controller) advances the pointer at the
// clock edge; everything between the registers and need_shift is one
// combinational path through the VLC decoder and the special code detector.
module dec_bitstream_selector import vlc_pkg::*; (
  input  logic               clk,
  input  logic               rst_n,
  // Input FIFO
  input  logic [WORD_W-1:0]  fifo_data,
  input  logic               fifo_has32,
  output logic               fifo_pop,
  // VLC decoder and special code detector
  output logic [CW_W-1:0]    dec_bitstream,
  input  logic [CL_W-1:0]    dec_clm1,
  input  logic               dec_esc,
  input  logic               dec_eob,
  output logic [ESCRL_W-1:0] escrl_sign,
  // control
  input  logic               fire,
  output logic               need_shift,
  output logic               ready,
  output logic [PTR_W-1:0]   acc_o
);
  logic [WORD_W-1:0]   msb_q, lsb_q;
  logic [PTR_W-1:0]    acc_q;
  logic [1:0]          loaded_q;
  logic [2*WORD_W-1:0] win;
  logic [WORD_W-1:0]   bs32;
  logic [WORD_W-2:0]   side;
  logic [PTR_W:0]      current;
  logic                fill;

  always_comb begin
    win           = {msb_q, lsb_q} << acc_q;
    bs32          = win[2*WORD_W-1 -: WORD_W];
    dec_bitstream = bs32[WORD_W-1 -: CW_W];
    side          = bs32[WORD_W-2:0] << dec_clm1;
    escrl_sign    = side[WORD_W-2 -: ESCRL_W];
    current       = {1'b0, acc_q} + (PTR_W+1)'(dec_clm1) + 1'b1
                  + (PTR_W+1)'(extra_bits(dec_esc, dec_eob));
    need_shift    = (current >= (PTR_W+1)'(WORD_W));
    ready         = (loaded_q == 2'd2);
    fill          = !ready && fifo_has32;
    fifo_pop      = fill || (fire && need_shift);
    acc_o         = acc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msb_q    <= '0;
      lsb_q    <= '0;
      acc_q    <= '0;
      loaded_q <= '0;
    end else begin
      if (fifo_pop) begin
        msb_q <= lsb_q;
        lsb_q <= fifo_data;
      end
      if (fill) loaded_q <= loaded_q + 1'b1;
      if (fire) acc_q <= need_shift ? PTR_W'(current - (PTR_W+1)'(WORD_W)) : PTR_W'(current);
    end
  end

  a_fire_ready: assert property (@(posedge clk) disable iff (!rst_n) fire |-> ready);
  a_refill:     assert property (@(posedge clk) disable iff (!rst_n) (fire && need_shift) |-> fifo_has32);

endmodule
