// special_code_detector -- recognises escape and EOB from the decoded symbol address.
//
// Two programmable registers hold the symbol addresses of the escape and EOB
// codewords.  Comparing dec_symaddr with them tells the Dec_bitstream selector,
// in the same cycle the codeword is decoded, how many bits follow the
// codeword (18 escRL bits, none, or one sign bit), so the next codeword can be
// located without waiting for the symbol memory.  The same two registers give
// the encoder the symbol addresses to send for an escaped pair and for EOB.
// Comparison by symbol address follows the original; the register write port
// is this design's choice.
//
// Interface: we/waddr (0 = escape, 1 = EOB)/wdata; dec_esc/dec_eob are
// combinational.
module special_code_detector import vlc_pkg::*; (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              waddr,
  input  logic [ADDR_W-1:0] wdata,
  input  logic [ADDR_W-1:0] dec_symaddr,
  output logic              dec_esc,
  output logic              dec_eob,
  output logic [ADDR_W-1:0] esc_symaddr,
  output logic [ADDR_W-1:0] eob_symaddr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      esc_symaddr <= '0;
      eob_symaddr <= '0;
    end else if (we) begin
      if (waddr) eob_symaddr <= wdata;
      else       esc_symaddr <= wdata;
    end
  end

  assign dec_esc = (dec_symaddr == esc_symaddr);
  assign dec_eob = (dec_symaddr == eob_symaddr) && !dec_esc;

endmodule
