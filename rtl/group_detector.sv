// group_detector -- one codeword group: its stored information and hit logic.
//
// Holds the 29-bit group information {valid, PCLC_mincode, CL-1, base_address}
// and two subtractors: enc_symaddr - base_address (8 bits) for the encoder and
// dec_bitstream - PCLC_mincode (16 bits) for the decoder.  The borrow of each
// subtraction is the group's sign bit; an invalid group forces its signs to 1.
// Groups are stored in ascending PCLC_mincode (and base address) order, so the
// matching group x is the one whose own sign is 0 while group x+1's sign is 1
// (sign_next, chained in by the parent; 1 for the last detector).  On a hit the
// detector drives its information onto the shared result lines.  The original
// uses tri-state buffers on a common bus; here each detector ANDs its outputs
// with its hit and the parent ORs them, which is the same function with only
// one driver per net.
//
// Interface: we/wdata load the entry (reset clears valid).  Everything else is
// combinational.
module group_detector import vlc_pkg::*; (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  group_info_t       wdata,
  // encoder side
  input  logic [ADDR_W-1:0] enc_symaddr,
  input  logic              enc_sign_next,
  output logic              enc_sign,
  output logic              enc_hit,
  output logic [CW_W-1:0]   enc_mincode,   // PCLC_mincode, zero unless hit
  output logic [CL_W-1:0]   enc_clm1,      // encCL-1,      zero unless hit
  output logic [ADDR_W-1:0] enc_offset,    // zero unless hit
  // decoder side
  input  logic [CW_W-1:0]   dec_bitstream,
  input  logic              dec_sign_next,
  output logic              dec_sign,
  output logic              dec_hit,
  output logic [CL_W-1:0]   dec_clm1,      // decCL-1,   zero unless hit
  output logic [ADDR_W-1:0] dec_base,      // base_addr, zero unless hit
  output logic [CW_W-1:0]   dec_offset     // zero unless hit
);
  group_info_t info;
  logic [ADDR_W:0] enc_diff;
  logic [CW_W:0]   dec_diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  info <= '0;
    else if (we) info <= wdata;
  end

  always_comb begin
    enc_diff = {1'b0, enc_symaddr} - {1'b0, info.base};
    dec_diff = {1'b0, dec_bitstream} - {1'b0, info.mincode};
    enc_sign = enc_diff[ADDR_W] | ~info.valid;
    dec_sign = dec_diff[CW_W]   | ~info.valid;
    enc_hit  = enc_sign ^ enc_sign_next;
    dec_hit  = dec_sign ^ dec_sign_next;
    enc_mincode = enc_hit ? info.mincode          : '0;
    enc_clm1    = enc_hit ? info.clm1             : '0;
    enc_offset  = enc_hit ? enc_diff[ADDR_W-1:0]  : '0;
    dec_clm1    = dec_hit ? info.clm1             : '0;
    dec_base    = dec_hit ? info.base             : '0;
    dec_offset  = dec_hit ? dec_diff[CW_W-1:0]    : '0;
  end

endmodule
