// vlc_enc_dec -- group-based VLC encoder/decoder (32 groups, shared group info).
//
// Encoding: the group detectors find the group whose base-address range holds
// enc_symaddr and return its PCLC_mincode, CL-1 and enc_offset.  A barrel
// shifter takes {15'b0, PCLC_mincode} left by CL-1 and keeps the 16 MSBs,
// which right-justifies the CL leading bits of the mincode (the VLC_mincode);
// adding enc_offset gives enc_codeword = {0..0, CL-bit codeword}.
// Decoding: the detectors find the group whose PCLC_mincode range holds the
// 16-bit window dec_bitstream and return CL-1, base_addr and dec_offset.  A
// second barrel shifter takes {7'b0, dec_offset} left by CL-1 and keeps the 8
// MSBs, which are the CL leading bits of the offset (the VLC_codeoffset);
// adding base_addr gives dec_symaddr.  Both directions use the same table at
// the same time.  This follows the original's structure; the hit flags
// (enc_hit_any, dec_hit_any) are an addition that reports a bit stream or
// symbol address that falls outside every group.
//
// Interface: gi_we/gi_waddr/gi_wdata program group information; the coding
// paths are purely combinational (the surrounding pipeline registers them).
module vlc_enc_dec import vlc_pkg::*; #(
  parameter int unsigned NG = NGROUPS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   gi_we,
  input  logic [$clog2(NG)-1:0]  gi_waddr,
  input  group_info_t            gi_wdata,
  // encoder
  input  logic [ADDR_W-1:0]      enc_symaddr,
  output logic [CW_W-1:0]        enc_codeword,
  output logic [CL_W-1:0]        enc_clm1,
  output logic                   enc_hit_any,
  // decoder
  input  logic [CW_W-1:0]        dec_bitstream,
  output logic [ADDR_W-1:0]      dec_symaddr,
  output logic [CL_W-1:0]        dec_clm1,
  output logic                   dec_hit_any
);
  logic [NG:0]        enc_sign, dec_sign;
  logic [NG-1:0]      enc_hit, dec_hit;
  logic [CW_W-1:0]    g_enc_mincode [NG];
  logic [CL_W-1:0]    g_enc_clm1    [NG];
  logic [ADDR_W-1:0]  g_enc_offset  [NG];
  logic [CL_W-1:0]    g_dec_clm1    [NG];
  logic [ADDR_W-1:0]  g_dec_base    [NG];
  logic [CW_W-1:0]    g_dec_offset  [NG];

  assign enc_sign[NG] = 1'b1;
  assign dec_sign[NG] = 1'b1;

  for (genvar g = 0; g < int'(NG); g++) begin : g_det
    group_detector u_det (
      .clk, .rst_n,
      .we            (gi_we && gi_waddr == g),
      .wdata         (gi_wdata),
      .enc_symaddr,
      .enc_sign_next (enc_sign[g+1]),
      .enc_sign      (enc_sign[g]),
      .enc_hit       (enc_hit[g]),
      .enc_mincode   (g_enc_mincode[g]),
      .enc_clm1      (g_enc_clm1[g]),
      .enc_offset    (g_enc_offset[g]),
      .dec_bitstream,
      .dec_sign_next (dec_sign[g+1]),
      .dec_sign      (dec_sign[g]),
      .dec_hit       (dec_hit[g]),
      .dec_clm1      (g_dec_clm1[g]),
      .dec_base      (g_dec_base[g]),
      .dec_offset    (g_dec_offset[g])
    );
  end

  // shared result lines (one detector at most drives non-zero values)
  logic [CW_W-1:0]   mincode, d_offset;
  logic [ADDR_W-1:0] e_offset, base;
  logic [CL_W-1:0]   e_clm1, d_clm1;

  always_comb begin
    mincode = '0; e_clm1 = '0; e_offset = '0;
    d_clm1  = '0; base   = '0; d_offset = '0;
    for (int g = 0; g < int'(NG); g++) begin
      mincode  |= g_enc_mincode[g];
      e_clm1   |= g_enc_clm1[g];
      e_offset |= g_enc_offset[g];
      d_clm1   |= g_dec_clm1[g];
      base     |= g_dec_base[g];
      d_offset |= g_dec_offset[g];
    end
  end

  // barrel shifters and adders
  logic [2*CW_W-2:0]      enc_bs;   // 31 bits
  logic [CW_W+ADDR_W-2:0] dec_bs;   // 23 bits
  logic [CW_W-1:0]        vlc_mincode;
  logic [ADDR_W-1:0]      vlc_codeoffset;

  always_comb begin
    enc_bs         = {{(CW_W-1){1'b0}}, mincode} << e_clm1;
    vlc_mincode    = enc_bs[2*CW_W-2 -: CW_W];
    enc_codeword   = vlc_mincode + {{(CW_W-ADDR_W){1'b0}}, e_offset};
    enc_clm1       = e_clm1;
    enc_hit_any    = |enc_hit;

    dec_bs         = {{(ADDR_W-1){1'b0}}, d_offset} << d_clm1;
    vlc_codeoffset = dec_bs[CW_W+ADDR_W-2 -: ADDR_W];
    dec_symaddr    = vlc_codeoffset + base;
    dec_clm1       = d_clm1;
    dec_hit_any    = |dec_hit;
  end

endmodule
