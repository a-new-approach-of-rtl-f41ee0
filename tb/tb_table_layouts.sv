// tb_table_layouts -- the codec with two symbol-memory layouts that save space.
//
// The example code leaves three symbol-memory locations unused, because two of
// its groups have gaps in their codeword numbers (addresses 5, 6 and 18).
// This test loads the same code, with the same codewords, in two other
// layouts and checks that the unchanged hardware handles both:
//
//   * Partitioned groups (encode and decode).  Each gapped group is split at
//     its gap into two groups of the same length: 11 groups, 21 locations, no
//     unused location.  Base addresses still rise with PCLC_mincode, so the
//     encoder works too.  Random pairs, with escapes and EOBs, go through the
//     encoder and back into the decoder with random back-pressure on both
//     stream handshakes and on dec_receive.  Every output word is compared
//     with a reference bit stream built from the codeword list, and every
//     decoded pair is compared with the pair sent.
//   * Decode-only placement.  The two-codeword length-4 group moves into the
//     hole at locations 5 and 6 inside the length-6 group's range, and the
//     layout is compacted behind it: 22 locations.  Base addresses are then
//     out of order, which the encoder cannot use but the decoder does not
//     need, since it searches groups by PCLC_mincode only.  A reference bit
//     stream is fed straight into the decoder with random in_valid and
//     dec_receive gaps.
//
// The reference encoder and the code come from tb_vlc_tables; the layouts are
// given here as maps from the example's symbol addresses to new ones.
module tb_table_layouts;
  import vlc_pkg::*;
  import tb_vlc_tables::*;

  localparam int NPAIRS = 1500;
  localparam int NTAIL  = 40;   // trailing EOBs so the last codewords are followed by bits

  // new symbol address of each example address, -1 where it is unused
  localparam int MAP_P [NADDR] = '{0,1,2,3, 4,-1,-1,5, 6, 7,8, 9, 10, 11,12, 13,14,15,-1,16, 17,18,19,20};
  localparam int MAP_D [NADDR] = '{0,1,2,3, 4,-1,-1,7, 8, 5,6, 9, 10, 11,12, 13,14,15,-1,17, 18,19,20,21};
  // group entries of each layout, in ascending PCLC_mincode order
  localparam int         NG_P = 11;
  localparam int         GP_CL   [NG_P] = '{8, 6, 6, 3, 4, 2, 3, 5, 7, 7, 8};
  localparam logic [7:0] GP_MIN  [NG_P] = '{8'b00100100, 8'b00110000, 8'b00111100, 8'b01000000,
                                            8'b01100000, 8'b10000000, 8'b11000000, 8'b11100000,
                                            8'b11110000, 8'b11111000, 8'b11111010};
  localparam int         GP_BASE [NG_P] = '{0, 4, 5, 6, 7, 9, 10, 11, 13, 16, 17};
  localparam int         GD_BASE [NGRP] = '{0, 4, 8, 5, 9, 10, 11, 13, 18};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      prog_we = 1'b0;
  prog_sel_e                 prog_sel = PROG_CBS;
  logic [PROG_AW-1:0]        prog_addr = '0;
  logic [PROG_DW-1:0]        prog_data = '0;
  logic                      enc_valid = 1'b0, enc_ready, enc_flush = 1'b0;
  logic [RUN_W-1:0]          enc_run = '0;
  logic signed [LEVEL_W-1:0] enc_level = '0;
  logic [IO_W-1:0]           out_bitstream, in_bitstream;
  logic                      out_valid, in_valid, received, request;
  logic                      dec_receive, dec_valid, dec_finish;
  logic [RUN_W-1:0]          dec_run;
  logic signed [LEVEL_W-1:0] dec_level;
  logic                      output_fifo_full, input_fifo_empty, dec_miss;

  vlc_codec_top dut (
    .clk, .rst_n, .prog_we, .prog_sel, .prog_addr, .prog_data,
    .enc_valid, .enc_ready, .enc_run, .enc_level, .enc_flush,
    .out_bitstream, .out_valid, .received,
    .in_bitstream, .in_valid, .request,
    .dec_receive, .dec_valid, .dec_run, .dec_level, .dec_finish,
    .output_fifo_full, .input_fifo_empty, .dec_miss
  );

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus: pairs, the reference stream cut into 16-bit words --------
  int          p_run [NPAIRS + NTAIL];
  int          p_lvl [NPAIRS + NTAIL];
  logic [15:0] ref_word [$];
  int          n_esc_ref = 0, n_eob_ref = 0;

  function automatic void make_pairs(int unsigned seed);
    bit q[$];
    int unsigned h;
    int run, lvl;
    void'($urandom(seed));
    n_esc_ref = 0; n_eob_ref = 0;
    for (int i = 0; i < NPAIRS + NTAIL; i++) begin
      h = $urandom;
      if (i >= NPAIRS || h % 10 == 0) begin
        run = 0; lvl = 0;
      end else if (h % 10 == 1) begin          // escaped by run
        run = 6 + int'((h >> 4) % 58);
        lvl = 1 + int'((h >> 10) % 2047);
      end else if (h % 10 == 2) begin          // escaped by level
        run = int'((h >> 4) % 6);
        lvl = max_level(run) + 1 + int'((h >> 10) % 100);
      end else begin
        run = int'((h >> 4) % 6);
        lvl = 1 + int'((h >> 10) % max_level(run));
      end
      if (((h >> 24) & 1) != 0) lvl = -lvl;
      p_run[i] = run; p_lvl[i] = lvl;
      if (i < NPAIRS) begin
        if (lvl == 0) n_eob_ref++;
        else if (is_escaped(run, lvl)) n_esc_ref++;
      end
      encode_pair(run, lvl, q);
    end
    ref_word.delete();
    for (int w = 0; w < q.size() / 16; w++) begin
      logic [15:0] word;
      for (int b = 0; b < 16; b++) word[15 - b] = q[16 * w + b];
      ref_word.push_back(word);
    end
  endfunction

  // ---- programming ----------------------------------------------------------
  task automatic prog(prog_sel_e sel, int addr, logic [PROG_DW-1:0] data);
    @(negedge clk);
    prog_we = 1'b1; prog_sel = sel; prog_addr = PROG_AW'(addr); prog_data = data;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  function automatic group_info_t gword(int cl, logic [7:0] min8, int base);
    group_info_t gi;
    gi.valid   = 1'b1;
    gi.mincode = {min8, 8'h00};
    gi.clm1    = 4'(cl - 1);
    gi.base    = 8'(base);
    return gi;
  endfunction

  task automatic load_layout(bit decode_only);
    int na;
    for (int rr = 0; rr < 32; rr++) prog(PROG_CBS, rr, PROG_DW'(cbs_of(rr)));
    prog(PROG_CBS, 32, PROG_DW'(cbs_of(32)));
    for (int c = 1; c <= NPAIR; c++) begin
      na = decode_only ? MAP_D[PAIR_ADDR[c-1]] : MAP_P[PAIR_ADDR[c-1]];
      prog(PROG_SYMADDR, c, PROG_DW'(na));
    end
    for (int a = 0; a < NADDR; a++) begin
      na = decode_only ? MAP_D[a] : MAP_P[a];
      if (na >= 0) prog(PROG_SYMBOL, na, PROG_DW'(symbol_at(a)));
    end
    if (decode_only)
      for (int g = 0; g < NGRP; g++) prog(PROG_GROUP, g, PROG_DW'(gword(G_CL[g], G_MIN[g], GD_BASE[g])));
    else
      for (int g = 0; g < NG_P; g++) prog(PROG_GROUP, g, PROG_DW'(gword(GP_CL[g], GP_MIN[g], GP_BASE[g])));
    na = decode_only ? MAP_D[ESC_ADDR] : MAP_P[ESC_ADDR];
    prog(PROG_SPECIAL, 0, PROG_DW'(na));
    na = decode_only ? MAP_D[EOB_ADDR] : MAP_P[EOB_ADDR];
    prog(PROG_SPECIAL, 1, PROG_DW'(na));
  endtask

  // ---- stream plumbing --------------------------------------------------------
  // loopback: 1 = encoder output feeds the decoder, 0 = the testbench does
  bit          loopback = 1'b1;
  bit          feed = 1'b0;      // testbench source enabled once the tables are loaded
  logic        gate_s = 1'b1, gate_r = 1'b1;
  int          src_idx = 0;
  always_comb begin
    if (loopback) begin
      in_bitstream = out_bitstream;
      in_valid     = out_valid && gate_s;
      received     = request && gate_s;
    end else begin
      in_bitstream = (src_idx < ref_word.size()) ? ref_word[src_idx] : '0;
      in_valid     = feed && gate_s && src_idx < ref_word.size();
      received     = 1'b0;
    end
    dec_receive = gate_r;
  end

  // ---- monitors ---------------------------------------------------------------
  int n_out = 0, n_out_bad = 0, n_dec = 0, n_bad = 0, n_esc_dec = 0, n_eob_dec = 0;
  int n_src = 0;

  always @(posedge clk) if (rst_n) begin
    if (!loopback && in_valid && request) src_idx <= src_idx + 1;
    if (out_valid && received) begin
      // only words wholly covered by the reference (the flush pads the last one)
      if (n_out < ref_word.size() && out_bitstream !== ref_word[n_out]) begin
        n_out_bad++;
        if (n_out_bad < 4) $display("FAIL word %0d: %h expected %h", n_out, out_bitstream, ref_word[n_out]);
      end
      n_out++;
    end
    if (dec_valid && dec_receive && n_dec < NPAIRS) begin
      if (p_lvl[n_dec] == 0 ? !(dec_finish && dec_run == 0 && dec_level == 0)
                            : (dec_finish || int'(dec_run) != p_run[n_dec] || int'(dec_level) != p_lvl[n_dec])) begin
        n_bad++;
        if (n_bad < 4) $display("FAIL pair %0d: got (%0d,%0d,%0d) expected (%0d,%0d)",
                                n_dec, dec_run, dec_level, dec_finish, p_run[n_dec], p_lvl[n_dec]);
      end
      if (p_lvl[n_dec] == 0) n_eob_dec++;
      else if (is_escaped(p_run[n_dec], p_lvl[n_dec])) n_esc_dec++;
      n_dec++;
    end
  end

  always @(negedge clk) begin
    gate_s <= ($urandom % 4) != 0;
    gate_r <= ($urandom % 5) != 0;
  end

  task automatic reset_all();
    rst_n = 1'b0;
    enc_valid = 1'b0; enc_flush = 1'b0;
    repeat (3) @(posedge clk);
    n_out = 0; n_out_bad = 0; n_dec = 0; n_bad = 0; n_esc_dec = 0; n_eob_dec = 0;
    src_idx = 0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_decoded();
    int t = 0;
    while (n_dec < NPAIRS && t < 15000) begin @(posedge clk); t++; end
  endtask

  initial begin
    // partitioned groups: encode and decode
    loopback = 1'b1;
    make_pairs(11);
    reset_all();
    load_layout(1'b0);
    for (int i = 0; i < NPAIRS + NTAIL; i++) begin
      @(negedge clk);
      enc_valid = 1'b1; enc_run = RUN_W'(p_run[i]); enc_level = LEVEL_W'(p_lvl[i]);
      @(posedge clk);
      while (!enc_ready) @(posedge clk);
    end
    @(negedge clk);
    enc_valid = 1'b0; enc_flush = 1'b1;
    wait_decoded();
    repeat (50) @(posedge clk);
    $display("partitioned: %0d words out, %0d pairs decoded (%0d escapes, %0d EOBs)",
             n_out, n_dec, n_esc_dec, n_eob_dec);
    check(n_out >= ref_word.size(), "partitioned: too few output words");
    check(n_out_bad == 0, "partitioned: output stream differs from the reference");
    check(n_dec == NPAIRS, "partitioned: not every pair decoded");
    check(n_bad == 0, "partitioned: decoded pairs differ");
    check(n_esc_dec == n_esc_ref && n_esc_ref > 0, "partitioned: escapes");
    check(n_eob_dec == n_eob_ref && n_eob_ref > 0, "partitioned: EOBs");
    check(!dec_miss, "partitioned: decoder missed");

    // decode-only placement: reference stream into the decoder
    loopback = 1'b0;
    make_pairs(23);
    reset_all();
    load_layout(1'b1);
    feed = 1'b1;
    wait_decoded();
    feed = 1'b0;
    $display("decode-only: %0d pairs decoded (%0d escapes, %0d EOBs)", n_dec, n_esc_dec, n_eob_dec);
    check(n_dec == NPAIRS, "decode-only: not every pair decoded");
    check(n_bad == 0, "decode-only: decoded pairs differ");
    check(n_esc_dec == n_esc_ref && n_esc_ref > 0, "decode-only: escapes");
    check(n_eob_dec == n_eob_ref && n_eob_ref > 0, "decode-only: EOBs");
    check(!dec_miss, "decode-only: decoder missed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
