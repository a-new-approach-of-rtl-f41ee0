// vlc_codec_top -- concurrent group-based VLC encoder and decoder with programmable tables.
//
// The encoder takes one (run, signed level) pair per clock and emits an
// MPEG-style bit stream (codeword, then a sign bit, or for an escaped pair the
// 18-bit {run, level} field, or nothing after EOB) as 16-bit words.  The
// decoder takes 16-bit words of such a stream and returns one pair per clock.
// Both run at the same time and share one 32-entry group-information table.
//
// Encoder pipeline (one pair per clock, three stages):
//   1  symbol_converter   pair -> converted symbol CBS[run]+|level|, esc/EOB
//   2  symaddr_mem        converted symbol -> symbol address (escape/EOB use
//                         the programmed special symbol addresses)
//   3  vlc_enc_dec (enc) + enc_bitstream_concatenator -> output_fifo
// Decoder pipeline (one codeword per clock, three stages):
//   3  input_fifo -> dec_bitstream_selector + vlc_enc_dec (dec) +
//      special_code_detector: codeword, its length and side bits in one cycle
//   2  symbol_mem         symbol address -> 12-bit symbol
//   1  symbol_recoverer   symbol + sign, or escRL -> (run, level), EOB flag
// The encoder stalls while the Output FIFO lacks room for 32 bits; the decoder
// stalls while dec_receive is low, and inserts a bubble when the selector
// needs 32 new bits and the Input FIFO does not have them.  Block structure,
// table sizes, stage split and stall causes follow the original.  The
// programming port, the handshakes' exact rules, the EOB/sign encodings and
// enc_flush (pads the last 32-bit word after the encoder has drained) are this
// design's choices.
//
// Programming: while prog_we is high, prog_data is written to table prog_sel
// at prog_addr (see vlc_pkg::prog_sel_e for the layouts).  Tables can be
// reloaded at any time; coding with a half-loaded table gives undefined codes.
//
// Latency: a pair presented with enc_valid&&enc_ready is in the concatenator
// buffers three clocks later; a decoded pair is on dec_run/dec_level three
// active clocks after its codeword is selected.
module vlc_codec_top import vlc_pkg::*; #(
  parameter int unsigned NG = NGROUPS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // table programming
  input  logic                      prog_we,
  input  prog_sel_e                 prog_sel,
  input  logic [PROG_AW-1:0]        prog_addr,
  input  logic [PROG_DW-1:0]        prog_data,
  // encoder input
  input  logic                      enc_valid,
  output logic                      enc_ready,
  input  logic [RUN_W-1:0]          enc_run,
  input  logic signed [LEVEL_W-1:0] enc_level,
  input  logic                      enc_flush,
  // encoded bit stream out
  output logic [IO_W-1:0]           out_bitstream,
  output logic                      out_valid,
  input  logic                      received,
  // bit stream in
  input  logic [IO_W-1:0]           in_bitstream,
  input  logic                      in_valid,
  output logic                      request,
  // decoder output
  input  logic                      dec_receive,
  output logic                      dec_valid,
  output logic [RUN_W-1:0]          dec_run,
  output logic signed [LEVEL_W-1:0] dec_level,
  output logic                      dec_finish,
  // status
  output logic                      output_fifo_full,
  output logic                      input_fifo_empty,
  output logic                      dec_miss      // stage-3 window matched no group
);
  // ---------------- programming decode ----------------
  logic we_cbs, we_symaddr, we_symbol, we_group, we_special;
  assign we_cbs     = prog_we && prog_sel == PROG_CBS;
  assign we_symaddr = prog_we && prog_sel == PROG_SYMADDR;
  assign we_symbol  = prog_we && prog_sel == PROG_SYMBOL;
  assign we_group   = prog_we && prog_sel == PROG_GROUP;
  assign we_special = prog_we && prog_sel == PROG_SPECIAL;

  logic [ADDR_W-1:0] esc_symaddr, eob_symaddr;

  // ---------------- encoder ----------------
  logic enc_adv, ev1, ev2, enc_fire3;

  enc_en_ctrl u_enc_ctrl (
    .clk, .rst_n,
    .enc_valid, .out_full(output_fifo_full),
    .enc_ready, .adv(enc_adv), .v1(ev1), .v2(ev2), .fire3(enc_fire3)
  );

  logic [CBS_W-1:0]   e1_conv;
  logic               e1_esc, e1_eob;
  logic [ESCRL_W-1:0] e1_side;

  symbol_converter u_conv (
    .clk, .rst_n, .en(enc_adv),
    .lut_we(we_cbs), .lut_waddr(prog_addr[5:0]), .lut_wdata(prog_data[CBS_W:0]),
    .run(enc_run), .level(enc_level),
    .conv_sym(e1_conv), .esc(e1_esc), .eob(e1_eob), .escrl_sign(e1_side)
  );

  logic [ADDR_W-1:0]  e2_memaddr, enc_symaddr;
  logic               e2_esc, e2_eob;
  logic [ESCRL_W-1:0] e2_side;

  symaddr_mem u_symaddr_mem (
    .clk, .rst_n,
    .we(we_symaddr), .waddr(prog_addr[ADDR_W-1:0]), .wdata(prog_data[ADDR_W-1:0]),
    .en(enc_adv), .raddr(e1_conv), .rdata(e2_memaddr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_esc  <= 1'b0;
      e2_eob  <= 1'b0;
      e2_side <= '0;
    end else if (enc_adv) begin
      e2_esc  <= e1_esc;
      e2_eob  <= e1_eob;
      e2_side <= e1_side;
    end
  end

  always_comb begin
    if (e2_esc)      enc_symaddr = esc_symaddr;
    else if (e2_eob) enc_symaddr = eob_symaddr;
    else             enc_symaddr = e2_memaddr;
  end

  // ---------------- shared group-based VLC encoder/decoder ----------------
  logic [CW_W-1:0]   enc_codeword, dec_window;
  logic [CL_W-1:0]   enc_clm1, dec_clm1;
  logic [ADDR_W-1:0] dec_symaddr;
  logic              enc_hit_any, dec_hit_any;

  vlc_enc_dec #(.NG(NG)) u_codec (
    .clk, .rst_n,
    .gi_we(we_group), .gi_waddr(prog_addr[$clog2(NG)-1:0]), .gi_wdata(group_info_t'(prog_data)),
    .enc_symaddr, .enc_codeword, .enc_clm1, .enc_hit_any,
    .dec_bitstream(dec_window), .dec_symaddr, .dec_clm1, .dec_hit_any
  );

  logic              cat_push;
  logic [WORD_W-1:0] cat_word;

  enc_bitstream_concatenator u_cat (
    .clk, .rst_n,
    .adv(enc_adv), .fire(enc_fire3), .flush(enc_flush && !ev1 && !ev2),
    .codeword(enc_codeword), .clm1(enc_clm1), .esc(e2_esc), .eob(e2_eob), .escrl_sign(e2_side),
    .push(cat_push), .push_data(cat_word), .acc_o(), .shift_out_o()
  );

  output_fifo u_ofifo (
    .clk, .rst_n,
    .push(cat_push), .in_data(cat_word), .full(output_fifo_full),
    .out_data(out_bitstream), .out_valid, .received
  );

  // ---------------- decoder ----------------
  logic [WORD_W-1:0]  ififo_data;
  logic               ififo_has32, ififo_pop;

  input_fifo u_ififo (
    .clk, .rst_n,
    .in_data(in_bitstream), .in_valid, .request,
    .pop(ififo_pop), .out_data(ififo_data), .has32(ififo_has32)
  );
  assign input_fifo_empty = !ififo_has32;

  logic               dec_esc, dec_eob, sel_ready, need_shift;
  logic [ESCRL_W-1:0] d_side;
  logic               dec_adv, dec_fire3, dv3, dv2;

  dec_bitstream_selector u_sel (
    .clk, .rst_n,
    .fifo_data(ififo_data), .fifo_has32(ififo_has32), .fifo_pop(ififo_pop),
    .dec_bitstream(dec_window), .dec_clm1, .dec_esc, .dec_eob, .escrl_sign(d_side),
    .fire(dec_fire3), .need_shift, .ready(sel_ready), .acc_o()
  );

  special_code_detector u_scd (
    .clk, .rst_n,
    .we(we_special), .waddr(prog_addr[0]), .wdata(prog_data[ADDR_W-1:0]),
    .dec_symaddr, .dec_esc, .dec_eob, .esc_symaddr, .eob_symaddr
  );

  dec_en_ctrl u_dec_ctrl (
    .clk, .rst_n,
    .dec_receive, .sel_ready, .need_shift, .fifo_has32(ififo_has32),
    .adv(dec_adv), .fire3(dec_fire3), .starved(), .v3(dv3), .v2(dv2)
  );

  logic [ADDR_W-1:0]  d3_symaddr;
  logic               d3_esc, d3_eob, d2_esc, d2_eob;
  logic [ESCRL_W-1:0] d3_side, d2_side;
  logic [SYM_W-1:0]   d2_symbol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d3_symaddr <= '0; d3_esc <= 1'b0; d3_eob <= 1'b0; d3_side <= '0;
      d2_esc     <= 1'b0; d2_eob <= 1'b0; d2_side <= '0;
      dec_miss   <= 1'b0;
    end else if (dec_adv) begin
      d3_symaddr <= dec_symaddr;
      d3_esc     <= dec_esc;
      d3_eob     <= dec_eob;
      d3_side    <= d_side;
      d2_esc     <= d3_esc;
      d2_eob     <= d3_eob;
      d2_side    <= d3_side;
      dec_miss   <= dec_fire3 && !dec_hit_any;
    end
  end

  symbol_mem u_symbol_mem (
    .clk, .rst_n,
    .we(we_symbol), .waddr(prog_addr[ADDR_W-1:0]), .wdata(prog_data[SYM_W-1:0]),
    .en(dec_adv), .raddr(d3_symaddr), .rdata(d2_symbol)
  );

  symbol_recoverer u_rec (
    .clk, .rst_n, .en(dec_adv),
    .in_valid(dv2), .symbol(d2_symbol), .esc(d2_esc), .eob(d2_eob), .escrl_sign(d2_side),
    .out_valid(dec_valid), .run(dec_run), .level(dec_level), .finish(dec_finish)
  );

  // dv3 is the stage-3 valid bit; it is only needed to time dv2.
  logic unused_ok;
  assign unused_ok = dv3 ^ enc_hit_any;

endmodule
