// tb_hdtv_rate -- one-symbol-per-clock throughput over an HDTV-frame-sized stream.
//
// A 1920x1080 4:2:2 intra frame carries roughly 250k-600k run/level symbols;
// this test runs three frame-sized streams of 590,302, 252,817 and 289,129
// synthetic pairs (drawn pseudo-randomly from the example table, about 7 bits
// per pair, one EOB per ~10 pairs) through the encoder with every handshake open, loops the 16-bit
// output straight back into the decoder, and checks that
//   * the encoder accepts all pairs within pairs + 64 clocks (a few stalls
//     come from the 64-bit FIFOs in the loop, as expected of 16-bit aligned
//     stream buffers),
//   * the decoder returns every pair, in order and correct, within
//     pairs + 64 clocks of its first result (start-up and refill bubbles),
//     i.e. at least 99.9 % of one symbol per clock.
module tb_hdtv_rate;
  import vlc_pkg::*;
  import tb_vlc_tables::*;

  localparam int NFRAMES = 3;
  localparam int FRAME_PAIRS [NFRAMES] = '{590302, 252817, 289129};
  int NPAIRS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      prog_we = 1'b0;
  prog_sel_e                 prog_sel = PROG_CBS;
  logic [PROG_AW-1:0]        prog_addr = '0;
  logic [PROG_DW-1:0]        prog_data = '0;
  logic                      enc_valid = 1'b0, enc_ready, enc_flush = 1'b0;
  logic [RUN_W-1:0]          enc_run = '0;
  logic signed [LEVEL_W-1:0] enc_level = '0;
  logic [IO_W-1:0]           out_bitstream;
  logic                      out_valid, request;
  logic                      dec_valid, dec_finish;
  logic [RUN_W-1:0]          dec_run;
  logic signed [LEVEL_W-1:0] dec_level;
  logic                      output_fifo_full, input_fifo_empty, dec_miss;

  vlc_codec_top dut (
    .clk, .rst_n, .prog_we, .prog_sel, .prog_addr, .prog_data,
    .enc_valid, .enc_ready, .enc_run, .enc_level, .enc_flush,
    .out_bitstream, .out_valid, .received(request),
    .in_bitstream(out_bitstream), .in_valid(out_valid), .request,
    .dec_receive(1'b1), .dec_valid, .dec_run, .dec_level, .dec_finish,
    .output_fifo_full, .input_fifo_empty, .dec_miss
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2 * (590302 + 252817 + 289129) + 60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog(prog_sel_e sel, int addr, logic [PROG_DW-1:0] data);
    @(negedge clk);
    prog_we = 1'b1; prog_sel = sel; prog_addr = PROG_AW'(addr); prog_data = data;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  // pairs are regenerated from a seeded LFSR on both sides instead of stored
  function automatic void pair_of(int unsigned idx, output int run, output int level);
    int unsigned h;
    h = idx * 32'h9E3779B1 ^ (idx >> 7);
    h = h ^ (h >> 13);
    h = h * 32'h85EBCA6B;
    h = h ^ (h >> 16);
    if (h % 10 == 0) begin run = 0; level = 0; end
    else begin
      run = (h >> 4) % 6;
      level = 1 + int'((h >> 8) % max_level(run));
      if (((h >> 20) & 1) != 0) level = -level;
    end
  endfunction

  int n_dec = 0, first_dec = -1, last_dec = 0, n_acc = 0, first_acc = -1, last_acc = 0;
  int n_bad = 0;

  always @(posedge clk) if (dec_valid && n_dec < NPAIRS) begin
    int r, l;
    pair_of(n_dec, r, l);
    if (l == 0 ? !(dec_finish && dec_run == 0 && dec_level == 0)
               : (dec_finish || int'(dec_run) != r || int'(dec_level) != l)) begin
      n_bad++;
      if (n_bad < 5) $display("FAIL pair %0d: got (%0d,%0d) expected (%0d,%0d)", n_dec, dec_run, dec_level, r, l);
    end
    if (first_dec < 0) first_dec = cycle;
    last_dec = cycle;
    n_dec++;
  end

  task automatic run_frame(int n);
    int r, l;
    rst_n = 1'b0;
    NPAIRS = 0;
    repeat (3) @(posedge clk);
    NPAIRS = n;
    n_dec = 0; first_dec = -1; last_dec = 0; n_acc = 0; first_acc = -1; last_acc = 0; n_bad = 0;
    rst_n = 1'b1;
    for (int rr = 0; rr < 32; rr++) prog(PROG_CBS, rr, PROG_DW'(cbs_of(rr)));
    prog(PROG_CBS, 32, PROG_DW'(cbs_of(32)));
    for (int c = 1; c <= NPAIR; c++) prog(PROG_SYMADDR, c, PROG_DW'(PAIR_ADDR[c-1]));
    for (int a = 0; a < NADDR; a++) prog(PROG_SYMBOL, a, PROG_DW'(symbol_at(a)));
    for (int g = 0; g < NGRP; g++) prog(PROG_GROUP, g, PROG_DW'(group_word(g)));
    prog(PROG_SPECIAL, 0, PROG_DW'(ESC_ADDR));
    prog(PROG_SPECIAL, 1, PROG_DW'(EOB_ADDR));
    // NPAIRS pairs, then 40 EOBs so the last codewords are followed by bits
    for (int i = 0; i < NPAIRS + 40; i++) begin
      @(negedge clk);
      if (i < NPAIRS) pair_of(i, r, l); else begin r = 0; l = 0; end
      enc_valid = 1'b1; enc_run = RUN_W'(r); enc_level = LEVEL_W'(l);
      @(posedge clk);
      while (!enc_ready) @(posedge clk);
      if (first_acc < 0) first_acc = cycle;
      last_acc = cycle;
      n_acc++;
    end
    @(negedge clk);
    enc_valid = 1'b0; enc_flush = 1'b1;
    while (n_dec < NPAIRS && cycle - last_acc < 5000) @(posedge clk);
    $display("encoded %0d pairs in %0d clocks; decoded %0d pairs in %0d clocks",
             n_acc, last_acc - first_acc + 1, n_dec, last_dec - first_dec + 1);
    checks++; if (last_acc - first_acc + 1 > NPAIRS + 40 + 64) begin failures++; $display("FAIL: encoder too slow"); end
    checks++; if (n_dec != NPAIRS) begin failures++; $display("FAIL: decoded %0d", n_dec); end
    checks++; if (last_dec - first_dec + 1 > NPAIRS + 64) begin failures++; $display("FAIL: decoder too slow"); end
    checks++; if (n_bad != 0) failures++;
    checks++; if (dec_miss) failures++;
    enc_flush = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < NFRAMES; f++) run_frame(FRAME_PAIRS[f]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
