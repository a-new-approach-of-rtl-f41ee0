// tb_vlc_codec_top -- end-to-end test of the concurrent VLC codec at its default size.
//
// The tables are loaded through the programming port (the 9-group example code
// of tb_vlc_tables), then the encoder's 16-bit output is looped back into the
// decoder's input, so both directions run at the same time.  Checks:
//   * every 16-bit output word against a bit-exact reference encoding built
//     from the codeword list (not from the group information);
//   * every decoded (run, level, finish) against the pairs sent;
//   * phase A (no back-pressure, no escapes): the encoder accepts one pair per
//     clock and the decoder returns one pair per clock apart from a small
//     start-up and refill overhead;
//   * phase B (random gaps and back-pressure, escapes, EOB, negative levels):
//     every mechanism happens at least once: output-FIFO-full stall, input
//     FIFO starvation, dec_receive stall, escape by level, escape by run > 31,
//     EOB, sign bit, buffer shift-out and shift-in, flush, and cycles where
//     encoder and decoder both work.
module tb_vlc_codec_top;
  import vlc_pkg::*;
  import tb_vlc_tables::*;

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
  logic                      out_valid, received, in_valid, request;
  logic                      dec_receive = 1'b1, dec_valid, dec_finish;
  logic [RUN_W-1:0]          dec_run;
  logic signed [LEVEL_W-1:0] dec_level;
  logic                      output_fifo_full, input_fifo_empty, dec_miss;

  vlc_codec_top dut (.*);

  // loopback with a random gate
  logic link_gate = 1'b1;
  assign in_bitstream = out_bitstream;
  assign in_valid     = out_valid && link_gate;
  assign received     = request && link_gate;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- table programming ----------------
  task automatic prog(prog_sel_e sel, int addr, logic [PROG_DW-1:0] data);
    @(negedge clk);
    prog_we = 1'b1; prog_sel = sel; prog_addr = PROG_AW'(addr); prog_data = data;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic program_tables();
    for (int r = 0; r < 32; r++) prog(PROG_CBS, r, PROG_DW'(cbs_of(r)));
    prog(PROG_CBS, 32, PROG_DW'(cbs_of(32)));
    for (int c = 1; c <= NPAIR; c++) prog(PROG_SYMADDR, c, PROG_DW'(PAIR_ADDR[c-1]));
    for (int a = 0; a < NADDR; a++) prog(PROG_SYMBOL, a, PROG_DW'(symbol_at(a)));
    for (int g = 0; g < NGRP; g++) prog(PROG_GROUP, g, PROG_DW'(group_word(g)));
    prog(PROG_SPECIAL, 0, PROG_DW'(ESC_ADDR));
    prog(PROG_SPECIAL, 1, PROG_DW'(EOB_ADDR));
  endtask

  // ---------------- stimulus and expectations ----------------
  typedef struct { int run; int level; } pair_t;
  pair_t send_q[$], exp_q[$];
  bit    ref_bits[$];
  int    n_real;          // pairs before the EOB padding

  function automatic pair_t rand_pair(bit allow_esc);
    pair_t p;
    int k = allow_esc ? int'($urandom_range(0, 99)) : int'($urandom_range(0, 84));
    if (k < 75) begin
      p.run = $urandom_range(0, 5);
      p.level = $urandom_range(1, max_level(p.run));
    end else if (k < 85) begin
      p.run = 0; p.level = 0;                          // EOB
    end else if (k < 91) begin
      p.run = $urandom_range(0, 5);                    // escape by level
      p.level = max_level(p.run) + $urandom_range(1, 2000);
    end else if (k < 95) begin
      p.run = $urandom_range(32, 63);                  // escape by run
      p.level = $urandom_range(1, 5);
    end else begin
      p.run = $urandom_range(6, 31);                   // run without table entries
      p.level = $urandom_range(1, 40);
    end
    if (p.level != 0 && $urandom_range(0, 1) != 0) p.level = -p.level;
    return p;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_acc, n_dec, first_acc, last_acc, first_dec, last_dec;
  int c_ofull, c_starve, c_recv_stall, c_esc_lvl, c_esc_run, c_eob, c_neg;
  int c_shout, c_shin, c_flush, c_concurrent, c_dec_esc;
  bit gating;             // phase B random back-pressure
  bit running;
  int gap_pct;

  always @(posedge clk) if (running) begin
    if (output_fifo_full && enc_valid) c_ofull++;
    if (dut.sel_ready && dut.need_shift && !dut.ififo_has32 && dec_receive) c_starve++;
    if (!dec_receive && dec_valid) c_recv_stall++;
    if (dut.cat_push) c_shout++;
    if (dut.dec_fire3 && dut.need_shift) c_shin++;
    if (dut.dec_fire3 && dut.dec_esc) c_dec_esc++;
    if (dut.enc_fire3 && dut.dec_fire3) c_concurrent++;
    if (dut.u_cat.do_flush && dut.enc_adv) c_flush++;
    check(!dec_miss, "decoded window matched no group");
  end

  // output word checker
  int out_words;
  always @(posedge clk) if (running && out_valid && received) begin
    for (int i = 15; i >= 0; i--) begin
      int idx;
      idx = out_words * 16 + (15 - i);
      if (idx < ref_bits.size()) check(out_bitstream[i] == ref_bits[idx],
                                       $sformatf("output bit %0d", idx));
    end
    out_words++;
  end

  // decoded pair checker
  always @(posedge clk) if (running && dec_valid && dec_receive) begin
    if (exp_q.size() > 0) begin
      pair_t e;
      e = exp_q.pop_front();
      if (e.level == 0)
        check(dec_finish && dec_run == 0 && dec_level == 0,
              $sformatf("decoded #%0d: expected EOB, got run %0d level %0d finish %0b",
                        n_dec, dec_run, dec_level, dec_finish));
      else
        check(!dec_finish && int'(dec_run) == e.run && int'(dec_level) == e.level,
              $sformatf("decoded #%0d: expected (%0d,%0d) got (%0d,%0d)",
                        n_dec, e.run, e.level, dec_run, dec_level));
      if (n_dec < n_real) begin
        if (n_dec == 0) first_dec = cycle;
        last_dec = cycle;
      end
      n_dec++;
    end else begin
      check(0, "unexpected decoded pair");
    end
  end

  // random back-pressure
  always @(negedge clk) begin
    if (gating) begin
      link_gate   = ($urandom_range(0, 99) < 60);
      dec_receive = ($urandom_range(0, 99) < 75);
    end else begin
      link_gate   = 1'b1;
      dec_receive = 1'b1;
    end
  end

  task automatic run_phase(int n, bit esc_mix, bit gate, int gap);
    pair_t p;
    int t0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    program_tables();
    send_q.delete(); exp_q.delete(); ref_bits.delete();
    for (int i = 0; i < n; i++) begin
      p = rand_pair(esc_mix);
      send_q.push_back(p);
      if (p.level == 0) c_eob++;
      else if (p.run > 31) c_esc_run++;
      else if (is_escaped(p.run, p.level)) c_esc_lvl++;
      else if (p.level < 0) c_neg++;
    end
    n_real = n;
    // EOB padding so the last real codewords are followed by enough bits
    for (int i = 0; i < 40; i++) send_q.push_back('{0, 0});
    foreach (send_q[i]) begin
      exp_q.push_back(send_q[i]);
      encode_pair(send_q[i].run, send_q[i].level, ref_bits);
    end
    out_words = 0; n_acc = 0; n_dec = 0;
    gating = gate; gap_pct = gap; running = 1'b1;
    // drive the encoder
    while (send_q.size() > 0) begin
      @(negedge clk);
      enc_valid = ($urandom_range(0, 99) >= gap_pct);
      enc_run   = RUN_W'(send_q[0].run);
      enc_level = LEVEL_W'(send_q[0].level);
      @(posedge clk);
      if (enc_valid && enc_ready) begin
        void'(send_q.pop_front());
        if (n_acc == 0) first_acc = cycle;
        last_acc = cycle;
        n_acc++;
      end
    end
    @(negedge clk);
    enc_valid = 1'b0;
    enc_flush = 1'b1;
    repeat (8) @(negedge clk);
    enc_flush = 1'b0;
    t0 = cycle;
    while (n_dec < n_real && cycle - t0 < 20 * n + 2000) @(posedge clk);
    repeat (20) @(posedge clk);
    running = 1'b0;
    check(n_dec >= n_real, $sformatf("decoded %0d of %0d pairs", n_dec, n_real));
    check(out_words * 16 >= ref_bits.size() - 80,
          $sformatf("only %0d output words for %0d reference bits", out_words, ref_bits.size()));
  endtask

  initial begin
    automatic int n = 600;
    running = 1'b0; gating = 1'b0;
    // ---- phase A: full rate, no escapes, no back-pressure ----
    run_phase(n, 1'b0, 1'b0, 0);
    check(last_acc - first_acc == n + 40 - 1,
          $sformatf("encoder took %0d cycles for %0d pairs", last_acc - first_acc + 1, n + 40));
    $display("phase A: %0d pairs encoded in %0d cycles, decoded in %0d cycles",
             n, last_acc - first_acc + 1, last_dec - first_dec + 1);
    check(last_dec - first_dec + 1 <= n + n / 16,
          $sformatf("decoder took %0d cycles for %0d pairs", last_dec - first_dec + 1, n));
    // ---- phase B: escapes, EOB, random gaps and back-pressure ----
    run_phase(2000, 1'b1, 1'b1, 10);
    $display("mechanisms: ofull=%0d starve=%0d recv_stall=%0d esc_lvl=%0d esc_run=%0d eob=%0d neg=%0d",
             c_ofull, c_starve, c_recv_stall, c_esc_lvl, c_esc_run, c_eob, c_neg);
    $display("            shift_out=%0d shift_in=%0d flush=%0d concurrent=%0d dec_esc=%0d",
             c_shout, c_shin, c_flush, c_concurrent, c_dec_esc);
    check(c_ofull > 0,      "output FIFO full stall never happened");
    check(c_starve > 0,     "input FIFO starvation never happened");
    check(c_recv_stall > 0, "dec_receive stall never happened");
    check(c_esc_lvl > 0,    "escape by level never happened");
    check(c_esc_run > 0,    "escape by run never happened");
    check(c_eob > 0,        "EOB never happened");
    check(c_neg > 0,        "negative level never happened");
    check(c_shout > 0,      "shift-out never happened");
    check(c_shin > 0,       "shift-in never happened");
    check(c_flush > 0,      "flush never happened");
    check(c_concurrent > 0, "encoder and decoder never worked in the same cycle");
    check(c_dec_esc > 0,    "decoder never saw an escape");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
