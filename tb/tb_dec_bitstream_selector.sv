// tb_dec_bitstream_selector -- checks codeword windowing, side-bit extraction and refills.
//
// A stream of random pairs is encoded with the reference encoder of the
// example table (codeword, then sign bit, nothing after EOB, or 18 escRL bits
// after the escape codeword) and offered 32 bits at a time through a modelled
// FIFO that is randomly unavailable.  The testbench plays the VLC decoder and
// special code detector: it matches the window against the codeword list and
// returns CL-1, esc and EOB.  For every decoded codeword it checks that the
// symbol address is the next expected one and that the 18 side bits begin
// with the expected sign / escRL bits.
module tb_dec_bitstream_selector;
  import vlc_pkg::*;
  import tb_vlc_tables::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] fifo_data;
  logic fifo_has32, fifo_pop;
  logic [15:0] dec_bitstream;
  logic [3:0] dec_clm1;
  logic dec_esc, dec_eob;
  logic [17:0] escrl_sign;
  logic fire = 0, need_shift, ready;
  logic [5:0] acc_o;
  int checks = 0, failures = 0;

  dec_bitstream_selector dut (.*);

  bit stream[$];
  int exp_addr[$];
  logic [17:0] exp_side[$];
  int exp_nside[$];
  int word_idx = 0, nwords;
  bit avail = 1, go = 0;
  int match_addr;
  int n_shift = 0, n_stall = 0;

  always_comb begin
    fifo_has32 = avail && (word_idx < nwords);
    fifo_data = '0;
    for (int i = 0; i < 32; i++) fifo_data[31 - i] = (word_idx * 32 + i < stream.size()) ? stream[word_idx * 32 + i] : 1'b0;
    match_addr = -1;
    for (int a = 0; a < NADDR; a++)
      if (CW_LEN[a] != 0 && (dec_bitstream >> (16 - CW_LEN[a])) == 16'(CW_BITS[a])) match_addr = a;
    dec_clm1 = (match_addr >= 0) ? 4'(CW_LEN[match_addr] - 1) : 4'd0;
    dec_esc = (match_addr == ESC_ADDR);
    dec_eob = (match_addr == EOB_ADDR);
  end

  always @(posedge clk) if (rst_n && fifo_pop) word_idx <= word_idx + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int n = 1500, ndone = 0;
    for (int i = 0; i < n; i++) begin
      int r, l, k, a;
      logic [17:0] side;
      bit tmp[$];
      tmp.delete();
      k = $urandom_range(0, 9);
      if (k < 7) begin r = $urandom_range(0, 5); l = $urandom_range(1, max_level(r)); end
      else if (k == 7) begin r = 0; l = 0; end
      else begin r = $urandom_range(0, 63); l = $urandom_range(6, 2047); end
      if (l != 0 && $urandom_range(0, 1) != 0) l = -l;
      encode_pair(r, l, tmp);
      a = (l == 0) ? EOB_ADDR : is_escaped(r, l) ? ESC_ADDR : addr_of_pair(r, l < 0 ? -l : l);
      exp_addr.push_back(a);
      exp_nside.push_back(tmp.size() - CW_LEN[a]);
      side = '0;
      for (int j = CW_LEN[a]; j < tmp.size(); j++) side[17 - (j - CW_LEN[a])] = tmp[j];
      exp_side.push_back(side);
      foreach (tmp[j]) stream.push_back(tmp[j]);
    end
    for (int i = 0; i < 64; i++) stream.push_back(1'b0);
    nwords = (stream.size() + 31) / 32;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (ndone < n) begin
      @(negedge clk);
      avail = ($urandom_range(0, 3) != 0);
      go = ($urandom_range(0, 4) != 0);
      #1;
      fire = go && ready && (!need_shift || fifo_has32);
      #1;
      if (ready && go && need_shift && !fifo_has32) n_stall++;
      if (fire) begin
        logic [17:0] mask;
        mask = '0;
        for (int j = 0; j < exp_nside[ndone]; j++) mask[17 - j] = 1'b1;
        checks++;
        if (match_addr != exp_addr[ndone] || (escrl_sign & mask) != exp_side[ndone]) begin
          failures++;
          if (failures < 10) $display("FAIL #%0d: addr %0d expected %0d, side %h expected %h",
                                      ndone, match_addr, exp_addr[ndone], escrl_sign & mask, exp_side[ndone]);
        end
        if (need_shift) n_shift++;
        ndone++;
      end
      @(posedge clk);
    end
    checks++; if (n_shift == 0 || n_stall == 0) begin failures++; $display("FAIL: no refill or no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
