// tb_enc_bitstream_concatenator -- checks bit packing, shift-out and flush.
//
// Random payloads (codewords of 1..14 bits followed by a sign bit, by nothing
// for EOB, or by 18 escRL bits for escape) are presented with random gaps and
// random stalls (adv low).  Every pushed 32-bit word is compared with the
// reference bit string; a final flush must push the last partial word padded
// with zeros.
module tb_enc_bitstream_concatenator;
  import vlc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 1, fire = 0, flush = 0, esc = 0, eob = 0;
  logic [15:0] codeword = '0;
  logic [3:0] clm1 = '0;
  logic [17:0] escrl_sign = '0;
  logic push, shift_out_o;
  logic [31:0] push_data;
  logic [5:0] acc_o;
  int checks = 0, failures = 0;

  enc_bitstream_concatenator dut (.*);

  bit ref_bits[$];
  int words = 0, n_esc = 0, n_stall = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (push) begin
    for (int i = 0; i < 32; i++) begin
      int idx;
      idx = words * 32 + i;
      checks++;
      if (push_data[31 - i] != ((idx < ref_bits.size()) ? ref_bits[idx] : 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d bit %0d", words, i);
      end
    end
    words++;
  end

  initial begin
    automatic int n = 3000, sent = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (sent < n) begin
      @(negedge clk);
      adv = ($urandom_range(0, 4) != 0);
      if (!adv) n_stall++;
      fire = adv && ($urandom_range(0, 3) != 0);
      if (fire) begin
        int cl, k;
        cl = $urandom_range(1, 14);
        clm1 = 4'(cl - 1);
        codeword = 16'($urandom) & 16'((1 << cl) - 1);
        k = $urandom_range(0, 9);
        esc = (k == 0); eob = (k == 1);
        escrl_sign = esc ? 18'($urandom) : eob ? 18'd0 : {1'($urandom), 17'd0};
        for (int i = cl - 1; i >= 0; i--) ref_bits.push_back(codeword[i]);
        if (esc) begin for (int i = 17; i >= 0; i--) ref_bits.push_back(escrl_sign[i]); n_esc++; end
        else if (!eob) ref_bits.push_back(escrl_sign[17]);
        sent++;
      end
    end
    @(negedge clk); fire = 0; adv = 1; flush = 1;
    repeat (4) @(negedge clk);
    flush = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (words != (ref_bits.size() + 31) / 32) begin
      failures++; $display("FAIL: %0d words pushed for %0d bits", words, ref_bits.size());
    end
    checks++; if (acc_o != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
