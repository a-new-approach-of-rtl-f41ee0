// tb_vlc_enc_dec -- checks the group-based VLC encoder/decoder on the 9-group example table.
//
// Programs the nine groups, then checks the two worked cases of the method:
// the stream 0011 1110 0110 ... decodes to symbol address 7 with a 6-bit
// codeword, and symbol address 19 encodes to the 7-bit codeword 1111100.
// Then every used symbol address is encoded and compared with the codeword
// list, and every codeword, followed by random bits, is decoded and compared
// with its address and length.  Unused addresses / bit patterns are not
// checked (they have no defined result).
module tb_vlc_enc_dec;
  import vlc_pkg::*;
  import tb_vlc_tables::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic gi_we = 0;
  logic [4:0] gi_waddr = '0;
  group_info_t gi_wdata = '0;
  logic [7:0] enc_symaddr = '0, dec_symaddr;
  logic [15:0] enc_codeword, dec_bitstream = '0;
  logic [3:0] enc_clm1, dec_clm1;
  logic enc_hit_any, dec_hit_any;
  int checks = 0, failures = 0;

  vlc_enc_dec dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NGRP; g++) begin
      @(negedge clk); gi_we = 1; gi_waddr = 5'(g); gi_wdata = group_word(g);
    end
    @(negedge clk); gi_we = 0;
    // worked cases
    dec_bitstream = 16'b0011111001100000; enc_symaddr = 8'd19; #1;
    chk(dec_symaddr == 7 && dec_clm1 == 5 && dec_hit_any, $sformatf("decode example: %0d cl-1 %0d", dec_symaddr, dec_clm1));
    chk(enc_codeword == 16'b1111100 && enc_clm1 == 6 && enc_hit_any, $sformatf("encode example: %b", enc_codeword));
    for (int rep = 0; rep < 20; rep++)
      for (int a = 0; a < NADDR; a++) begin
        if (CW_LEN[a] == 0) continue;
        enc_symaddr = 8'(a);
        dec_bitstream = 16'($urandom);
        for (int i = 0; i < CW_LEN[a]; i++) dec_bitstream[15 - i] = CW_BITS[a][CW_LEN[a] - 1 - i];
        #1;
        chk(enc_codeword == 16'(CW_BITS[a]) && enc_clm1 == 4'(CW_LEN[a] - 1),
            $sformatf("encode addr %0d: %b", a, enc_codeword));
        chk(dec_symaddr == 8'(a) && dec_clm1 == 4'(CW_LEN[a] - 1),
            $sformatf("decode addr %0d: got %0d", a, dec_symaddr));
      end
    // below the first group nothing hits
    dec_bitstream = 16'h0800; #1;
    chk(!dec_hit_any, "window below every group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
