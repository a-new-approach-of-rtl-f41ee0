// tb_group_detector -- checks one group detector: sign bits, hit rule and gated outputs.
//
// Loads group 1 of the example table (length 6, PCLC_mincode 0011_0000,
// base 4), sweeps every 8-bit symbol address and random 16-bit windows with
// both values of the next detector's sign, and checks sign, hit (XOR of the
// own and next sign, which in a sorted table means own 0 and next 1) and the
// driven values against arithmetic done in the testbench.  Then clears the
// valid bit: both signs must read 1 and nothing may be driven.
module tb_group_detector;
  import vlc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  group_info_t wdata = '0;
  logic [7:0] enc_symaddr = '0;
  logic [15:0] dec_bitstream = '0;
  logic enc_sign_next = 1, dec_sign_next = 1;
  logic enc_sign, enc_hit, dec_sign, dec_hit;
  logic [15:0] enc_mincode, dec_offset;
  logic [3:0] enc_clm1, dec_clm1;
  logic [7:0] enc_offset, dec_base;
  int checks = 0, failures = 0;

  group_detector dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int a, b;
    bit es, ds, eh, dh;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); we = 1; wdata = '{valid: 1'b1, mincode: 16'h3000, clm1: 4'd5, base: 8'd4};
    @(negedge clk); we = 0;
    for (int i = 0; i < 2048; i++) begin
      a = i % 256;
      b = (i < 256) ? (i << 8) : int'($urandom_range(0, 65535));
      enc_symaddr = 8'(a); dec_bitstream = 16'(b);
      enc_sign_next = 1'($urandom_range(0, 1)); dec_sign_next = 1'($urandom_range(0, 1));
      #1;
      es = (a < 4); ds = (b < 'h3000);
      eh = es ^ enc_sign_next; dh = ds ^ dec_sign_next;   // XOR of the two signs
      chk(enc_sign == es && dec_sign == ds, $sformatf("signs a=%0d b=%h", a, b));
      chk(enc_hit == eh && dec_hit == dh, $sformatf("hits a=%0d b=%h", a, b));
      chk(enc_offset == (eh ? 8'(a - 4) : 8'd0) && enc_mincode == (eh ? 16'h3000 : 16'd0)
          && enc_clm1 == (eh ? 4'd5 : 4'd0), $sformatf("enc outputs a=%0d", a));
      chk(dec_offset == (dh ? 16'(b - 'h3000) : 16'd0) && dec_base == (dh ? 8'd4 : 8'd0)
          && dec_clm1 == (dh ? 4'd5 : 4'd0), $sformatf("dec outputs b=%h", b));
    end
    @(negedge clk); we = 1; wdata.valid = 1'b0;
    @(negedge clk); we = 0;
    enc_symaddr = 8'd200; dec_bitstream = 16'hF000; enc_sign_next = 1; dec_sign_next = 1; #1;
    chk(enc_sign && dec_sign && !enc_hit && !dec_hit && enc_mincode == 0 && dec_base == 0, "invalid group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
