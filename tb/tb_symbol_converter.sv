// tb_symbol_converter -- checks pair-to-converted-symbol conversion and escape/EOB detection.
//
// The CBS table is the MPEG-2 table-15 profile (see tb_cbs_lut).  The worked
// case run 4, level 2 must give converted symbol 69.  Random pairs, including
// levels above the run's maximum, runs above 31, level 0 (EOB) and negative
// levels, are checked against an independent model one clock after they are
// applied; holding en low must freeze the outputs.
module tb_symbol_converter;
  import vlc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, lut_we = 0;
  logic [5:0] lut_waddr = '0;
  logic [8:0] lut_wdata = '0;
  logic [5:0] run = '0;
  logic signed [11:0] level = '0;
  logic [7:0] conv_sym;
  logic esc, eob;
  logic [17:0] escrl_sign;
  int checks = 0, failures = 0;

  symbol_converter dut (.*);

  function automatic int maxl(int r);
    int t[8] = '{40, 18, 5, 4, 3, 3, 3, 2};
    if (r < 8) return t[r];
    if (r <= 16) return 2;
    return 1;
  endfunction
  function automatic int cbs(int r);
    int s = 0;
    for (int i = 0; i < r; i++) s += maxl(i);
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apply_and_check(int r, int l);
    int mag, e_conv; bit e_esc, e_eob; logic [17:0] e_side;
    @(negedge clk); run = 6'(r); level = 12'(l); en = 1;
    mag = l < 0 ? -l : l;
    e_eob = (l == 0);
    e_esc = !e_eob && (r > 31 || mag > maxl(r));
    e_conv = (cbs(r % 32) + (mag % 64)) % 256;
    e_side = e_esc ? {6'(r), 12'(l)} : e_eob ? 18'd0 : {(l < 0), 17'd0};
    @(negedge clk);
    checks++;
    if (esc != e_esc || eob != e_eob || escrl_sign != e_side || (!e_esc && !e_eob && conv_sym != 8'(e_conv))) begin
      failures++;
      $display("FAIL (%0d,%0d): conv %0d/%0d esc %0b/%0b eob %0b/%0b side %h/%h", r, l,
               conv_sym, e_conv, esc, e_esc, eob, e_eob, escrl_sign, e_side);
    end
  endtask

  initial begin
    logic [7:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r <= 32; r++) begin
      @(negedge clk); lut_we = 1; lut_waddr = 6'(r); lut_wdata = 9'(cbs(r));
    end
    @(negedge clk); lut_we = 0;
    apply_and_check(4, 2);
    checks++; if (conv_sym != 69) begin failures++; $display("FAIL: run 4 level 2 gave %0d", conv_sym); end
    apply_and_check(0, 40);  apply_and_check(0, 41); apply_and_check(31, 1); apply_and_check(31, 2);
    apply_and_check(32, 1);  apply_and_check(3, -4); apply_and_check(3, 0);  apply_and_check(0, -2048);
    for (int i = 0; i < 3000; i++) begin
      int r, l;
      r = $urandom_range(0, 63);
      l = $urandom_range(0, 3) == 0 ? int'($urandom_range(0, 4095)) - 2048 : int'($urandom_range(0, 45));
      if ($urandom_range(0, 1) != 0) l = -l;
      apply_and_check(r, l);
    end
    // hold
    held = conv_sym;
    @(negedge clk); en = 0; run = 1; level = 5;
    @(negedge clk); checks++; if (conv_sym != held) begin failures++; $display("FAIL: en=0 did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
