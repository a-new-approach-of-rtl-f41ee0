// tb_cbs_lut -- checks the CBS look-up table with the MPEG-2 table-15 run profile.
//
// Largest levels 40,18,5,4,3,3,3,2 for runs 0..7 (so CBS[4] = 67, CBS[5] = 70),
// then 2 for runs 8..16 and 1 for runs 17..31 (CBS[31] = 110, 111 converted
// symbols in all).  The testbench programs the running sums and checks CBS and
// the derived largest level for every run, including run 31 (end register).
module tb_cbs_lut;
  import vlc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [5:0] waddr = '0;
  logic [8:0] wdata = '0;
  logic [4:0] run = '0;
  logic [7:0] cbs;
  logic [8:0] max_level;
  int checks = 0, failures = 0;

  cbs_lut dut (.*);

  function automatic int maxl(int r);
    int t[8] = '{40, 18, 5, 4, 3, 3, 3, 2};
    if (r < 8) return t[r];
    if (r <= 16) return 2;
    return 1;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    s = 0;
    for (int r = 0; r <= 32; r++) begin
      @(negedge clk); we = 1; waddr = 6'(r); wdata = 9'(s);
      if (r < 32) s += maxl(r);
    end
    @(negedge clk); we = 0;
    s = 0;
    for (int r = 0; r < 32; r++) begin
      run = 5'(r); #1;
      checks++; if (cbs != 8'(s) || max_level != 9'(maxl(r))) begin
        failures++; $display("FAIL run %0d: cbs %0d max %0d", r, cbs, max_level);
      end
      s += maxl(r);
    end
    run = 4; #1; checks++; if (cbs != 67) failures++;
    run = 5; #1; checks++; if (cbs != 70) failures++;
    run = 31; #1; checks++; if (cbs != 110) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
