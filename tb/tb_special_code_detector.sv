// tb_special_code_detector -- checks escape/EOB recognition by symbol address.
//
// Programs escape = 12 and EOB = 11, sweeps all 256 addresses, then
// reprograms to other values and sweeps again.
module tb_special_code_detector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, waddr = 0;
  logic [7:0] wdata = '0, dec_symaddr = '0, esc_symaddr, eob_symaddr;
  logic dec_esc, dec_eob;
  int checks = 0, failures = 0;

  special_code_detector dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic setup_and_sweep(int e, int b);
    @(negedge clk); we = 1; waddr = 0; wdata = 8'(e);
    @(negedge clk); waddr = 1; wdata = 8'(b);
    @(negedge clk); we = 0;
    checks++; if (esc_symaddr != 8'(e) || eob_symaddr != 8'(b)) failures++;
    for (int a = 0; a < 256; a++) begin
      dec_symaddr = 8'(a); #1;
      checks++;
      if (dec_esc != (a == e) || dec_eob != (a == b)) begin
        failures++; $display("FAIL addr %0d esc %0b eob %0b", a, dec_esc, dec_eob);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    setup_and_sweep(12, 11);
    setup_and_sweep(200, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
