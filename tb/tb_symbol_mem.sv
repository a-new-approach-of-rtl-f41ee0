// tb_symbol_mem -- checks the symbol_mem table: writes, one-clock read latency, read hold.
//
// Fills all 256 locations with random data (kept in a reference array), reads
// them back in random order and checks each word one clock after its address,
// then checks that en low holds the read register and that a rewrite of one
// location is seen on the next read.
module tb_symbol_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, en = 1;
  logic [8-1:0] waddr = '0, raddr = '0;
  logic [12-1:0] wdata = '0, rdata;
  logic [12-1:0] ref_mem [256];
  int checks = 0, failures = 0;

  symbol_mem dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [12-1:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 12'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      raddr = 8'($urandom_range(0, 255));
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++; $display("FAIL addr %0d: %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
    end
    held = rdata;
    en = 0; raddr = raddr + 1'b1;
    @(negedge clk); checks++; if (rdata !== held) begin failures++; $display("FAIL: hold"); end
    en = 1; we = 1; waddr = 8'd77; wdata = ~ref_mem[77]; ref_mem[77] = wdata;
    @(negedge clk); we = 0; raddr = 8'd77;
    @(negedge clk); checks++; if (rdata !== ref_mem[77]) begin failures++; $display("FAIL: rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
