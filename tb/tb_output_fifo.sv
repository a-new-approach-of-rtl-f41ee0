// tb_output_fifo -- checks the 32-bit-in / 16-bit-out output FIFO against a queue model.
//
// Random pushes (only when full is low, as the concatenator does) and random
// received: full must mean "fewer than two free words", out_valid "not
// empty", and words must leave upper half first, in order.
module tb_output_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, full, out_valid, received = 0;
  logic [31:0] in_data = '0;
  logic [15:0] out_data;
  logic [15:0] q[$];
  int checks = 0, failures = 0;
  int pushes = 0, pops = 0, fulls = 0;

  output_fifo dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      received = ($urandom_range(0, 1) == 0);
      in_data = $urandom;
      #1;
      push = !full && $urandom_range(0, 1) != 0;
      #1;
      checks++;
      if (full != (q.size() > 2) || out_valid != (q.size() > 0) || (out_valid && out_data != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL: size %0d full %0b valid %0b data %h", q.size(), full, out_valid, out_data);
      end
      if (full) fulls++;
      @(posedge clk);
      if (received && q.size() > 0) begin void'(q.pop_front()); pops++; end
      if (push) begin q.push_back(in_data[31:16]); q.push_back(in_data[15:0]); pushes++; end
    end
    checks++; if (pushes < 100 || pops < 100 || fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
