// tb_input_fifo -- checks the 16-bit-in / 32-bit-out input FIFO against a queue model.
//
// Random in_valid and pop over 4000 cycles: request must mean "fewer than four
// words", has32 "at least two words", and the 32-bit output must be the two
// oldest words, oldest in the upper half.
module tb_input_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] in_data = '0;
  logic in_valid = 0, pop = 0, request, has32;
  logic [31:0] out_data;
  logic [15:0] q[$];
  int checks = 0, failures = 0;
  int pushes = 0, pops = 0;

  input_fifo dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 1)); in_data = 16'($urandom);
      pop = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (request != (q.size() < 4) || has32 != (q.size() >= 2) ||
          (has32 && out_data != {q[0], q[1]})) begin
        failures++;
        if (failures < 10) $display("FAIL: size %0d request %0b has32 %0b data %h", q.size(), request, has32, out_data);
      end
      @(posedge clk);
      if (pop && q.size() >= 2) begin void'(q.pop_front()); void'(q.pop_front()); pops++; end
      if (in_valid && request) begin q.push_back(in_data); pushes++; end
    end
    checks++; if (pushes < 100 || pops < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
