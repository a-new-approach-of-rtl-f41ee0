// tb_dec_en_ctrl -- checks the decoder pipeline control against a model.
//
// Random dec_receive, sel_ready, need_shift and fifo_has32: a codeword may be
// decoded only when the receiver is taking data, the buffers are filled, and
// a due refill can be served; the valid bits must move only while
// dec_receive is high.
module tb_dec_en_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dec_receive = 0, sel_ready = 0, need_shift = 0, fifo_has32 = 0;
  logic adv, fire3, starved, v3, v2;
  bit m3 = 0, m2 = 0, ef;
  int checks = 0, failures = 0, n_starved = 0;

  dec_en_ctrl dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      dec_receive = ($urandom_range(0, 3) != 0); sel_ready = ($urandom_range(0, 7) != 0);
      need_shift = 1'($urandom_range(0, 1)); fifo_has32 = 1'($urandom_range(0, 1));
      #1;
      ef = dec_receive && sel_ready && (!need_shift || fifo_has32);
      checks++;
      if (adv != dec_receive || fire3 != ef || v3 != m3 || v2 != m2 ||
          starved != (!sel_ready || (need_shift && !fifo_has32))) begin
        failures++; if (failures < 10) $display("FAIL cycle %0d", i);
      end
      if (starved) n_starved++;
      @(posedge clk);
      if (dec_receive) begin m2 = m3; m3 = ef; end
    end
    checks++; if (n_starved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
