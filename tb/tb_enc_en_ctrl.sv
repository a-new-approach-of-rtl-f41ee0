// tb_enc_en_ctrl -- checks the encoder pipeline control against a model.
//
// Random enc_valid and out_full: enc_ready/adv must be !out_full, the valid
// bits must shift one stage per advancing clock and hold otherwise, and fire3
// must equal adv && v2.  A run without stalls checks the three-clock latency
// from an accepted pair to fire3.
module tb_enc_en_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enc_valid = 0, out_full = 0, enc_ready, adv, v1, v2, fire3;
  bit m1 = 0, m2 = 0;
  int checks = 0, failures = 0;

  enc_en_ctrl dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t_acc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      enc_valid = 1'($urandom_range(0, 1)); out_full = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (enc_ready != !out_full || adv != !out_full || v1 != m1 || v2 != m2 || fire3 != (!out_full && m2)) begin
        failures++; if (failures < 10) $display("FAIL cycle %0d", i);
      end
      @(posedge clk);
      if (!out_full) begin m2 = m1; m1 = enc_valid; end
    end
    // latency: pair accepted at edge k reaches fire3 in the cycle after edge k+2
    @(negedge clk); out_full = 0; enc_valid = 0;
    repeat (3) @(negedge clk);
    enc_valid = 1; t_acc = 0;
    @(negedge clk); enc_valid = 0;
    while (!fire3 && t_acc < 10) begin @(negedge clk); t_acc++; end
    checks++; if (t_acc != 1) begin failures++; $display("FAIL latency %0d", t_acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
