// tb_symbol_recoverer -- checks run/level recovery for ordinary, escaped and EOB codewords.
//
// Random symbols {run, |level|} with random sign bits, random 18-bit escRL
// fields and EOB cases are applied; outputs are checked one clock later
// against a model, and en low must hold them.
module tb_symbol_recoverer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, in_valid = 0, esc = 0, eob = 0;
  logic [11:0] symbol = '0;
  logic [17:0] escrl_sign = '0;
  logic out_valid, finish;
  logic [5:0] run;
  logic signed [11:0] level;
  int checks = 0, failures = 0;

  symbol_recoverer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int er, el; bit ef, ev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom_range(0, 9);
      in_valid = $urandom_range(0, 7) != 0;
      symbol = 12'($urandom); escrl_sign = 18'($urandom);
      esc = (k == 0); eob = (k == 1);
      if (esc) begin er = int'(escrl_sign[17:12]); el = int'($signed(escrl_sign[11:0])); ef = 0; end
      else if (eob) begin er = 0; el = 0; ef = in_valid; end
      else begin er = int'(symbol[11:6]); el = escrl_sign[17] ? -int'(symbol[5:0]) : int'(symbol[5:0]); ef = 0; end
      ev = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid != ev || finish != ef || int'(run) != er || int'(level) != el) begin
        failures++;
        if (failures < 10) $display("FAIL: got (%0d,%0d,%0b,%0b) expected (%0d,%0d,%0b,%0b)",
                                    run, level, finish, out_valid, er, el, ef, ev);
      end
    end
    en = 0; symbol = ~symbol; esc = 0; eob = 0;
    @(negedge clk); checks++; if (int'(level) != el || int'(run) != er) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
