// symbol_converter -- encoder pipeline stage 1: run/level pair to converted symbol.
//
// The converted symbol is CBS[run] + |level| (8 bits), where CBS comes from the
// programmable CBS-LUT held inside this block.  A pair is escaped when its run
// exceeds 31 or its level magnitude exceeds the run's largest level
// (CBS[run+1] - CBS[run]); an escaped pair is sent as the escape codeword
// followed by the 18-bit escRL field {run[5:0], level[11:0]}.  A non-escaped
// pair is followed by one sign bit (1 = negative level), carried here
// left-justified in the same 18-bit side field.  The escape test and the
// CBS + level sum follow the original; the EOB encoding (a level of zero marks
// EOB, since a real pair never has level 0) and the sign convention are this
// design's choices.
//
// Interface: in_valid/run/level are sampled when en is high; outputs are
// registered (one cycle latency) and hold while en is low.
module symbol_converter import vlc_pkg::*; (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  // CBS-LUT programming
  input  logic                      lut_we,
  input  logic [5:0]                lut_waddr,
  input  logic [CBS_W:0]            lut_wdata,
  // pair in
  input  logic [RUN_W-1:0]          run,
  input  logic signed [LEVEL_W-1:0] level,
  // stage-1 register out
  output logic [CBS_W-1:0]          conv_sym,
  output logic                      esc,
  output logic                      eob,
  output logic [ESCRL_W-1:0]        escrl_sign
);
  logic [CBS_W-1:0]   cbs;
  logic [CBS_W:0]     max_level;
  logic [LEVEL_W-1:0] mag;
  logic               neg, is_eob, is_esc;
  logic [CBS_W-1:0]   sum;

  cbs_lut u_lut (
    .clk, .rst_n,
    .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .run(run[4:0]), .cbs, .max_level
  );

  always_comb begin
    neg    = level[LEVEL_W-1];
    mag    = neg ? LEVEL_W'(-level) : LEVEL_W'(level);
    is_eob = (level == '0);
    // escape: run beyond the LUT, or level above the run's maximum
    is_esc = !is_eob && (run[RUN_W-1] || (mag > LEVEL_W'(max_level)));
    sum    = cbs + {2'b00, mag[5:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_sym   <= '0;
      esc        <= 1'b0;
      eob        <= 1'b0;
      escrl_sign <= '0;
    end else if (en) begin
      conv_sym   <= sum;
      esc        <= is_esc;
      eob        <= is_eob;
      if (is_esc)      escrl_sign <= {run, level};
      else if (is_eob) escrl_sign <= '0;
      else             escrl_sign <= {neg, {(ESCRL_W-1){1'b0}}};
    end
  end

endmodule
