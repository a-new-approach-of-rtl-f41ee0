// symbol_recoverer -- decoder pipeline stage 1 (last in decode order): symbol to run/level.
//
// For an ordinary codeword the 12-bit symbol from the symbol memory holds
// {run[5:0], |level|[5:0]} and the sign bit that followed the codeword gives
// the level's sign (1 = negative).  For the escape codeword the run and the
// signed 12-bit level come straight from the 18 escRL bits {run, level}.  For
// EOB, dec_finish is raised and run/level are zero.  The original names this
// block's job; the symbol layout and the sign convention are this design's
// choices (they mirror the symbol converter).
//
// Timing: registered outputs, loaded when en is high.
module symbol_recoverer import vlc_pkg::*; (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      in_valid,
  input  logic [SYM_W-1:0]          symbol,
  input  logic                      esc,
  input  logic                      eob,
  input  logic [ESCRL_W-1:0]        escrl_sign,
  output logic                      out_valid,
  output logic [RUN_W-1:0]          run,
  output logic signed [LEVEL_W-1:0] level,
  output logic                      finish
);
  logic [RUN_W-1:0]   r;
  logic [LEVEL_W-1:0] l, mag;

  always_comb begin
    mag = {{(LEVEL_W-SLVL_W){1'b0}}, symbol[SLVL_W-1:0]};
    if (esc) begin
      r = escrl_sign[ESCRL_W-1 -: RUN_W];
      l = escrl_sign[LEVEL_W-1:0];
    end else if (eob) begin
      r = '0;
      l = '0;
    end else begin
      r = symbol[SYM_W-1 -: RUN_W];
      l = escrl_sign[ESCRL_W-1] ? -mag : mag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      run       <= '0;
      level     <= '0;
      finish    <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      run       <= r;
      level     <= l;
      finish    <= in_valid && eob && !esc;
    end
  end

endmodule
