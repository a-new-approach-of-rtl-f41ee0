// cbs_lut -- conversion-based-symbol look-up table (32 x 8 bit, programmable).
//
// Entry r holds CBS[r], the sum of the largest non-escaped level of runs
// 0..r-1, so that CBS[run] + |level| numbers every non-escaped run/level pair
// of the table compactly.  The table is read at two places per cycle: CBS[run]
// and CBS[run+1]; their difference is the largest level that run may carry.
// For run 31 there is no CBS[32] in a 32-entry table, so this design keeps one
// extra programmable register, cbs_end (the total number of converted symbols,
// up to 256), and uses it in place of CBS[32].  That register is this design's
// choice; the 32 x 8 table and the max-level subtraction follow the original.
//
// Interface: write port (we, waddr 0..31 for entries, 32 for cbs_end, wdata).
// Reads are combinational (the converter registers the result).  Reset clears
// every entry, so an unprogrammed table escapes every pair.
module cbs_lut import vlc_pkg::*; #(
  parameter int unsigned N = CBS_N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(N):0]       waddr,
  input  logic [CBS_W:0]           wdata,
  input  logic [$clog2(N)-1:0]     run,
  output logic [CBS_W-1:0]         cbs,        // CBS[run]
  output logic [CBS_W:0]           max_level   // CBS[run+1] - CBS[run]
);
  logic [CBS_W-1:0] mem [N];
  logic [CBS_W:0]   cbs_end;
  logic [CBS_W:0]   cbs_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) mem[i] <= '0;
      cbs_end <= '0;
    end else if (we) begin
      if (waddr == N[$clog2(N):0]) cbs_end <= wdata;
      else if (waddr < N[$clog2(N):0]) mem[waddr[$clog2(N)-1:0]] <= wdata[CBS_W-1:0];
    end
  end

  always_comb begin
    cbs = mem[run];
    if (run == $clog2(N)'(N - 1)) cbs_next = cbs_end;
    else                          cbs_next = {1'b0, mem[run + 1'b1]};
    max_level = cbs_next - {1'b0, cbs};
  end

endmodule
