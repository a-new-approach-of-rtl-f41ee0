// symbol_mem -- symbol memory (256 x 12 bit), programmable on-chip table.
//
// Maps a symbol address to a decoded symbol {run[5:0], |level|[5:0]}.  It is
// the decoder pipeline stage 2: the read is synchronous, so
// the data of the address presented while en is high appears one clock later
// and is held while en is low.  A separate write port loads the table before
// (or between) coding runs; the loading interface is this design's choice.
// Written as a plain array so that synthesis can map it to a RAM macro.
// The array has no reset (it must be loaded before use); the read register
// resets to zero.
module symbol_mem import vlc_pkg::*; #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (en) rdata <= mem[raddr];
  end

endmodule
