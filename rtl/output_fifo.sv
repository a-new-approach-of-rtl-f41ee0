// output_fifo -- 64-bit bit stream output buffer: 32-bit words in, 16-bit words out.
//
// Four 16-bit entries in a circular buffer.  The Enc_bitstream concatenator
// pushes a full 32-bit word (upper half sent first).  full is the
// output_FIFO_full flag: fewer than 32 bits of room, which stalls the encoder
// pipeline.  The receiver sees out_valid/out_data and takes a word on a clock
// edge where received is high.  The 64-bit size and the 32-bit/16-bit
// alignment follow the original; the handshake is this design's reading of
// its port names (out-valid, received).
module output_fifo import vlc_pkg::*; #(
  parameter int unsigned DEPTH_BITS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [WORD_W-1:0] in_data,
  output logic              full,
  output logic [IO_W-1:0]   out_data,
  output logic              out_valid,
  input  logic              received
);
  localparam int unsigned N  = DEPTH_BITS / IO_W;
  localparam int unsigned AW = $clog2(N);

  logic [IO_W-1:0] mem [N];
  logic [AW-1:0]   rd, wr;
  logic [AW:0]     count;
  logic            pop;

  assign full      = (count > (AW+1)'(N - 2));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd];
  assign pop       = received && out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
      for (int i = 0; i < int'(N); i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr]        <= in_data[WORD_W-1 -: IO_W];
        mem[wr + 1'b1] <= in_data[IO_W-1:0];
        wr             <= wr + AW'(2);
      end
      if (pop) rd <= rd + 1'b1;
      count <= count + (push ? (AW+1)'(2) : '0) - (pop ? (AW+1)'(1) : '0);
    end
  end

  // the concatenator only pushes when there is room
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
