// input_fifo -- 64-bit bit stream input buffer: 16-bit words in, 32-bit words out.
//
// Four 16-bit entries in a circular buffer.  A word is accepted on a clock
// edge where request (room for one more word) and in_valid are both high.
// The Dec_bitstream selector takes two words at once (the first-arrived word
// in the upper half) when it pops; has32 says two words are present, and its
// inverse is the input_FIFO_empty flag that stalls the decoder.  The 64-bit
// size and the 16-bit/32-bit alignment follow the original; the
// request/in_valid handshake is this design's reading of its port names.
module input_fifo import vlc_pkg::*; #(
  parameter int unsigned DEPTH_BITS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IO_W-1:0]   in_data,
  input  logic              in_valid,
  output logic              request,
  input  logic              pop,
  output logic [WORD_W-1:0] out_data,
  output logic              has32
);
  localparam int unsigned N  = DEPTH_BITS / IO_W;
  localparam int unsigned AW = $clog2(N);

  logic [IO_W-1:0] mem [N];
  logic [AW-1:0]   rd, wr;
  logic [AW:0]     count;
  logic            push, pop_ok;

  assign request  = (count < (AW+1)'(N));
  assign has32    = (count >= (AW+1)'(2));
  assign push     = in_valid && request;
  assign pop_ok   = pop && has32;
  assign out_data = {mem[rd], mem[rd + 1'b1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
      for (int i = 0; i < int'(N); i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr] <= in_data;
        wr      <= wr + 1'b1;
      end
      if (pop_ok) rd <= rd + AW'(2);
      count <= count + (push ? (AW+1)'(1) : '0) - (pop_ok ? (AW+1)'(2) : '0);
    end
  end

endmodule
