// dct_latch2: LATCH 2 of the serial 1-D DCT, the output coefficient bank.
//
// Eight words, one per DCT output Y(0)..Y(7). When we is high the finished
// sum d is written to the word named by ADDRESS (addr = k); all words are
// visible at once to MUX 2. Reading ADDRESS as the write address of a bank is
// this design's choice; reset clears the bank.
//
// Timing: q[addr] shows d one cycle after a clock with we high.
module dct_latch2
  import dct_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  idx_t         addr,
  input  acc_t         d,
  output acc_t [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q[addr] <= d;
  end

endmodule
