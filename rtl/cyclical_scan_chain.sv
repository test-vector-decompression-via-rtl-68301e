// Cyclical scan chain: the decompressing shift register.
//
// A chain of N scan elements whose serial output is XORed back into its
// serial input. If the chain holds vector t and a difference vector d is
// shifted in (one bit per shift, len shifts), the chain ends up holding
// t XOR d. Starting from all zeros, shifting t1, then t1^t2, t2^t3, ...
// therefore produces t1, t2, t3, ... in turn, and the serial output meanwhile
// replays the previous vector bit by bit into the test scan chain behind it.
//
// The loop may be closed at an intermediate point: runtime input `len`
// (1..N) selects stage len-1 as the serial output and feedback tap, so a
// longer physical chain (a chip or core boundary scan, or core scan plus UDL
// scan elements) forms a cycle exactly as long as the test scan chain it
// feeds. Stages beyond len-1 keep shifting but take no part in the cycle.
//
// The chain only moves on `shift`; it has no capture path, so applying the
// CUT's system clock never overwrites it. `clear` (synchronous) zeroes it at
// the start of a test session. Bit j of a vector (j = 0 the first shifted)
// ends in stage len-1-j. `q` exposes all stages, e.g. to drive a CUT's inputs
// when a boundary scan acts as its own cyclical chain.
//
// Timing: one element moves per enabled clock edge; `sout` is combinational
// from the stage registers. The structure follows the published scheme; the
// clear input, the runtime tap and the stage numbering are this design's.
module cyclical_scan_chain #(
  parameter int unsigned N  = 1664,
  parameter int unsigned LW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift,
  input  logic          din,
  input  logic [LW-1:0] len,
  output logic          sout,
  output logic [N-1:0]  q
);

  logic [N-1:0] c_q;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;  // stage index width

  logic [IW-1:0] tap;

  // A len of 0 or above N is treated as N.
  assign tap  = (len == '0 || len > LW'(N)) ? IW'(N - 1) : IW'(len - LW'(1));
  assign sout = c_q[tap];
  assign q    = c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c_q <= '0;
    else if (clear)  c_q <= '0;
    else if (shift)  c_q <= {c_q[N-2:0], din ^ sout};
  end

endmodule
