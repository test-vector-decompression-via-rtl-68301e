// One cyclical-scan-chain decompressor lane.
//
//   code --> rl_decoder --bit--> (+) --> cyclical_scan_chain --sout--+--> test_scan_chain (CUT)
//                                 ^______________________________|
//
// The run-length decoder turns each loaded codeword into a run of difference-
// vector bits. Every decoded bit shifts the cyclical chain (whose output is
// XORed back into its input) and, in the same cycle, shifts the cyclical
// chain's output bit into the CUT's test scan chain. The scan counter counts
// those shifts and, when the test chain holds a whole vector, raises
// `capture` for one cycle: the CUT's system clock. The cyclical chain has no
// capture path and keeps its contents.
//
// Sequence for n vectors t1..tn of length len, chains cleared first: shift
// t1, then t1^t2, ..., t(n-1)^tn, then len zero bits. After the (k+1)-th
// block of len bits the test chain holds tk and is captured; the first full
// test chain (all zeros) is not captured when skip_first is high. The final
// len zeros move tn into the test chain while leaving the cyclical chain
// unchanged.
//
// `self_cyclic` selects the arrangement in which a boundary scan drives the
// CUT's inputs and acts as its own cyclical chain: the vector to apply is
// then `cyc_vec`, ready after every len bits including the first, so the
// first capture is not skipped.
//
// Timing: `en` low freezes the decoder, and with it every shift of the lane
// (the global stall). The owner must hold `en` low in the cycle where this
// lane, or any lane sharing its tester channel, raises `capture`.
// The datapath is the published one; the lane packaging, the runtime
// length and the self_cyclic switch are this design's.
module csd_lane
  import csd_pkg::*;
#(
  parameter rl_code_e    CODE = CODE_MOD3,
  parameter int unsigned K    = code_bits(CODE),
  parameter int unsigned N    = 1664,
  parameter int unsigned LW   = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clear,
  input  logic          load,
  input  logic          literal,
  input  logic [K-1:0]  code,
  input  logic [LW-1:0] len,
  input  logic          self_cyclic,
  input  logic [N-1:0]  cut_resp,
  output logic [N-1:0]  cut_vec,
  output logic [N-1:0]  cyc_vec,
  output logic          capture,
  output logic          vec_done,
  output logic          scan_out,
  output logic          dec_ready,
  output logic          overrun
);

  logic dbit, dvalid;
  logic cyc_out;
  logic [LW-1:0] count_unused;

  rl_decoder #(.CODE(CODE), .K(K)) u_dec (
    .clk, .rst_n, .en,
    .load, .literal, .code,
    .bit_valid (dvalid),
    .bit_out   (dbit),
    .ready     (dec_ready),
    .overrun
  );

  cyclical_scan_chain #(.N(N), .LW(LW)) u_cyc (
    .clk, .rst_n, .clear,
    .shift (dvalid),
    .din   (dbit),
    .len,
    .sout  (cyc_out),
    .q     (cyc_vec)
  );

  scan_counter #(.N(N), .LW(LW)) u_cnt (
    .clk, .rst_n, .clear,
    .shift      (dvalid),
    .skip_first (!self_cyclic),
    .len,
    .capture,
    .vec_done,
    .count      (count_unused)
  );

  test_scan_chain #(.N(N), .LW(LW)) u_tsc (
    .clk, .rst_n,
    .shift   (dvalid),
    .si      (cyc_out),
    .capture,
    .resp    (cut_resp),
    .len,
    .so      (scan_out),
    .q       (cut_vec)
  );

endmodule
