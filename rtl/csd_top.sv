// Cyclical-scan-chain test vector decompressor fed by a single tester channel.
//
// One tester channel loads NDEC run-length decoders (two by default), each
// driving its own cyclical scan chain and, through it, the test scan chain of
// a circuit-under-test. The tester shifts NDEC*K encoded bits into the
// channel register, one per cycle, and pulses `tload` to hand one codeword to
// every decoder at once. With the modified 3-bit code every codeword decodes
// in at most 6 cycles, so while the tester shifts the next 6 bits the
// decoders are guaranteed to finish: one channel fills two scan chains with
// compressed vectors in about the time one uncompressed chain would take.
//
// Tester interface (all sampled at the rising clock edge):
//   tdi, tshift  encoded bit and its strobe.
//   tload        hand the channel register's current contents (before any
//                shift in the same cycle) to the decoders.
//   tstall       output; while high the chip ignores tshift and tload, and
//                the tester must hold its bit and load pulse one more cycle.
//                It is high in each cycle where some lane applies the CUT's
//                system clock (cut_capture), and all lanes freeze then.
//   clear        start of a test session: zero cyclical chains and counters.
//   literal[i]   decoder i emits its codewords unencoded (compression off).
//   self_cyclic[i]  lane i's cyclical chain drives the CUT directly.
//   vec_len[i]   length of lane i's test vectors; the cyclical chain is
//                looped back after vec_len[i] stages.
// CUT side, per lane: cut_vec (vector applied), cut_resp (response),
// cut_capture (one-cycle system clock enable), cyc_vec (cyclical chain
// contents), scan_out (test response serial out), overrun (sticky: a load
// arrived before a decoder had finished, i.e. the tester schedule was broken).
//
// The channel/decoder/cyclical-chain structure follows the published scheme;
// the stall handshake, the bit order in the channel register and the CUT
// ports are this design's choices.
module csd_top
  import csd_pkg::*;
#(
  parameter rl_code_e    CODE = CODE_MOD3,
  parameter int unsigned NDEC = 2,
  parameter int unsigned N    = 1664,
  parameter int unsigned K    = code_bits(CODE),
  parameter int unsigned LW   = $clog2(N + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      tdi,
  input  logic                      tshift,
  input  logic                      tload,
  output logic                      tstall,
  input  logic [NDEC-1:0]           literal,
  input  logic [NDEC-1:0]           self_cyclic,
  input  logic [NDEC-1:0][LW-1:0]   vec_len,
  input  logic [NDEC-1:0][N-1:0]    cut_resp,
  output logic [NDEC-1:0][N-1:0]    cut_vec,
  output logic [NDEC-1:0][N-1:0]    cyc_vec,
  output logic [NDEC-1:0]           cut_capture,
  output logic [NDEC-1:0]           vec_done,
  output logic [NDEC-1:0]           scan_out,
  output logic [NDEC-1:0]           overrun
);

  logic                   en;
  logic [NDEC-1:0][K-1:0] codes;
  logic [NDEC-1:0]        dec_ready_unused;

  assign tstall = |cut_capture;
  assign en     = !tstall;

  channel_shift_reg #(.NDEC(NDEC), .K(K)) u_chan (
    .clk, .rst_n, .en,
    .shift (tshift),
    .si    (tdi),
    .codes
  );

  for (genvar i = 0; i < NDEC; i++) begin : g_lane
    csd_lane #(.CODE(CODE), .K(K), .N(N), .LW(LW)) u_lane (
      .clk, .rst_n, .en, .clear,
      .load        (tload),
      .literal     (literal[i]),
      .code        (codes[i]),
      .len         (vec_len[i]),
      .self_cyclic (self_cyclic[i]),
      .cut_resp    (cut_resp[i]),
      .cut_vec     (cut_vec[i]),
      .cyc_vec     (cyc_vec[i]),
      .capture     (cut_capture[i]),
      .vec_done    (vec_done[i]),
      .scan_out    (scan_out[i]),
      .dec_ready   (dec_ready_unused[i]),
      .overrun     (overrun[i])
    );
  end

endmodule
