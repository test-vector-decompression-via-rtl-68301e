// Tester-channel codeword register.
//
// One tester channel serially fills a register of NDEC*K bits; its parallel
// contents are the NDEC codewords that a common load pulse hands to the NDEC
// run-length decoders at once. While the decoders work on one set of
// codewords, the tester shifts in the next set, so with the modified 3-bit
// code (at most 6 decode cycles per codeword) and NDEC = 2 the channel never
// waits for the decoders.
//
// Bit order (this design's choice): a new bit enters stage 0 and moves to
// higher stages, so after NDEC*K shifts the first bit sent sits in stage
// NDEC*K-1. Decoder i takes stages i*K .. i*K+K-1 with the highest stage as
// the codeword's MSB. The tester therefore sends the codeword for decoder
// NDEC-1 first and the one for decoder 0 last, each MSB first.
//
// Timing: `shift` with `en` high takes `si` at the clock edge. `codes` is the
// register contents, so a load issued in the same cycle as a shift sees the
// contents from before that shift. No reset is needed for function; the
// register is cleared by reset so that simulation starts from a known state.
module channel_shift_reg #(
  parameter int unsigned NDEC = 2,
  parameter int unsigned K    = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      shift,
  input  logic                      si,
  output logic [NDEC-1:0][K-1:0]    codes
);

  localparam int unsigned W = NDEC * K;

  logic [W-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sr_q <= '0;
    else if (en && shift)  sr_q <= {sr_q[W-2:0], si};
  end

  assign codes = sr_q;

endmodule
