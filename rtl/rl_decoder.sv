// Run-length decoder for cyclical-scan-chain decompression.
//
// Loaded with one K-bit codeword, the decoder emits the run of difference-
// vector bits that the codeword stands for, one bit per enabled clock cycle,
// first bit first. Each emitted bit shifts the cyclical scan chain (and the
// test scan chain behind it) by one position.
//
// Two decode engines, chosen by the CODE parameter:
//   * CODE_COUNT3 / CODE_COUNT2: a K-bit down counter, as the published scheme
//     describes it. The counter is loaded with the codeword and counts down,
//     emitting a 0 per step; on reaching zero it emits a 1, unless the
//     codeword was all ones, in which case the run ends without the 1.
//   * CODE_MOD3 (default): the modified 3-bit code is decoded by a small FSM
//     made of a 6-bit left-aligned pattern register and a 3-bit remaining-bit
//     count, both loaded from a table (csd_pkg::mod3_pattern / mod3_len).
//     Every codeword takes 2..6 cycles, never more than 6.
// In literal mode (this design's own reading of "shift the remaining vectors
// in normally") the K loaded bits are emitted unencoded, MSB first, in K cycles.
//
// Interface and timing:
//   en       clock enable for the whole decoder; while low nothing moves and
//            bit_valid is low (used as the global stall during CUT capture).
//   load     with en high, takes `code` (and `literal`) at the clock edge; the
//            first decoded bit is presented in the next cycle.
//   ready    high when a load in this cycle cuts no run short: the decoder is
//            idle or presents the last bit of its run. A load in the same
//            cycle as the last bit therefore costs no idle cycle.
//   overrun  sticky flag, set by a load while ready is low (the older run is
//            then abandoned). Cleared only by reset.
// Reset is asynchronous, active low, and leaves the decoder idle.
module rl_decoder
  import csd_pkg::*;
#(
  parameter rl_code_e    CODE = CODE_MOD3,
  parameter int unsigned K    = code_bits(CODE)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic         literal,
  input  logic [K-1:0] code,
  output logic         bit_valid,
  output logic         bit_out,
  output logic         ready,
  output logic         overrun
);

  localparam int unsigned PW = (K > MOD3_PW) ? K : MOD3_PW;  // pattern register width
  localparam int unsigned CW = $clog2(PW + 1);               // remaining-count width

  // Pattern engine: used by the modified code and by literal mode.
  logic [PW-1:0] pat_q;
  logic [CW-1:0] left_q;
  // Counter engine: used by the counting codes when not literal.
  logic [K-1:0]  cnt_q;
  logic          one_q;      // a terminating 1 is still due
  logic          cbusy_q;    // counter engine active

  logic pat_busy, pat_last, cnt_last;
  logic take;

  assign pat_busy = (left_q != '0);
  assign pat_last = (left_q == CW'(1));
  // The counter engine presents its last bit when the count is zero
  // (the terminating 1), or at count one of an all-ones codeword.
  assign cnt_last = cbusy_q && ((cnt_q == '0) || (cnt_q == K'(1) && !one_q));

  assign bit_valid = en && (pat_busy || cbusy_q);
  assign bit_out   = pat_busy ? pat_q[PW-1] : (cnt_q == '0);
  assign ready     = (!pat_busy && !cbusy_q) || pat_last || cnt_last;
  assign take      = en && load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_q   <= '0;
      left_q  <= '0;
      cnt_q   <= '0;
      one_q   <= 1'b0;
      cbusy_q <= 1'b0;
      overrun <= 1'b0;
    end else if (en) begin
      // Advance whichever engine is running.
      if (pat_busy) begin
        pat_q  <= pat_q << 1;
        left_q <= left_q - CW'(1);
      end
      if (cbusy_q) begin
        if (cnt_q != '0) cnt_q <= cnt_q - K'(1);
        if (cnt_last) cbusy_q <= 1'b0;
      end
      // A load replaces whatever is running.
      if (take) begin
        if (!ready) overrun <= 1'b1;
        cbusy_q <= 1'b0;
        if (literal) begin
          pat_q  <= PW'(code) << (PW - K);
          left_q <= CW'(K);
        end else if (CODE == CODE_MOD3) begin
          pat_q  <= PW'(mod3_pattern(3'(code))) << (PW - MOD3_PW);
          left_q <= CW'(mod3_len(3'(code)));
        end else begin
          left_q  <= '0;
          cnt_q   <= code;
          one_q   <= (code != '1);
          cbusy_q <= 1'b1;
        end
      end
    end
  end

  // The modified code is defined for 3-bit codewords only.
  initial begin
    assert (CODE != CODE_MOD3 || K == 3)
      else $error("rl_decoder: CODE_MOD3 needs K == 3");
  end

endmodule
