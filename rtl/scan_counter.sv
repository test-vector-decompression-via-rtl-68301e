// Scan counter: counts the bits shifted into the test scan chain and requests
// the CUT's system clock each time the chain is full.
//
// Each `shift` advances a count modulo `len`; the shift that completes a
// vector raises `capture` for exactly the next clock cycle. The owner stalls
// all shifting during that cycle, so the CUT sees a stable vector while its
// system clock is applied.
//
// With `skip_first` high, the first full chain after `clear` does not raise
// `capture`. That first chain holds the all-zero initial contents of the
// cyclical chain, not a test vector, because the test scan chain sits one
// vector behind the cyclical chain. With a boundary scan acting as its own
// cyclical chain (no separate test scan chain) `skip_first` is held low.
//
// `vec_done` pulses with `capture` and also for the skipped first vector.
// Counting and triggering follow the published scheme; the skip rule, the
// one-cycle capture slot and the runtime length are this design's choices.
module scan_counter #(
  parameter int unsigned N  = 1664,
  parameter int unsigned LW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift,
  input  logic          skip_first,
  input  logic [LW-1:0] len,
  output logic          capture,
  output logic          vec_done,
  output logic [LW-1:0] count
);

  logic [LW-1:0] cnt_q;
  logic          first_q;
  logic          full;
  logic [LW-1:0] last;

  assign last  = (len == '0 || len > LW'(N)) ? LW'(N - 1) : len - LW'(1);
  assign full  = shift && (cnt_q == last);
  assign count = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      first_q  <= 1'b1;
      capture  <= 1'b0;
      vec_done <= 1'b0;
    end else if (clear) begin
      cnt_q    <= '0;
      first_q  <= 1'b1;
      capture  <= 1'b0;
      vec_done <= 1'b0;
    end else begin
      capture  <= 1'b0;
      vec_done <= 1'b0;
      if (shift) cnt_q <= full ? '0 : cnt_q + LW'(1);
      if (full) begin
        first_q  <= 1'b0;
        vec_done <= 1'b1;
        capture  <= !(skip_first && first_q);
      end
    end
  end

  // The chain must stand still while the system clock is applied.
  a_no_shift_in_capture: assert property (@(posedge clk) capture |-> !shift)
    else $error("scan_counter: shift during capture cycle");

endmodule
