// Test scan chain of a circuit-under-test (mux-D scan).
//
// Stands for the internal scan chain of the core being tested. In shift mode
// the chain moves one position per clock and takes its serial input from the
// cyclical scan chain; when the CUT's system clock is applied (`capture`),
// the vector in the chain is applied to the CUT and the CUT's response is
// loaded back in parallel. The response then leaves through `so` while the
// next vector shifts in.
//
// `q` is the vector applied to the CUT; `resp` the CUT's response. A vector of
// runtime length `len` (1..N) occupies stages len-1 (first shifted bit) down
// to 0; `so` is stage len-1. Capture has priority over shift. The shift and
// capture behaviour is the usual one for scan; the numbering and runtime
// length are this design's choice, matching cyclical_scan_chain.
module test_scan_chain #(
  parameter int unsigned N  = 1664,
  parameter int unsigned LW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          si,
  input  logic          capture,
  input  logic [N-1:0]  resp,
  input  logic [LW-1:0] len,
  output logic          so,
  output logic [N-1:0]  q
);

  logic [N-1:0]  s_q;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;  // stage index width

  logic [IW-1:0] tap;

  assign tap = (len == '0 || len > LW'(N)) ? IW'(N - 1) : IW'(len - LW'(1));
  assign so  = s_q[tap];
  assign q   = s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        s_q <= '0;
    else if (capture)  s_q <= resp;
    else if (shift)    s_q <= {s_q[N-2:0], si};
  end

endmodule
