// Driver for a small csd_top built with a given code and lane count.
//
// The tester model sends NDEC*K bits per group and loads every NDEC*K
// cycles, holding while tstall is high. With the 2-bit code (at most 3
// decode cycles per codeword, a load every 4 cycles) every vector must arrive
// intact and no overrun may occur. With the 3-bit counting code a codeword
// can need 7 cycles while loads come every 6, so the test set is built to
// contain long runs and the overrun flag must be raised (EXPECT_OVERRUN).
// With the modified code and three lanes, loads come every 9 cycles.
module tb_csd_top_code_run
  import csd_pkg::*;
  import tb_csd_pkg::*;
#(
  parameter rl_code_e    CODE = CODE_COUNT2,
  parameter int unsigned NDEC = 2,
  parameter bit          EXPECT_OVERRUN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = 64, LW = $clog2(N + 1);
  localparam int unsigned K = code_bits(CODE);
  localparam int unsigned G = NDEC * K;

  logic                    clear, tdi, tshift, tload, tstall;
  logic [NDEC-1:0]         literal, self_cyclic;
  logic [NDEC-1:0][LW-1:0] vec_len;
  logic [NDEC-1:0][N-1:0]  cut_resp, cut_vec, cyc_vec;
  logic [NDEC-1:0]         cut_capture, vec_done, scan_out, overrun;

  csd_top #(.CODE(CODE), .NDEC(NDEC), .N(N)) dut (.*);

  logic unused_ok;
  assign unused_ok = ^{cyc_vec, vec_done, scan_out};

  typedef logic [N-1:0] vec_t;

  initial begin
    vec_t  tv[NDEC][$];
    cwq_t  cws[NDEC];
    int    L[NDEC];
    int    k[NDEC];
    bit    sendq[$];
    int    ngroups, sent = 0;
    done = 0; checks = 0; failures = 0;
    clear = 0; tdi = 0; tshift = 0; tload = 0;
    literal = '0; self_cyclic = '0; cut_resp = '0;
    for (int i = 0; i < NDEC; i++) begin
      automatic bitq_t s;
      automatic vec_t prev = '0;
      L[i] = (i == 1) ? 45 : N - 5 * i;
      vec_len[i] = LW'(L[i]);
      k[i] = 0;
      for (int v = 0; v < 30; v++) begin
        automatic vec_t t = prev;
        if (v % 9 == 0) for (int b = 0; b < L[i]; b++) t[b] = 1'($urandom_range(1));
        else repeat ($urandom_range(5)) t[$urandom_range(L[i] - 1)] ^= 1'b1;
        tv[i].push_back(t);
        for (int j = 0; j < L[i]; j++) s.push_back(t[L[i]-1-j] ^ prev[L[i]-1-j]);
        prev = t;
      end
      for (int j = 0; j < L[i]; j++) s.push_back(1'b0);
      cws[i] = (CODE == CODE_MOD3) ? encode_mod3(s) : encode_count(s, K);
    end
    ngroups = (cws[0].size() > cws[1].size()) ? cws[0].size() : cws[1].size();
    for (int g = 0; g < ngroups; g++)
      for (int i = NDEC - 1; i >= 0; i--) begin
        automatic logic [2:0] cw = (g < cws[i].size()) ? cws[i][g] : 3'((1 << K) - 1);  // zero run
        for (int b = K - 1; b >= 0; b--) sendq.push_back(cw[b]);
      end

    @(posedge rst_n);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    while (sent <= sendq.size() + G * N) begin
      #1;
      for (int i = 0; i < NDEC; i++)
        if (cut_capture[i]) begin
          if (!EXPECT_OVERRUN && k[i] < tv[i].size()) begin
            checks++;
            for (int j = 0; j < L[i]; j++)
              if (cut_vec[i][j] !== tv[i][k[i]][j]) begin
                failures++; $display("%m lane %0d vector %0d wrong", i, k[i]); break;
              end
          end
          k[i]++;
        end
      if (!tstall) begin
        tload  = (sent > 0 && sent % G == 0 && sent <= sendq.size());
        tshift = (sent < sendq.size());
        tdi    = tshift ? sendq[sent] : 1'b0;
        sent++;
      end
      @(negedge clk);
    end
    tshift = 0; tload = 0;
    checks++;
    if ((overrun != '0) != EXPECT_OVERRUN) begin
      failures++; $display("%m: overrun %b, expected %0b", overrun, EXPECT_OVERRUN);
    end
    if (!EXPECT_OVERRUN)
      for (int i = 0; i < NDEC; i++) begin
        checks++;
        if (k[i] < tv[i].size()) begin
          failures++; $display("%m lane %0d: %0d vectors applied", i, k[i]);
        end
      end
    done = 1;
  end
endmodule
