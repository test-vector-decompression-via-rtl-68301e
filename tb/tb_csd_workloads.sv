// Workload testbench for csd_top at its default parameters: the circuits of
// the published compression experiments, at their scan sizes and vector
// counts (test-data bits / scan size), two circuits at a time on the two
// lanes of one tester channel.
//
// The real test sets are not available, so each circuit gets a synthetic
// test set with correlated neighbours (each vector differs from the previous
// one in about an eighth of its bits, with an occasional fresh vector).
// For the four large sequential circuits a second run turns compression off
// for the last fifth of the vectors, which are made uncorrelated, as in the
// partial-compression experiment. Every vector applied to a CUT is checked;
// the compressed size of the synthetic data is printed for information only.
module tb_csd_workloads;
  import csd_pkg::*;
  import tb_csd_pkg::*;

  localparam int unsigned NDEC = 2, N = 1664, LW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    clear, tdi, tshift, tload, tstall;
  logic [NDEC-1:0]         literal, self_cyclic;
  logic [NDEC-1:0][LW-1:0] vec_len;
  logic [NDEC-1:0][N-1:0]  cut_resp, cut_vec, cyc_vec;
  logic [NDEC-1:0]         cut_capture, vec_done, scan_out, overrun;

  csd_top dut (.*);

  int checks = 0, failures = 0;

  typedef logic [N-1:0] vec_t;
  typedef vec_t vecq_t[$];

  function automatic vecq_t make_set(int L, int nvec, int nrand_tail);
    vecq_t tv;
    vec_t  prev = '0;
    for (int i = 0; i < nvec; i++) begin
      vec_t v = prev;
      if (i == 0 || i % 23 == 11 || i >= nvec - nrand_tail)
        for (int b = 0; b < L; b++) v[b] = 1'($urandom_range(1));
      else
        repeat (L / 8 + 1) v[$urandom_range(L - 1)] ^= 1'b1;
      tv.push_back(v);
      prev = v;
    end
    return tv;
  endfunction

  // name, scan size, test-data bits
  typedef struct { string name; int scan; int bits; } circ_t;

  task automatic run_pair(circ_t c0, circ_t c1, bit partial);
    circ_t c[NDEC];
    vecq_t tv[NDEC];
    cwq_t  cws[NDEC];
    bitq_t lits[NDEC];
    int    L[NDEC], k[NDEC], nv[NDEC];
    bit    sendq[$];
    bit    litq[$];   // literal flag per group and lane, lane 0 first
    int    ngroups, sent = 0, maxl;
    c = '{c0, c1};
    for (int i = 0; i < NDEC; i++) begin
      bitq_t s;
      vec_t prev = '0;
      int split, ntail;
      L[i]  = c[i].scan;
      nv[i] = c[i].bits / c[i].scan;
      ntail = partial ? nv[i] / 5 : 0;
      tv[i] = make_set(L[i], nv[i], ntail);
      foreach (tv[i][v]) begin
        if (v == nv[i] - ntail) split = s.size();
        for (int j = 0; j < L[i]; j++) s.push_back(tv[i][v][L[i]-1-j] ^ prev[L[i]-1-j]);
        prev = tv[i][v];
      end
      if (ntail == 0) split = s.size();
      for (int j = 0; j < L[i]; j++) s.push_back(1'b0);    // flush
      cws[i] = encode_mixed(s, split, lits[i]);
      k[i] = 0;
      $display("%-7s scan %4d: %3d vectors, %7d bits, encoded %7d bits%s", c[i].name, L[i],
               nv[i], nv[i] * L[i], 3 * cws[i].size(), partial ? " (last fifth uncompressed)" : "");
    end
    ngroups = (cws[0].size() > cws[1].size()) ? cws[0].size() : cws[1].size();
    for (int g = 0; g < ngroups; g++) begin
      for (int i = NDEC - 1; i >= 0; i--) begin
        logic [2:0] cw = (g < cws[i].size()) ? cws[i][g] : 3'b111;
        for (int b = 2; b >= 0; b--) sendq.push_back(cw[b]);
      end
      for (int i = 0; i < NDEC; i++) litq.push_back(g < cws[i].size() ? lits[i][g] : 1'b0);
    end
    maxl = (L[0] > L[1]) ? L[0] : L[1];

    @(negedge clk);
    clear = 1; tshift = 0; tload = 0; self_cyclic = '0; literal = '0;
    for (int i = 0; i < NDEC; i++) vec_len[i] = LW'(L[i]);
    @(negedge clk);
    clear = 0;
    while (sent <= sendq.size() + 6 * maxl) begin
      #1;
      for (int i = 0; i < NDEC; i++) begin
        if (cut_capture[i]) begin
          if (k[i] < nv[i]) begin
            checks++;
            for (int j = 0; j < L[i]; j++)
              if (cut_vec[i][j] !== tv[i][k[i]][j]) begin
                failures++;
                $display("%s vector %0d wrong", c[i].name, k[i]);
                break;
              end
          end
          k[i]++;
        end
      end
      if (!tstall) begin
        tload  = (sent > 0 && sent % 6 == 0 && sent <= sendq.size());
        if (tload) begin
          int g = sent / 6 - 1;
          literal = {litq[2 * g + 1], litq[2 * g]};
        end
        tshift = (sent < sendq.size());
        tdi    = tshift ? sendq[sent] : 1'b0;
        sent++;
      end
      @(negedge clk);
    end
    tshift = 0; tload = 0;
    for (int i = 0; i < NDEC; i++) begin
      checks++;
      if (k[i] < nv[i]) begin
        failures++; $display("%s: %0d of %0d vectors applied", c[i].name, k[i], nv[i]);
      end
    end
    checks++;
    if (overrun != '0) begin failures++; $display("decoder overrun"); end
  endtask

  initial begin
    automatic circ_t t1[14] = '{
      '{"c432", 36, 2124}, '{"c499", 41, 2378}, '{"c880", 60, 4800},
      '{"c1355", 41, 4223}, '{"c1908", 33, 4290}, '{"c2670", 233, 30989},
      '{"c3540", 50, 9900}, '{"c5315", 178, 38092}, '{"c6288", 32, 1152},
      '{"c7552", 207, 56097}, '{"s9234", 247, 118313}, '{"s13207", 700, 372400},
      '{"s15850", 611, 310388}, '{"s38417", 1664, 1995136}};
    clear = 0; tdi = 0; tshift = 0; tload = 0;
    literal = '0; self_cyclic = '0; vec_len = '0; cut_resp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 14; i += 2) run_pair(t1[i], t1[i + 1], 0);
    run_pair(t1[10], t1[11], 1);
    run_pair(t1[12], t1[13], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
