// End-to-end testbench for csd_top at its default parameters (two lanes,
// modified 3-bit code, 1664-stage chains).
//
// A tester model holds, per lane, the encoded difference-vector stream of a
// correlated random test set. It shifts six encoded bits per group into the
// single channel (codeword for lane 1 first, each MSB first) and pulses tload
// together with the first bit of the next group, holding everything while
// tstall is high. At every CUT capture the applied vector is compared with
// the test set. Sessions cover: equal lanes whose captures coincide, a lane
// in literal mode next to a lane looped back inside the 1664-stage chain,
// and a boundary scan acting as its own cyclical chain.
//
// Checked besides the vectors: no decoder overrun (every codeword decodes in
// at most six cycles), the cycle count (each lane's last vector is applied
// within one six-cycle group of its last codeword, stalls not counted), and that each mechanism happened at least once.
module tb_csd_top;
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
  // mechanism counters
  int m_load = 0, m_stall = 0, m_both = 0, m_skip = 0, m_lit = 0, m_self = 0;
  int m_loop = 0, m_run6 = 0, m_cap = 0;
  int m_cw[8];

  typedef logic [N-1:0] vec_t;
  typedef vec_t vecq_t[$];

  function automatic vecq_t make_set(int L, int nvec);
    vecq_t tv;
    vec_t  prev = '0;
    for (int i = 0; i < nvec; i++) begin
      vec_t v = prev;
      if (i == 0 || i % 5 == 2)
        for (int b = 0; b < L; b++) v[b] = 1'($urandom_range(1));
      repeat ($urandom_range(12)) v[$urandom_range(L - 1)] ^= 1'b1;
      tv.push_back(v);
      prev = v;
    end
    return tv;
  endfunction

  function automatic bitq_t make_stream(vecq_t tv, int L, bit selfc);
    bitq_t s;
    vec_t prev = '0;
    foreach (tv[i]) begin
      for (int j = 0; j < L; j++) s.push_back(tv[i][L-1-j] ^ prev[L-1-j]);
      prev = tv[i];
    end
    if (!selfc) for (int j = 0; j < L; j++) s.push_back(1'b0);
    return s;
  endfunction

  task automatic run_session(int L0, int L1, int n0, int n1, bit lit0, bit lit1,
                             bit self0, bit self1, bit same);
    vecq_t tv[NDEC];
    cwq_t  cws[NDEC];
    int    L[NDEC], ncap[NDEC], k[NDEC];
    bit    lit[NDEC], selfc[NDEC];
    bit    sendq[$];
    int    ngroups, sent = 0, ncyc = 0, nstall = 0;
    L = '{L0, L1}; lit = '{lit0, lit1}; selfc = '{self0, self1};
    for (int i = 0; i < NDEC; i++) begin
      tv[i]  = (same && i > 0) ? tv[0] : make_set(L[i], i == 0 ? n0 : n1);
      cws[i] = lit[i] ? pack_literal(make_stream(tv[i], L[i], selfc[i]))
                      : encode_mod3(make_stream(tv[i], L[i], selfc[i]));
      ncap[i] = 0; k[i] = 0;
      if (L[i] < N) m_loop++;
    end
    ngroups = (cws[0].size() > cws[1].size()) ? cws[0].size() : cws[1].size();
    for (int g = 0; g < ngroups; g++) begin
      for (int i = NDEC - 1; i >= 0; i--) begin
        // a lane that has run out gets zero runs
        logic [2:0] cw = (g < cws[i].size()) ? cws[i][g] : (lit[i] ? 3'b000 : 3'b111);
        if (!lit[i]) begin
          m_cw[cw]++;
          if (mod3_run(cw) == 6) m_run6++;
        end else m_lit++;
        for (int b = 2; b >= 0; b--) sendq.push_back(cw[b]);
      end
    end

    @(negedge clk);
    clear = 1; tshift = 0; tload = 0;
    for (int i = 0; i < NDEC; i++) begin
      vec_len[i] = LW'(L[i]); literal[i] = lit[i]; self_cyclic[i] = selfc[i];
    end
    @(negedge clk);
    clear = 0;
    // Tester: one bit per cycle, load after every six, hold while stalled.
    // Runs on until a few vector lengths after the last load so that the
    // last vectors reach the CUT.
    while (sent <= sendq.size() + 6 * (L0 > L1 ? L0 : L1)) begin
      #1;
      if (tstall) begin
        nstall++;
        m_stall++;
        if (&cut_capture) m_both++;
      end
      for (int i = 0; i < NDEC; i++) begin
        if (vec_done[i] && !cut_capture[i]) m_skip++;
        if (cut_capture[i]) begin
          vec_t exp_v = (k[i] < tv[i].size()) ? tv[i][k[i]] : tv[i][tv[i].size() - 1];
          vec_t app   = selfc[i] ? cyc_vec[i] : cut_vec[i];
          m_cap++;
          if (selfc[i]) m_self++;
          checks++;
          for (int j = 0; j < L[i]; j++)
            if (app[L[i]-1-j] !== exp_v[L[i]-1-j]) begin
              failures++;
              $display("lane %0d vector %0d bit %0d wrong", i, k[i], j);
              break;
            end
          // rate: the decoders keep pace with the channel, so the last real
          // vector is applied within one group time of its last codeword
          if (k[i] == tv[i].size() - 1) begin
            checks++;
            if (ncyc > 6 * (cws[i].size() + 1) + 2) begin
              failures++;
              $display("lane %0d: last vector after %0d cycles, limit %0d", i, ncyc,
                       6 * (cws[i].size() + 1) + 2);
            end
          end
          k[i]++;
          cut_resp[i] = {N/32{$urandom}};
        end
      end
      if (!tstall) begin
        ncyc++;
        tload  = (sent > 0 && sent % 6 == 0 && sent <= sendq.size());
        if (tload) m_load++;
        tshift = (sent < sendq.size());
        tdi    = tshift ? sendq[sent] : 1'b0;
        sent++;
      end
      @(negedge clk);
    end
    tshift = 0; tload = 0;
    for (int i = 0; i < NDEC; i++) begin
      checks++;
      if (k[i] < tv[i].size()) begin
        failures++; $display("lane %0d: %0d of %0d vectors applied", i, k[i], tv[i].size());
      end
    end
    checks++;
    if (overrun != '0) begin failures++; $display("decoder overrun"); end
    $display("session L=%0d/%0d: %0d groups, %0d stall cycles, %0d/%0d vectors",
             L0, L1, ngroups, nstall, k[0], k[1]);
  endtask

  initial begin
    clear = 0; tdi = 0; tshift = 0; tload = 0;
    literal = '0; self_cyclic = '0; vec_len = '0; cut_resp = '0;
    foreach (m_cw[i]) m_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // equal lanes: captures coincide
    run_session(N, N, 5, 5, 0, 0, 0, 0, 1);
    // literal lane next to a loop closed at stage 700
    run_session(N, 700, 2, 6, 1, 0, 0, 0, 0);
    // boundary scan as its own cyclical chain (36 stages) next to a 233-stage loop
    run_session(36, 233, 40, 8, 0, 0, 1, 0, 0);

    foreach (m_cw[i]) begin
      checks++;
      if (m_cw[i] == 0) begin failures++; $display("codeword %0d never used", i); end
    end
    checks += 8;
    if (m_load == 0)  begin failures++; $display("no load"); end
    if (m_stall == 0) begin failures++; $display("no stall"); end
    if (m_both == 0)  begin failures++; $display("no coincident capture"); end
    if (m_skip == 0)  begin failures++; $display("first fill never skipped"); end
    if (m_lit == 0)   begin failures++; $display("no literal codeword"); end
    if (m_self == 0)  begin failures++; $display("no self-cyclic capture"); end
    if (m_loop == 0)  begin failures++; $display("no intermediate loop-back"); end
    if (m_run6 == 0)  begin failures++; $display("no six-cycle run"); end
    $display("loads=%0d stalls=%0d coincident=%0d skipped_first=%0d literal_cw=%0d self_cyclic_caps=%0d loopbacks=%0d six_cycle_runs=%0d captures=%0d",
             m_load, m_stall, m_both, m_skip, m_lit, m_self, m_loop, m_run6, m_cap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
