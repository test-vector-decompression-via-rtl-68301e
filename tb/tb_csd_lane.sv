// Testbench for csd_lane (decoder + cyclical chain + scan counter + test
// chain). For each session it makes a correlated random test set, builds the
// difference-vector stream (t1, t1^t2, ..., t(n-1)^tn, then a zero flush),
// encodes it with an independent software encoder and loads one codeword
// whenever the decoder is ready. At every CUT capture it checks the applied
// vector, then checks that the captured response is shifted out in order.
// Sessions: compressed; compressed with the loop closed inside a longer
// chain; literal (compression off); self-cyclic (boundary scan as its own
// cyclical chain). The number of enabled cycles must equal the number of
// decoded bits (no idle cycles), and the number of captures the number of
// vectors.
module tb_csd_lane;
  import csd_pkg::*;
  import tb_csd_pkg::*;

  localparam int unsigned N = 48, LW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          en, clear, load, literal, self_cyclic;
  logic [2:0]    code;
  logic [LW-1:0] len;
  logic [N-1:0]  cut_resp, cut_vec, cyc_vec;
  logic          capture, vec_done, scan_out, dec_ready, overrun;
  int checks = 0, failures = 0;

  csd_lane #(.N(N)) dut (.*);

  task automatic run_session(int L, int nvec, bit lit, bit selfc);
    logic [N-1:0] tv[$];
    bitq_t s;
    cwq_t  cws;
    logic [N-1:0] prev;
    int ncap = 0, nbits = 0, ncyc = 0, pos = 0, k = 0;
    logic [N-1:0] r;
    bit rq[$];
    // test set: each vector differs from the previous in a few bits
    prev = '0;
    for (int i = 0; i < nvec; i++) begin
      logic [N-1:0] v = (i == 0 || i % 7 == 3) ? N'({$urandom, $urandom}) : prev;
      repeat ($urandom_range(4)) v[$urandom_range(L - 1)] ^= 1'b1;
      tv.push_back(v);
      prev = v;
    end
    prev = '0;
    foreach (tv[i]) begin
      for (int j = 0; j < L; j++) s.push_back(tv[i][L-1-j] ^ prev[L-1-j]);
      prev = tv[i];
    end
    if (!selfc) for (int j = 0; j < L; j++) s.push_back(1'b0);
    cws = lit ? pack_literal(s) : encode_mod3(s);
    foreach (cws[i]) nbits += lit ? 3 : mod3_run(cws[i]);

    @(negedge clk);
    len = LW'(L); literal = lit; self_cyclic = selfc; clear = 1; en = 1; load = 0;
    @(negedge clk);
    clear = 0;
    while ((pos < cws.size() || !dec_ready) && ncyc < 20 * nbits + 100) begin
      en = !capture;
      load = 0;
      #1;
      if (capture) begin
        ncap++;
        for (int j = 0; j < L; j++) begin
          logic applied = selfc ? cyc_vec[L-1-j] : cut_vec[L-1-j];
          checks++;
          if (k >= nvec || applied !== tv[k][L-1-j]) begin
            failures++; $display("vector %0d bit %0d wrong", k, j); break;
          end
        end
        k++;
        r = N'({$urandom, $urandom});
        cut_resp = r;
        rq.delete();
        for (int j = 0; j < L; j++) rq.push_back(r[L-1-j]);
      end else begin
        ncyc++;
        if (dut.dvalid && rq.size() > 0) begin
          checks++;
          if (scan_out !== rq.pop_front()) begin failures++; $display("response bit wrong"); end
        end
        if (dec_ready && pos < cws.size()) begin
          load = 1; code = cws[pos]; pos++;
        end
      end
      @(negedge clk);
    end
    // let the last capture happen
    load = 0;
    repeat (3) begin
      en = !capture; #1;
      if (capture) begin
        ncap++;
        for (int j = 0; j < L; j++) begin
          logic applied = selfc ? cyc_vec[L-1-j] : cut_vec[L-1-j];
          checks++;
          if (k >= nvec || applied !== tv[k][L-1-j]) begin
            failures++; $display("vector %0d bit %0d wrong", k, j); break;
          end
        end
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (ncap != nvec) begin failures++; $display("%0d captures, expected %0d", ncap, nvec); end
    // one decoded bit per enabled cycle: the loop counts the cycle that loads
    // the first codeword and stops before the cycle of the last bit
    checks++;
    if (ncyc != nbits) begin failures++; $display("%0d cycles for %0d bits", ncyc, nbits); end
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
  endtask

  initial begin
    en = 1; clear = 0; load = 0; literal = 0; self_cyclic = 0; code = '0;
    len = LW'(N); cut_resp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_session(N, 20, 0, 0);
    run_session(29, 25, 0, 0);
    run_session(N, 10, 1, 0);
    run_session(37, 15, 0, 1);
    run_session(N, 15, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
