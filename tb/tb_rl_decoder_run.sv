// Self-checking driver for one rl_decoder instance of a given code.
//
// Feeds random codewords (some in literal mode), loading each as soon as the
// decoder is ready, with random clock-enable stalls and idle gaps. An
// independent table of decoded runs predicts every emitted bit. Each run must
// take exactly as many enabled cycles as it has bits, never more than the
// code's maximum. Finally a premature load must raise the overrun flag.
module tb_rl_decoder_run
  import csd_pkg::*;
#(
  parameter rl_code_e    CODE = CODE_MOD3,
  parameter int unsigned NCW  = 400
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned K = code_bits(CODE);

  logic         en, load, literal;
  logic [K-1:0] code;
  logic         bit_valid, bit_out, ready, overrun;

  rl_decoder #(.CODE(CODE)) dut (.*);

  // Expected run of a codeword, first bit first, as a string of '0'/'1'.
  function automatic string expected_run(logic [K-1:0] cw, logic lit);
    string s = "";
    if (lit) begin
      for (int i = K - 1; i >= 0; i--) s = {s, cw[i] ? "1" : "0"};
    end else if (CODE == CODE_MOD3) begin
      string t[8] = '{"10", "11", "01", "001", "0001", "00001", "000001", "000000"};
      s = t[int'(cw)];
    end else begin
      for (int i = 0; i < int'(cw); i++) s = {s, "0"};
      if (cw != {K{1'b1}}) s = {s, "1"};
    end
    return s;
  endfunction

  string exp_s;      // bits still expected from the current run
  int    run_len;    // bits in the current run
  int    run_cyc;    // enabled cycles spent on it
  bit    tight;      // current run was loaded the moment the decoder was ready
  bit    busy_seen;
  int    nloaded;
  int    ready_at;   // enabled cycles after load when ready was first seen
  int    maxr;

  initial begin
    done = 0; checks = 0; failures = 0;
    en = 0; load = 0; literal = 0; code = '0;
    exp_s = ""; run_len = 0; run_cyc = 0; tight = 0; nloaded = 0;
    maxr = max_run(CODE);
    @(posedge rst_n);
    while (nloaded < NCW || exp_s.len() != 0) begin
      @(negedge clk);
      load = 0;
      en = ($urandom_range(9) != 0);
      #1;
      if (en && bit_valid) begin
        checks++;
        if (exp_s.len() == 0) begin
          failures++; $display("%m: bit emitted with no run pending");
        end else begin
          if (bit_out != (exp_s[0] == "1")) begin
            failures++; $display("%m: wrong bit %0b, expected %s", bit_out, exp_s);
          end
          exp_s = exp_s.substr(1, exp_s.len() - 1);
        end
        run_cyc++;
      end else if (!en && bit_valid) begin
        checks++; failures++; $display("%m: bit_valid while disabled");
      end
      if (en && ready) begin
        // The decoder must be ready exactly when its run is over.
        checks++;
        if (exp_s.len() != 0) begin
          failures++; $display("%m: ready with %0d bits outstanding", exp_s.len());
        end
        if (tight && run_len > 0) begin
          checks++;
          if (run_cyc != run_len || run_cyc > maxr) begin
            failures++; $display("%m: run took %0d cycles, expected %0d", run_cyc, run_len);
          end
        end
        if (nloaded < NCW && $urandom_range(4) != 0) begin
          load    = 1;
          literal = ($urandom_range(7) == 0);
          code    = K'($urandom);
          exp_s   = expected_run(code, literal);
          run_len = exp_s.len();
          run_cyc = 0;
          tight   = 1;
          nloaded++;
        end else begin
          tight   = 0;
          run_len = 0;
        end
      end else if (en && !ready && exp_s.len() == 0) begin
        checks++; failures++; $display("%m: not ready after run ended");
      end
    end
    // No overrun so far; now force one with a load in mid-run.
    @(negedge clk);
    load = 0; en = 1;
    checks++;
    if (overrun) begin failures++; $display("%m: spurious overrun"); end
    load = 1; literal = 1; code = '0;         // K-bit literal run
    @(negedge clk);
    load = 1; literal = 0;                    // second load while busy
    @(negedge clk);
    load = 0;
    #1;
    checks++;
    if (!overrun) begin failures++; $display("%m: overrun not flagged"); end
    repeat (10) @(negedge clk);
    done = 1;
  end
endmodule
