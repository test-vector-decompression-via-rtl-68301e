// Testbench for cyclical_scan_chain: for random loop lengths (including loops
// closed inside a longer chain) it shifts t1, then t1^t2, t2^t3, ... and
// checks that the chain holds each t_k in turn and that the serial output
// replays the previous vector. Clear and holding without shift are checked.
module tb_cyclical_scan_chain;
  localparam int unsigned N = 40, LW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, shift, din, sout;
  logic [LW-1:0] len;
  logic [N-1:0]  q;
  int checks = 0, failures = 0;

  cyclical_scan_chain #(.N(N)) dut (.*);

  initial begin
    logic [N-1:0] prev, cur;
    clear = 0; shift = 0; din = 0; len = LW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int session = 0; session < 12; session++) begin
      automatic int L = (session == 0) ? N : $urandom_range(N, 2);
      len = LW'(L);
      clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (q !== '0) begin failures++; $display("clear failed"); end
      prev = '0;
      for (int k = 0; k < 8; k++) begin
        cur = N'({$urandom, $urandom});
        for (int j = 0; j < L; j++) begin
          // bit j of the vector ends in stage L-1-j
          din = cur[L-1-j] ^ prev[L-1-j];
          shift = 1;
          #1;
          checks++;
          if (sout !== prev[L-1-j]) begin failures++; $display("sout mismatch"); end
          @(negedge clk);
          shift = $urandom_range(3) == 0 ? 0 : 1;
          if (!shift) @(negedge clk);   // idle cycles must hold the chain
          shift = 0;
        end
        for (int b = 0; b < L; b++) begin
          checks++;
          if (q[b] !== cur[b]) begin
            failures++; $display("len %0d vec %0d stage %0d wrong", L, k, b); break;
          end
        end
        prev = cur;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
