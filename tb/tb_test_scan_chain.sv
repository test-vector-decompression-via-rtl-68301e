// Testbench for test_scan_chain: shifts random vectors of random length in,
// checks the applied vector, captures a random response and checks that it
// leaves on `so` in order while the next vector shifts in.
module tb_test_scan_chain;
  localparam int unsigned N = 32, LW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift, si, capture, so;
  logic [N-1:0] resp, q;
  logic [LW-1:0] len;
  int checks = 0, failures = 0;

  test_scan_chain #(.N(N)) dut (.*);

  initial begin
    logic [N-1:0] vec, r;
    int L;
    shift = 0; si = 0; capture = 0; resp = '0; len = LW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1;
    r = '0;
    for (int k = 0; k < 30; k++) begin
      if (k % 10 == 0) L = $urandom_range(N, 1);
      len = LW'(L);
      vec = N'($urandom);
      for (int j = 0; j < L; j++) begin
        shift = 1; si = vec[L-1-j];
        #1;
        if (k > 0 && k % 10 != 0) begin
          checks++;
          if (so !== r[L-1-j]) begin failures++; $display("response bit %0d wrong", j); end
        end
        @(negedge clk);
      end
      shift = 0;
      for (int b = 0; b < L; b++) begin
        checks++;
        if (q[b] !== vec[b]) begin failures++; $display("vector bit %0d wrong", b); break; end
      end
      r = N'($urandom); resp = r; capture = 1; shift = 1;   // capture wins over shift
      @(negedge clk);
      capture = 0; shift = 0;
      checks++;
      if (q !== r) begin failures++; $display("capture failed"); end
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
