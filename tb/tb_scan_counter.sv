// Testbench for scan_counter: random shift patterns for several vector
// lengths; a software count predicts the cycle of every capture (the cycle
// right after the shift that fills the chain) and the skipped first fill.
module tb_scan_counter;
  localparam int unsigned N = 20, LW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, shift, skip_first, capture, vec_done;
  logic [LW-1:0] len, count;
  int checks = 0, failures = 0;

  scan_counter #(.N(N)) dut (.*);

  initial begin
    int n, fills; bit exp_cap, exp_done;
    clear = 0; shift = 0; skip_first = 1; len = LW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      automatic int L = (s == 0) ? N : $urandom_range(N, 1);
      len = LW'(L); skip_first = s[0];
      clear = 1; @(negedge clk); clear = 0;
      n = 0; fills = 0; exp_cap = 0; exp_done = 0;
      repeat (6 * L + 20) begin
        #1;
        checks++;
        if (capture !== exp_cap || vec_done !== exp_done || count !== LW'(n)) begin
          failures++;
          $display("len %0d: capture %0b/%0b done %0b/%0b count %0d/%0d", L,
                   capture, exp_cap, vec_done, exp_done, count, n);
        end
        // no shift in a capture cycle
        shift = capture ? 0 : ($urandom_range(2) != 0);
        exp_cap = 0; exp_done = 0;
        if (shift) begin
          n++;
          if (n == L) begin
            n = 0; fills++; exp_done = 1;
            exp_cap = !(skip_first && fills == 1);
          end
        end
        @(negedge clk);
        shift = 0;
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
