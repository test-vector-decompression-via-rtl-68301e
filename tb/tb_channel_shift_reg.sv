// Testbench for channel_shift_reg: random bits and random enable; a queue
// model of the last NDEC*K accepted bits predicts every codeword.
module tb_channel_shift_reg;
  localparam int unsigned NDEC = 2, K = 3, W = NDEC * K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, shift, si;
  logic [NDEC-1:0][K-1:0] codes;
  int checks = 0, failures = 0;
  bit hist[$];   // accepted bits, oldest first

  channel_shift_reg #(.NDEC(NDEC), .K(K)) dut (.*);

  initial begin
    en = 0; shift = 0; si = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W; i++) hist.push_back(1'b0);
    repeat (2000) begin
      @(negedge clk);
      // Check: decoder d gets the bits sent at positions (NDEC-1-d)*K.. in
      // the last W accepted bits, first of them as MSB.
      for (int d = 0; d < NDEC; d++) begin
        logic [K-1:0] e;
        for (int b = 0; b < K; b++)
          e[K-1-b] = hist[hist.size() - W + (NDEC - 1 - d) * K + b];
        checks++;
        if (codes[d] !== e) begin
          failures++; $display("decoder %0d code %b expected %b", d, codes[d], e);
        end
      end
      en = ($urandom_range(5) != 0); shift = 1'($urandom_range(1)); si = 1'($urandom_range(1));
      if (en && shift) hist.push_back(si);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
