// Testbench for rl_decoder: runs the modified 3-bit code, the 3-bit counting
// code and the 2-bit counting code side by side, each against an independent
// table of decoded runs (see tb_rl_decoder_run).
module tb_rl_decoder;
  import csd_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done_m, done_c3, done_c2;
  int   ch_m, ch_c3, ch_c2, f_m, f_c3, f_c2;

  tb_rl_decoder_run #(.CODE(CODE_MOD3))   r_mod3   (.clk, .rst_n, .done(done_m),  .checks(ch_m),  .failures(f_m));
  tb_rl_decoder_run #(.CODE(CODE_COUNT3)) r_count3 (.clk, .rst_n, .done(done_c3), .checks(ch_c3), .failures(f_c3));
  tb_rl_decoder_run #(.CODE(CODE_COUNT2)) r_count2 (.clk, .rst_n, .done(done_c2), .checks(ch_c2), .failures(f_c2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_m && done_c3 && done_c2);
    $display("TB_RESULT checks=%0d failures=%0d", ch_m + ch_c3 + ch_c2, f_m + f_c3 + f_c2);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", ch_m + ch_c3 + ch_c2, f_m + f_c3 + f_c2 + 1);
    $finish;
  end
endmodule
