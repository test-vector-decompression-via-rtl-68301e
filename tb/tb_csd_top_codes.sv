// Top-level test of other builds of csd_top: the 2-bit counting code on two
// lanes (loads every 4 cycles) and the modified 3-bit code on three lanes
// sharing one channel (loads every 9 cycles) must deliver every vector; the
// 3-bit counting code cannot keep up with a load every 6 cycles and must
// raise overrun.
module tb_csd_top_codes;
  import csd_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d2, d3, dm;
  int   c2, c3, cm, f2, f3, fm;

  tb_csd_top_code_run #(.CODE(CODE_COUNT2), .EXPECT_OVERRUN(1'b0)) r_count2 (
    .clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  tb_csd_top_code_run #(.CODE(CODE_COUNT3), .EXPECT_OVERRUN(1'b1)) r_count3 (
    .clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  tb_csd_top_code_run #(.CODE(CODE_MOD3), .NDEC(3), .EXPECT_OVERRUN(1'b0)) r_mod3x3 (
    .clk, .rst_n, .done(dm), .checks(cm), .failures(fm));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d2 && d3 && dm);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + cm, f2 + f3 + fm);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + cm, f2 + f3 + fm + 1);
    $finish;
  end
endmodule
