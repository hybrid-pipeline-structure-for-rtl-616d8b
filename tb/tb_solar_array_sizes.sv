// tb_solar_array_sizes -- runs the three larger array sizes of the area
// study, 4x6, 4x12 and 4x24 nodes, side by side (each with 4 samples, M = 4),
// and checks every output slot and the latency of each against the
// reference model. The pipeline delay grows by 3L shift cycles per column.
// A fourth array, 4x3 with one extra processing lap per period (XL = 1),
// checks that the longer period, 4L shift cycles per column, is kept.
module tb_solar_array_sizes;
  logic clk = 0, rst_n = 0;
  int c6, f6, c12, f12, c24, f24, cx, fx;
  bit d6, d12, d24, dx;
  int checks, failures;

  always #5 clk = ~clk;

  tb_solar_array_run #(.COLS(6))  u6  (.clk, .rst_n, .checks(c6),  .failures(f6),  .done(d6));
  tb_solar_array_run #(.COLS(12)) u12 (.clk, .rst_n, .checks(c12), .failures(f12), .done(d12));
  tb_solar_array_run #(.COLS(24)) u24 (.clk, .rst_n, .checks(c24), .failures(f24), .done(d24));
  tb_solar_array_run #(.COLS(3), .XL(1)) ux (.clk, .rst_n, .checks(cx), .failures(fx), .done(dx));

  initial begin
    repeat (40 * 3 * 16 * 4) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c12 + c24 + cx, f6 + f12 + f24 + fx + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d6 && d12 && d24 && dx);
    @(negedge clk);
    checks = c6 + c12 + c24 + cx;
    failures = f6 + f12 + f24 + fx;
    $display("4x6: %0d checks, 4x12: %0d checks, 4x24: %0d checks, 4x3 XL=1: %0d checks", c6, c12, c24, cx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
