// tb_solar_alu -- exhaustive check of the node function unit.
//
// For every function and every operand value (both operands for add/sub on a
// sampled grid, all 256x256 for add and sub) the result is compared with the
// integer reference model. The approximations are also held against real
// arithmetic: log within 4 LSB of 32*log2(a), exp within 7 % of 2^(a/32),
// sigmoid within 6 LSB of 256/(1+exp(-(a-128)/16)). The example of the
// architecture, modified add of 47 and 57, must give 51.
module tb_solar_alu;
  import solar_pkg::*;
  import tb_solar_ref_pkg::*;

  func_e func;
  data_t a, b, y;
  int checks = 0, failures = 0;

  solar_alu dut (.func(func), .a(a), .b(b), .y(y));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  task automatic check_close(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp > tol) || (exp - got > tol)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d got %f expected %f", what, a, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static func_e fl [7] = '{FN_IDENT, FN_HALF, FN_LOG, FN_EXP, FN_SIGMOID, FN_ADD, FN_SUB};
    // Example from the single-node read/write experiment
    func = FN_ADD; a = 47; b = 57; #1;
    check("fig4 add", int'(y), 51);

    foreach (fl[k]) begin
      func = fl[k];
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j += (is_binary(fl[k]) ? 1 : 85)) begin
          a = data_t'(i); b = data_t'(j); #1;
          check(func.name(), int'(y), ref_alu(fl[k], i, j));
        end
      end
    end

    // Accuracy of the approximations against real arithmetic
    for (int i = 1; i < 256; i++) begin
      a = data_t'(i); b = 0;
      func = FN_LOG; #1;
      check_close("log accuracy", real'(y), 32.0 * $ln(real'(i)) / $ln(2.0), 4.0);
      func = FN_SIGMOID; #1;
      check_close("sigmoid accuracy", real'(y),
                  (256.0 / (1.0 + $exp(-(real'(i) - 128.0) / 16.0)) > 255.0) ? 255.0 :
                   256.0 / (1.0 + $exp(-(real'(i) - 128.0) / 16.0)), 6.0);
      func = FN_EXP; #1;
      check_close("exp accuracy", real'(y), $pow(2.0, real'(i) / 32.0),
                  0.07 * $pow(2.0, real'(i) / 32.0) + 1.0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
