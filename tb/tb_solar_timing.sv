// tb_solar_timing -- checks the shared timing controller at its defaults
// (L = 16 slots, M = 10 node cycles per shift, P_K = 15, no extra laps) and,
// side by side, a second controller with one extra processing lap (XL = 1).
//
// An independent cycle counter in the testbench predicts, for every clk
// cycle over four periods: the shift strobe (every M-th cycle), the shift
// count within the period and pos = count mod L, the top switch (feed for the
// first L shift cycles), the second lap, the write window
// [(1+XL)L+P_K, (2+XL)L+P_K) and the period end. It also measures the period:
// (3+XL)L shift cycles = (3+XL)L*M clk cycles.
module tb_solar_timing;
  localparam int L = 16, M = 10, P_K = 15;

  logic clk = 0, rst_n = 0;
  logic shift_en, feed, second_lap, write_win, period_wrap;
  logic [$clog2(3*L)-1:0] cnt;
  logic [$clog2(L)-1:0] pos;
  logic shift_en1, feed1, second_lap1, write_win1, period_wrap1;
  logic [$clog2(4*L)-1:0] cnt1;
  logic [$clog2(L)-1:0] pos1;
  int checks = 0, failures = 0;

  solar_timing #(.L(L), .M(M), .P_K(P_K)) dut (.*);
  solar_timing #(.L(L), .M(M), .P_K(P_K), .XL(1)) dut1 (
    .clk, .rst_n, .shift_en(shift_en1), .cnt(cnt1), .pos(pos1), .feed(feed1),
    .second_lap(second_lap1), .write_win(write_win1), .period_wrap(period_wrap1));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs of a controller with xl extra laps at clk cycle t
  task automatic check_all(int t, int xl, string tag, logic se, int c, int p, logic f, logic sl,
                           logic ww, logic pw);
    int e;
    e = (t / M) % ((3 + xl) * L);           // shift strobes taken this period
    check({tag, " shift_en"}, int'(se), int'((t % M) == M - 1));
    check({tag, " cnt"}, c, e);
    check({tag, " pos"}, p, e % L);
    check({tag, " feed"}, int'(f), int'(e < L));
    check({tag, " second_lap"}, int'(sl), int'(e / L == 1));
    check({tag, " write_win"}, int'(ww), int'((e >= (1 + xl) * L + P_K) && (e < (2 + xl) * L + P_K)));
    check({tag, " period_wrap"}, int'(pw), int'(((t % M) == M - 1) && e == (3 + xl) * L - 1));
  endtask

  initial begin
    int t, last_wrap, last_wrap1, periods, periods1;
    last_wrap = -1; last_wrap1 = -1; periods = 0; periods1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (t = 0; t < 4 * 4 * L * M; t++) begin
      if (t > 0) @(negedge clk);
      check_all(t, 0, "XL0", shift_en, int'(cnt), int'(pos), feed, second_lap, write_win, period_wrap);
      check_all(t, 1, "XL1", shift_en1, int'(cnt1), int'(pos1), feed1, second_lap1, write_win1, period_wrap1);
      if (period_wrap) begin
        if (last_wrap >= 0) check("period length", t - last_wrap, 3 * L * M);
        last_wrap = t;
        periods++;
      end
      if (period_wrap1) begin
        if (last_wrap1 >= 0) check("period length XL=1", t - last_wrap1, 4 * L * M);
        last_wrap1 = t;
        periods1++;
      end
    end
    check("periods seen", periods, 5);
    check("periods seen XL=1", periods1, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
