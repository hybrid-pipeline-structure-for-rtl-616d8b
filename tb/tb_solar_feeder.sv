// tb_solar_feeder -- checks the input data copier at its defaults (N = 4
// items, copy ratio C = 4, so L = 16 slots per period).
//
// The testbench generates the period timing itself (a shift strobe every 4
// clk cycles, 3L strobes per period, feed during the first L). It offers
// random samples through the valid/ready handshake as fast as the feeder
// takes them, then stops offering. For every feed-lap shift strobe it checks
// that slot s carries item s div C of the sample queued for that period, that
// feed_valid is set, that in_ready drops while a sample waits, and that a
// period with no sample carries a bubble (feed_valid low, zero data).
module tb_solar_feeder;
  import solar_pkg::*;
  localparam int N = 4, C = 4, L = N * C, M = 4;

  logic clk = 0, rst_n = 0;
  logic shift_en, feed, period_wrap, in_valid, in_ready, feed_valid, load_valid;
  data_t in_data [N];
  data_t feed_data;
  int checks = 0, failures = 0;
  int mc = 0, e = 0;

  solar_feeder #(.N(N), .C(C)) dut (.*);

  always #5 clk = ~clk;

  // period timing
  assign shift_en    = (mc == M - 1);
  assign feed        = (e < L);
  assign period_wrap = shift_en && (e == 3 * L - 1);
  always_ff @(posedge clk) begin
    if (rst_n) begin
      mc <= (mc == M - 1) ? 0 : mc + 1;
      if (shift_en) e <= (e == 3 * L - 1) ? 0 : e + 1;
    end
  end

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

  // queue of accepted samples, in order
  data_t accepted [$][N];
  data_t active [N];
  bit    active_valid = 0;
  int    nsent = 0, nbubble = 0, nfull = 0;
  localparam int NSAMPLES = 5;

  // driver: offer samples back to back; a sample presented at a negedge is
  // taken at the next posedge if in_ready is high then (in_ready only
  // changes at posedges)
  bit took = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || took) begin
        in_valid = (nsent < NSAMPLES);
        for (int i = 0; i < N; i++) in_data[i] = data_t'($urandom_range(0, 255));
      end
      took = in_valid && in_ready;
      if (took) begin
        accepted.push_back(in_data);
        nsent++;
      end
      if (in_valid && !in_ready) nfull++;
    end
  end

  // monitor
  always @(negedge clk) begin
    if (rst_n) begin
      if (shift_en && feed) begin
        check("feed_valid", int'(feed_valid), int'(active_valid));
        check("feed_data", int'(feed_data), active_valid ? int'(active[e / C]) : 0);
        if (!active_valid && e == 0) nbubble++;
      end
    end
  end
  // reference for the active sample: at each period end take the oldest
  // sample that was accepted before it
  always @(posedge clk) begin
    if (rst_n && period_wrap) begin
      check("load_valid", int'(load_valid), int'(accepted.size() > 0));
      if (accepted.size() > 0) begin
        active = accepted[0];
        accepted.delete(0);
        active_valid = 1;
      end else begin
        active_valid = 0;
      end
    end
  end

  initial begin
    in_valid = 0;
    foreach (in_data[i]) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat ((NSAMPLES + 3) * 3 * L * M) @(posedge clk);
    check("all samples sent", nsent, NSAMPLES);
    checks++;
    if (nbubble == 0) begin failures++; $display("FAIL no bubble period seen"); end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL in_ready never dropped"); end
    $display("bubbles=%0d backpressure_cycles=%0d", nbubble, nfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
