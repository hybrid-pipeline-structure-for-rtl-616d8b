// tb_solar_array -- end-to-end test of the whole array at its default size
// (4 input items, copy ratio 4, 4 rows x 3 columns, 10 node cycles per shift
// cycle): no parameter of the array is overridden.
//
// Phase 1 streams 75 four-feature samples (the size of the Iris training set;
// the feature values are synthetic, drawn from ranges of the four Iris
// features scaled by 20) through a fixed 4x3 network built from the function
// mix of the Iris example: ident, add, sub, half in column 1; ident, sub, exp
// in column 2; sub, ident in column 3, with some nodes unused. One column-2
// node reads an input copy directly, skipping a layer. A pause in the
// sample stream makes the pipeline carry bubbles.
// Phase 2 sends 20 more samples while every period gets a new random
// configuration (dynamic reconfiguration).
//
// The testbench keeps, for every period, the sample fed and the configuration
// in force; the expected output of a sample is the reference column model
// applied column after column with the configuration each column had when
// the sample passed it. Every output slot is compared, as are the slot order,
// the number of slots per sample and the latency: slot 0 of a sample must
// leave 3L*COLS shift cycles (3L*COLS*M clk cycles) after it entered.
// Counted mechanisms (each must occur): node reads, node writes, channel
// circulation, bubbles, input back-pressure, reconfiguration, cross-layer
// reads, a full pipeline (COLS samples in flight).
module tb_solar_array;
  import solar_pkg::*;
  import tb_solar_ref_pkg::*;
  localparam int N = 4, C = 4, K = 4, COLS = 3, M = 10, L = C * N;
  localparam int NIRIS = 75, NDYN = 20, NPER_MAX = 160;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, shift_en, feed_active;
  data_t in_data [N];
  node_cfg_t node_cfg [COLS][K];
  slot_t out_slot;
  data_t out_data;
  mode_e node_mode [COLS][K];
  logic [K-1:0] node_sel [COLS];
  logic [$clog2(3*L)-1:0] phase;

  solar_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (NPER_MAX * 3 * L * M) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- configurations ---------------------------------------------------
  function automatic node_cfg_t nc(bit en, func_e f, int a, int b,
                                   func_e pa = FN_IDENT, func_e pb = FN_IDENT);
    node_cfg_t c;
    c.en = en; c.func = f; c.slot_a = slot_t'(a); c.slot_b = slot_t'(b);
    c.pre_a = pa; c.pre_b = pb;
    return c;
  endfunction

  // input item d occupies slots 4d .. 4d+3
  task automatic set_iris_cfg();
    // column 1: nodes 1..4
    node_cfg[0][0] = nc(1, FN_IDENT,  4, 0);                    // ident(din2)
    node_cfg[0][1] = nc(1, FN_ADD,    8, 0);                    // din3 + din1
    node_cfg[0][2] = nc(1, FN_SUB,   12, 5, FN_LOG, FN_EXP);    // log(din4) - exp(din2)
    node_cfg[0][3] = nc(1, FN_HALF,  13, 0);                    // half(din4)
    // column 2: nodes 5..8
    node_cfg[1][0] = nc(1, FN_IDENT,  0, 0, FN_LOG);            // log(node 2)
    node_cfg[1][1] = nc(1, FN_SUB,    9, 4, FN_LOG, FN_LOG);    // log(din3) - log(node 1), slot 9: an untouched copy of din3
    node_cfg[1][2] = nc(1, FN_EXP,   13, 0);                    // exp(node 4)
    node_cfg[1][3] = nc(0, FN_IDENT,  0, 0);
    // column 3: nodes 9..12
    node_cfg[2][0] = nc(0, FN_IDENT,  0, 0);
    node_cfg[2][1] = nc(1, FN_SUB,   13, 0);                    // node 7 - node 5
    node_cfg[2][2] = nc(1, FN_IDENT,  9, 0);                    // ident(node 6)
    node_cfg[2][3] = nc(0, FN_IDENT,  0, 0);
  endtask

  task automatic set_random_cfg();
    for (int c = 0; c < COLS; c++)
      for (int i = 0; i < K; i++)
        node_cfg[c][i] = nc($urandom_range(0, 5) != 0, func_e'($urandom_range(0, 6)),
                            $urandom_range(0, L - 1), $urandom_range(0, L - 1),
                            func_e'($urandom_range(0, 6)), func_e'($urandom_range(0, 6)));
  endtask

  // ---- per-period history ---------------------------------------------
  node_cfg_t cfg_hist [NPER_MAX][COLS][K];
  int        smp_hist [NPER_MAX][N];
  bit        smp_valid [NPER_MAX];
  longint    feed_t0 [NPER_MAX];
  int        accepted [$][N];
  int        per = 0;                 // current period number
  longint    cyc = 0;
  int        exp_out [L];
  bit        exp_valid = 0;
  int        slots_out = 0, samples_out = 0, exp_slot = 0;

  // mechanism counters
  int n_read = 0, n_write = 0, n_circ = 0, n_bubble = 0, n_backpressure = 0;
  int n_reconfig = 0, n_cross = 0, n_full = 0;
  mode_e prev_mode [COLS][K];

  function automatic bit cfg_equal(int p, int q);
    for (int c = 0; c < COLS; c++)
      for (int i = 0; i < K; i++)
        if (cfg_hist[p][c][i] != cfg_hist[q][c][i]) return 0;
    return 1;
  endfunction

  // expected output of the sample fed in period p
  task automatic compute_expected(int p);
    int slots [];
    int written [];
    node_cfg_t cl [];
    slots = new[L];
    written = new[L];
    cl = new[K];
    for (int s = 0; s < L; s++) begin
      slots[s] = smp_valid[p] ? smp_hist[p][s / C] : 0;
      written[s] = 0;
    end
    for (int c = 0; c < COLS; c++) begin
      for (int i = 0; i < K; i++) cl[i] = cfg_hist[p + c][c][i];
      for (int i = 0; i < K; i++) begin
        if (c > 0 && smp_valid[p] && cl[i].en && written[cl[i].slot_a] == 0) n_cross++;
      end
      ref_column(slots, cl, L);
      for (int i = 0; i < K; i++) if (cl[i].en) begin
        written[cl[i].slot_a] = 1;
        if (is_binary(cl[i].func)) written[cl[i].slot_b] = 1;
      end
    end
    for (int s = 0; s < L; s++) exp_out[s] = slots[s];
    exp_valid = smp_valid[p];
  endtask

  int nsent = 0;
  bit took = 0;
  bit pause = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      // ---- driver ----
      pause = (nsent >= 40 && nsent < 42 && per < 50);
      if (!in_valid || took) begin
        in_valid = (nsent < NIRIS + NDYN) && !pause;
        in_data[0] = data_t'($urandom_range(86, 158));
        in_data[1] = data_t'($urandom_range(40, 88));
        in_data[2] = data_t'($urandom_range(20, 138));
        in_data[3] = data_t'($urandom_range(2, 50));
      end
      took = in_valid && in_ready;
      if (took) begin
        int smp [N];
        foreach (smp[i]) smp[i] = int'(in_data[i]);
        accepted.push_back(smp);
        nsent++;
      end
      if (in_valid && !in_ready) n_backpressure++;

      // ---- mechanism monitors ----
      for (int c = 0; c < COLS; c++)
        for (int i = 0; i < K; i++) begin
          if (node_mode[c][i] == MODE_READ && prev_mode[c][i] != MODE_READ) n_read++;
          prev_mode[c][i] = node_mode[c][i];
          if (shift_en && node_sel[c][i]) n_write++;
        end
      if (shift_en && int'(phase) >= L) n_circ++;
      if (shift_en && int'(phase) == 0 && smp_valid[per]) feed_t0[per] = cyc;
      if (shift_en) check("feed_active", int'(feed_active), int'(smp_valid[per] && int'(phase) < L));

      // ---- output checker ----
      if (out_valid) begin
        check("out_valid only for real samples", int'(exp_valid), 1);
        check("out_slot order", int'(out_slot), exp_slot);
        check("out_data", int'(out_data), exp_out[int'(out_slot)]);
        if (out_slot == 0 && per >= COLS)
          check("latency in clk cycles", int'(cyc - feed_t0[per - COLS]), 3 * L * COLS * M);
        exp_slot++;
        slots_out++;
      end

      // ---- period boundary: the next posedge ends period per ----
      if (shift_en && int'(phase) == 3 * L - 1) begin
        if (exp_valid) begin
          check("slots per sample", exp_slot, L);
          samples_out++;
        end
        per++;
        // sample of the new period
        if (accepted.size() > 0) begin
          smp_hist[per] = accepted[0];
          accepted.delete(0);
          smp_valid[per] = 1;
        end else begin
          smp_valid[per] = 0;
          n_bubble++;
        end
        // configuration of the new period
        if (nsent >= NIRIS && smp_valid[per]) set_random_cfg();
        cfg_hist[per] = node_cfg;
        if (per > 0 && !cfg_equal(per, per - 1)) n_reconfig++;
        if (per >= COLS - 1) begin
          bit full;
          full = 1;
          for (int c = 0; c < COLS; c++) full &= smp_valid[per - c];
          if (full) n_full++;
        end
        // expected output during the coming feed lap
        exp_slot = 0;
        if (per >= COLS) compute_expected(per - COLS);
        else exp_valid = 0;
      end
    end
  end

  initial begin
    in_valid = 0;
    foreach (in_data[i]) in_data[i] = '0;
    foreach (smp_valid[p]) smp_valid[p] = 0;
    foreach (prev_mode[c, i]) prev_mode[c][i] = MODE_IDLE;
    set_iris_cfg();
    cfg_hist[0] = node_cfg;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (samples_out == NIRIS + NDYN || per == NPER_MAX - COLS - 2);
    @(negedge clk);
    check("samples out", samples_out, NIRIS + NDYN);
    $display("periods=%0d samples_out=%0d slots_out=%0d", per, samples_out, slots_out);
    $display("reads=%0d writes=%0d circulate=%0d bubbles=%0d backpressure=%0d reconfig=%0d cross_layer=%0d full_pipeline=%0d",
             n_read, n_write, n_circ, n_bubble, n_backpressure, n_reconfig, n_cross, n_full);
    checks++; if (n_read == 0)         begin failures++; $display("FAIL no node read"); end
    checks++; if (n_write == 0)        begin failures++; $display("FAIL no node wrote"); end
    checks++; if (n_circ == 0)         begin failures++; $display("FAIL channel never circulated"); end
    checks++; if (n_bubble == 0)       begin failures++; $display("FAIL no bubble"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (n_reconfig == 0)     begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_cross == 0)        begin failures++; $display("FAIL no cross-layer read"); end
    checks++; if (n_full == 0)         begin failures++; $display("FAIL pipeline never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
