// tb_solar_array_run -- helper for the array-size testbench: one solar_array
// of COLS columns (4 rows, 4 items, copy ratio 4, M = 4 to keep runs short)
// with a fixed random configuration, fed NS random samples back to back.
// XL extra processing laps may be set. Every output slot is compared with
// the reference column model applied COLS times; slot 0 of each sample must
// leave (3+XL)L*COLS*M clk cycles after the sample's slot 0 entered. Reports its counts through its ports when done.
module tb_solar_array_run
  import solar_pkg::*;
  import tb_solar_ref_pkg::*;
#(
  parameter int COLS = 6,
  parameter int NS   = 4,
  parameter int XL   = 0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int N = 4, C = 4, K = 4, M = 4, L = C * N;

  logic in_valid, in_ready, out_valid, shift_en, feed_active;
  data_t in_data [N];
  node_cfg_t node_cfg [COLS][K];
  slot_t out_slot;
  data_t out_data;
  mode_e node_mode [COLS][K];
  logic [K-1:0] node_sel [COLS];
  logic [$clog2((3+XL)*L)-1:0] phase;

  solar_array #(.N(N), .C(C), .K(K), .COLS(COLS), .M(M), .XL(XL)) dut (.*);

  int smp [NS][N];
  int expq [NS][L];
  longint t_in [NS];
  longint cyc = 0;
  int nsent = 0, nin = 0, nout = 0, oslot = 0;
  bit took;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 5) $display("FAIL COLS=%0d XL=%0d %s: got %0d expected %0d", COLS, XL, what, got, exp);
    end
  endtask

  initial begin
    int slots [];
    node_cfg_t cl [];
    checks = 0; failures = 0; done = 0;
    slots = new[L];
    cl = new[K];
    for (int c = 0; c < COLS; c++)
      for (int i = 0; i < K; i++) begin
        node_cfg[c][i].en     = ($urandom_range(0, 4) != 0);
        node_cfg[c][i].func   = func_e'($urandom_range(0, 6));
        node_cfg[c][i].slot_a = slot_t'($urandom_range(0, L - 1));
        node_cfg[c][i].slot_b = slot_t'($urandom_range(0, L - 1));
        node_cfg[c][i].pre_a  = func_e'($urandom_range(0, 6));
        node_cfg[c][i].pre_b  = func_e'($urandom_range(0, 6));
      end
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < N; i++) smp[s][i] = $urandom_range(0, 255);
      for (int j = 0; j < L; j++) slots[j] = smp[s][j / C];
      for (int c = 0; c < COLS; c++) begin
        for (int i = 0; i < K; i++) cl[i] = node_cfg[c][i];
        ref_column(slots, cl, L);
      end
      for (int j = 0; j < L; j++) expq[s][j] = slots[j];
    end
    in_valid = 0;
    foreach (in_data[i]) in_data[i] = '0;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      cyc++;
      // hold the offered sample until the feeder has taken it
      if (!in_valid || took) begin
        in_valid = (nsent < NS);
        if (nsent < NS) for (int i = 0; i < N; i++) in_data[i] = data_t'(smp[nsent][i]);
      end
      took = in_valid && in_ready;
      if (took) nsent++;
      if (shift_en && feed_active && phase == 0) begin
        t_in[nin] = cyc;
        nin++;
      end
      if (out_valid) begin
        check("out_slot", int'(out_slot), oslot);
        check("out_data", int'(out_data), expq[nout][oslot]);
        if (oslot == 0) check("latency", int'(cyc - t_in[nout]), (3 + XL) * L * COLS * M);
        oslot++;
        if (oslot == L) begin
          oslot = 0;
          nout++;
          if (nout == NS) done = 1;
        end
      end
    end
  end
endmodule
