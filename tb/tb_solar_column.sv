// tb_solar_column -- one column (L = 16 slots, K = 4 nodes) against the
// reference column model.
//
// Over 40 periods the testbench feeds a fresh random 16-slot stream and a
// fresh random node configuration (random function, slots mostly inside the
// channel, sometimes outside it, nodes sometimes disabled) each period, with
// a random valid bit. During the feed lap of the following period it reads
// the 16 slots leaving the bottom of the channel and compares them, slot by
// slot, with what the reference model computes from the fed stream and the
// configuration; valid_out must follow valid_in one period later. It counts
// how often nodes wrote, how often two nodes of the column wrote the same slot
// and how often a configured slot never arrived, and fails if one of these
// never happened.
module tb_solar_column;
  import solar_pkg::*;
  import tb_solar_ref_pkg::*;
  localparam int L = 16, K = 4, M = 4, P_K = L - 1;
  localparam int NPER = 40;

  logic clk = 0, rst_n = 0;
  logic shift_en, feed, write_win, period_wrap;
  logic [$clog2(3*L)-1:0] cnt;
  logic [$clog2(L)-1:0] pos;
  logic second_lap;
  node_cfg_t cfg [K];
  data_t din, dout;
  logic valid_in, valid_out;
  mode_e node_mode [K];
  logic [K-1:0] node_sel;
  int checks = 0, failures = 0;
  int n_writes = 0, n_conflict = 0, n_missing = 0;

  solar_timing #(.L(L), .M(M), .P_K(P_K)) u_t (.*);
  solar_column #(.L(L), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cnt %0d: got %0d expected %0d", what, cnt, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic node_cfg_t rand_cfg();
    node_cfg_t c;
    c.en     = ($urandom_range(0, 9) != 0);
    c.func   = func_e'($urandom_range(0, 6));
    c.slot_a = slot_t'(($urandom_range(0, 19) == 0) ? L + 2 : $urandom_range(0, L - 1));
    c.slot_b = slot_t'($urandom_range(0, L - 1));
    c.pre_a  = func_e'($urandom_range(0, 7));
    c.pre_b  = func_e'($urandom_range(0, 7));
    return c;
  endfunction

  int fed [NPER][L];
  int expct [];
  node_cfg_t cfgs [NPER][K];
  bit vin [NPER];

  initial begin
    int slots [];
    node_cfg_t cl [];
    int ci;
    slots = new[L];
    cl = new[K];
    din = '0; valid_in = 0;
    foreach (cfg[i]) cfg[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPER + 1; p++) begin
      // new period begins (cnt = 0)
      if (p < NPER) begin
        foreach (cfg[i]) begin cfg[i] = rand_cfg(); cfgs[p][i] = cfg[i]; end
        vin[p] = 1'($urandom_range(0, 1));
        valid_in = vin[p];
      end
      do begin
        ci = int'(cnt);
        if (shift_en && feed) begin
          // feed slot cnt of this period, check slot cnt of the last one
          if (p < NPER) begin
            fed[p][ci] = $urandom_range(0, 255);
            din = data_t'(fed[p][ci]);
          end
          if (p > 0) check("dout", int'(dout), expct[ci]);
        end
        if (shift_en && feed && cnt == 0 && p > 0) check("valid_out", int'(valid_out), int'(vin[p-1]));
        if (shift_en) begin
          for (int i = 0; i < K; i++) n_writes += node_sel[i];
        end
        @(negedge clk);
      end while (!(cnt == 0 && shift_en == 0 && u_t.mcnt == 0));
      // period p done: compute its expected output
      if (p < NPER) begin
        for (int s = 0; s < L; s++) slots[s] = fed[p][s];
        for (int i = 0; i < K; i++) cl[i] = cfgs[p][i];
        for (int i = 0; i < K; i++) begin
          if (cl[i].en && int'(cl[i].slot_a) >= L) n_missing++;
          for (int j = 0; j < i; j++)
            if (cl[i].en && cl[j].en && int'(cl[i].slot_a) < L && int'(cl[j].slot_a) < L &&
                (cl[i].slot_a == cl[j].slot_a ||
                 (is_binary(cl[j].func) && cl[i].slot_a == cl[j].slot_b)))
              n_conflict++;
        end
        ref_column(slots, cl, L);
        expct = slots;
      end
    end
    $display("writes=%0d conflicts=%0d missing_slots=%0d", n_writes, n_conflict, n_missing);
    checks++; if (n_writes == 0)   begin failures++; $display("FAIL no node wrote"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no write conflict happened"); end
    checks++; if (n_missing == 0)  begin failures++; $display("FAIL no missing slot happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
