// tb_solar_node -- single-node read/write test, after the architecture's
// single-node experiment: the node reads slots 4 and 5 (values 47 and 57),
// performs the modified add and must write 51 into slots 4 and 5 when they
// pass it again.
//
// The node sits at tap P = 3 of a 16-slot channel (M = 10 node cycles per
// shift cycle, P_k = 15), driven by the shared timing controller. The
// testbench plays the channel: in every shift cycle it presents on din the
// value of the slot passing the tap, slot s holding 10*s+7 (so slot 6 holds
// 67). It checks in every node cycle the slot number tin, the node mode
// (idle before cnt = P, reading until its operands are in, processing,
// writing only inside [L+P_k, 2L+P_k), leaving that mode one node cycle
// after the window closes), and at every shift strobe whether sel
// is raised exactly for the slots read and with which result. Four periods
// are run: add on slots 4/5, log on slot 9, add on slots 4/5 with the input
// functions log and half on its operands, and a disabled node.
module tb_solar_node;
  import solar_pkg::*;
  import tb_solar_ref_pkg::*;
  localparam int L = 16, M = 10, P = 3, P_K = 15;

  logic clk = 0, rst_n = 0;
  logic shift_en, feed, write_win, period_wrap;
  logic [$clog2(3*L)-1:0] cnt;
  logic [$clog2(L)-1:0] pos;
  logic second_lap;
  node_cfg_t cfg;
  data_t din, wdata, result;
  slot_t tin;
  logic sel;
  mode_e mode;
  int checks = 0, failures = 0;

  solar_timing #(.L(L), .M(M), .P_K(P_K)) u_t (.*);
  solar_node #(.L(L), .P(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cnt %0d: got %0d expected %0d", what, cnt, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_slot;
  assign exp_slot = (int'(cnt) - P + 3 * L) % L;
  assign din = data_t'(10 * exp_slot + 7);

  // one period with configuration c, expected result r, expected write count
  task automatic run_period(node_cfg_t c, int r, int nwrites);
    int writes = 0;
    bit prev_win = 0;
    cfg = c;
    do begin
      prev_win = write_win;
      @(negedge clk);
      check("tin", int'(tin), exp_slot);
      if (int'(cnt) < P) check("idle before P", int'(mode), int'(MODE_IDLE));
      if (!c.en) check("disabled idle", int'(mode), int'(MODE_IDLE));
      if (mode == MODE_WRITE) begin
        checks++;
        if (!write_win && !prev_win) begin failures++; $display("FAIL write mode outside window at cnt %0d", cnt); end
      end
      if (shift_en) begin
        if (sel) begin
          writes++;
          check("write in window", int'(write_win), 1);
          checks++;
          if (!(exp_slot == int'(c.slot_a) || (is_binary(c.func) && exp_slot == int'(c.slot_b)))) begin
            failures++; $display("FAIL write to slot %0d", exp_slot);
          end
          check("written value", int'(wdata), r);
        end
      end
      if (write_win && c.en) check("result ready for writing", int'(result), r);
    end while (!period_wrap);
    check("writes per period", writes, nwrites);
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_period('{en: 1'b1, func: FN_ADD, pre_a: FN_IDENT, pre_b: FN_IDENT,
                 slot_a: 8'd4, slot_b: 8'd5}, 51, 2);
    run_period('{en: 1'b1, func: FN_LOG, pre_a: FN_IDENT, pre_b: FN_IDENT,
                 slot_a: 8'd9, slot_b: 8'd0}, ref_alu(FN_LOG, 97, 0), 1);
    // input functions: log(47)/2 + half(57)/2
    run_period('{en: 1'b1, func: FN_ADD, pre_a: FN_LOG, pre_b: FN_HALF,
                 slot_a: 8'd4, slot_b: 8'd5},
               ref_alu(FN_ADD, ref_alu(FN_LOG, 47, 0), ref_alu(FN_HALF, 57, 0)), 2);
    run_period('{en: 1'b0, func: FN_ADD, pre_a: FN_IDENT, pre_b: FN_IDENT,
                 slot_a: 8'd1, slot_b: 8'd2}, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
