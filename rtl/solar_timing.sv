// solar_timing -- shared timing controller of the hybrid pipeline.
//
// The nodes run on a fast clock (clk, one period = one node cycle); the
// routing channel advances once every M node cycles. Instead of a second,
// divided clock this controller produces shift_en, a one-node-cycle strobe on
// which every channel register of every column moves by one stage, so the
// whole array stays in a single clock domain.
//
// One pipeline period is (3+XL)L shift cycles, 3L in the normal case XL = 0.
// cnt counts the shift strobes already taken in the current period; pos =
// cnt mod L is kept alongside so that no node has to divide:
//   cnt 0 .. L-1                 feed=1: the switch at the top of each column
//                                takes new data; nodes read
//   cnt L .. 2L-1                second_lap=1: the channel circulates, nodes
//                                finish reading
//   cnt (1+XL)L+P_K .. (2+XL)L+P_K-1
//                                write_win=1: nodes write results
//   rest                         idle, channel still circulating
// XL extra laps are inserted before the write window for nodes whose reading
// plus computing does not fit into L shift cycles; each adds L shift cycles
// to the period. period_wrap marks the node cycle whose shift strobe ends the
// period; at that edge every column hands its contents on and a new sample
// enters. All columns share one period counter because a column's contents
// leave it in slot order exactly when the next sample enters (the pipeline
// delay between columns is one period).
//
// The period structure (feed for L cycles, write from L+P_k to 2L+P_k, next
// feed at 3L, extra L-cycle laps for long processing) follows the
// architecture; the clock-enable in place of a second clock and the counter
// split are this design's choices. Reset is asynchronous, active low, and
// starts a period at cnt 0.
module solar_timing #(
  parameter int L   = 16,        // channel length (slots) = c * N
  parameter int M   = 10,        // node cycles per shift cycle
  parameter int P_K = L - 1,     // tap position of the last node of a column
  parameter int XL  = 0          // extra laps for processing
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic                          shift_en,
  output logic [$clog2((3+XL)*L)-1:0]   cnt,
  output logic [$clog2(L)-1:0]          pos,
  output logic                          feed,
  output logic                          second_lap,
  output logic                          write_win,
  output logic                          period_wrap
);

  localparam int PL = (3 + XL) * L;        // period length in shift cycles
  localparam int CW = $clog2(PL);
  localparam int MW = (M > 1) ? $clog2(M) : 1;
  localparam int PW = $clog2(L);

  logic [MW-1:0] mcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcnt <= '0;
      cnt  <= '0;
      pos  <= '0;
    end else begin
      mcnt <= (mcnt == MW'(M - 1)) ? '0 : mcnt + 1'b1;
      if (shift_en) begin
        cnt <= (cnt == CW'(PL - 1)) ? '0 : cnt + 1'b1;
        pos <= (pos == PW'(L - 1) || cnt == CW'(PL - 1)) ? '0 : pos + 1'b1;
      end
    end
  end

  assign shift_en    = (mcnt == MW'(M - 1));
  assign feed        = (cnt < CW'(L));
  assign second_lap  = (cnt >= CW'(L)) && (cnt < CW'(2 * L));
  assign write_win   = (cnt >= CW'((1 + XL) * L + P_K)) && (cnt < CW'((2 + XL) * L + P_K));
  assign period_wrap = shift_en && (cnt == CW'(PL - 1));

  initial begin
    assert (M >= 4) else $error("solar_timing: M must be at least 4 node cycles per shift");
    assert (P_K >= 1 && P_K < L) else $error("solar_timing: P_K must lie in 1..L-1");
    assert (XL >= 0) else $error("solar_timing: XL must not be negative");
  end

endmodule
