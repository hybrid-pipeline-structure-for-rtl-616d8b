// solar_column -- one column of the hybrid pipeline: a circulating shift
// register (the routing channel) with K processing nodes tapped into it.
//
// The channel has L stages ch[0..L-1] that all advance on shift_en. A switch
// at the top selects what enters ch[0]: the column input din (from the feeder
// or the previous column) while feed is high, otherwise ch[L-1], so the L
// slots circulate. Node i taps the channel at stage P_i = node_pos(i, L, K)
// (evenly spaced, 1..L-1, the last node at the bottom stage): it reads ch[P_i-1]
// and a 2:1 mux in front of ch[P_i] takes the node's result instead of
// ch[P_i-1] while the node raises sel.
//
// Because all nodes read during the first two laps and write only in the
// column write
// window that follows, every node of a column sees the data of the previous
// column (or of the inputs), never a result of its own column. If two nodes of
// a column write the same slot, the write that comes later in the write window
// stays: node i writes slot s in the window cycle congruent to s + P_i mod L.
//
// dout = ch[L-1] is the channel output towards the next column; during the feed
// lap of a period it carries the slots of the sample this column processed in
// the previous period, slot cnt in shift cycle cnt. valid_out tells whether the
// sample the column holds in the current period is real; it is taken from
// valid_in at period_wrap and handed on at the next period_wrap, at the same
// edge at which the sample starts to leave.
//
// The channel, the top switch with its feedback path and the register 1 /
// mux / register 2 tap follow the architecture; node placement, the valid
// bit and reset of the channel to zero are this design's choices.
module solar_column
  import solar_pkg::*;
#(
  parameter int L = 16,           // channel length = c * N
  parameter int K = 4             // nodes per column
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  node_cfg_t             cfg [K],
  input  logic                  shift_en,
  input  logic [$clog2(L)-1:0]  pos,
  input  logic                  second_lap,
  input  logic                  feed,
  input  logic                  write_win,
  input  logic                  period_wrap,
  input  data_t                 din,
  input  logic                  valid_in,
  output data_t                 dout,
  output logic                  valid_out,
  output mode_e                 node_mode [K],
  output logic [K-1:0]          node_sel
);

  data_t ch  [L];
  data_t nxt [L];
  data_t wdata [K];
  logic  col_valid;

  for (genvar i = 0; i < K; i++) begin : g_node
    localparam int PI = node_pos(i, L, K);
    slot_t tin_unused;
    data_t res_unused;
    solar_node #(.L(L), .P(PI)) u_node (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg         (cfg[i]),
      .shift_en    (shift_en),
      .pos         (pos),
      .feed        (feed),
      .second_lap  (second_lap),
      .write_win   (write_win),
      .period_wrap (period_wrap),
      .din         (ch[PI-1]),
      .sel         (node_sel[i]),
      .wdata       (wdata[i]),
      .tin         (tin_unused),
      .mode        (node_mode[i]),
      .result      (res_unused)
    );
  end

  always_comb begin
    nxt[0] = feed ? din : ch[L-1];
    for (int j = 1; j < L; j++) nxt[j] = ch[j-1];
    for (int i = 0; i < K; i++)
      if (node_sel[i]) nxt[node_pos(i, L, K)] = wdata[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L; j++) ch[j] <= '0;
      col_valid <= 1'b0;
    end else begin
      if (shift_en)
        for (int j = 0; j < L; j++) ch[j] <= nxt[j];
      if (period_wrap)
        col_valid <= valid_in;
    end
  end

  assign dout      = ch[L-1];
  assign valid_out = col_valid;

  initial begin
    assert (L >= 2 * K) else $error("solar_column: need at least two slots per node (L >= 2K)");
  end

endmodule
