// solar_array -- self-organizing learning array built as a hybrid pipeline.
//
// COLS columns of K nodes each are chained by their routing channels: the
// feeder turns each N-item input sample into L = C*N slots (every item
// repeated C times) and shifts them into column 1; at the end of every
// period of 3L shift cycles (plus XL*L if extra processing laps are set) each
// column shifts its processed contents into
// the next column while taking the next sample from its predecessor. Inside a
// period a column's channel first fills (lap 0), then circulates; its nodes
// read their configured slots, compute, and write their results back into
// the same slots. A sample therefore spends one period in every column, the
// pipeline delay per column is one period, and COLS samples are in flight
// at once. The connections between nodes are the slot numbers in node_cfg, so
// they can be changed at any time without touching any wiring.
//
// Interface
//   in_valid/in_ready/in_data  one N-item sample; taken when in_ready is high,
//                              at most one per period (3L*M clk cycles).
//   node_cfg[col][row]         per-node enable, function and slots; sampled
//                              continuously, change it between samples.
//   out_valid/out_slot/out_data  the L slots of a finished sample leave the
//                              last column one per shift cycle during the feed
//                              lap, COLS periods after the sample entered
//                              column 1 (3L*COLS shift cycles at XL = 0).
//                              out_valid is a
//                              one-clk pulse per slot.
//   node_mode, node_sel        working mode and channel-write strobe of every
//                              node, for observation.
//   shift_en, phase            the channel shift strobe and the shift cycle
//                              within the period (0..(3+XL)L-1).
//   feed_active                a real sample is entering column 1 (feed lap
//                              of a period that is not a bubble).
// The shift register advances once every M clk cycles (see solar_timing).
//
// The column chain, the top switch and the per-column period follow the
// architecture; the defaults N=4 items, K=4 rows, COLS=3 columns are the
// 4x3 Iris-data configuration; C=4 and M=10 are this design's choices. XL
// (default 0) inserts the architecture's extra L-cycle laps for nodes whose
// reading and computing take longer than L shift cycles; the fixed-function
// nodes here never need them.
module solar_array
  import solar_pkg::*;
#(
  parameter int N    = 4,         // data items per input sample
  parameter int C    = 4,         // copy ratio
  parameter int K    = 4,         // nodes per column (rows)
  parameter int COLS = 3,         // columns
  parameter int M    = 10,        // node cycles per shift cycle
  parameter int XL   = 0          // extra processing laps per period
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  data_t                 in_data [N],
  input  node_cfg_t             node_cfg [COLS][K],
  output logic                  out_valid,
  output slot_t                 out_slot,
  output data_t                 out_data,
  output mode_e                 node_mode [COLS][K],
  output logic [K-1:0]          node_sel [COLS],
  output logic                  shift_en,
  output logic                  feed_active,
  output logic [$clog2((3+XL)*C*N)-1:0] phase
);

  localparam int L   = C * N;
  localparam int P_K = node_pos(K - 1, L, K);

  logic                  feed, write_win, period_wrap;
  logic [$clog2(L)-1:0]  pos;
  logic                  second_lap;

  solar_timing #(.L(L), .M(M), .P_K(P_K), .XL(XL)) u_timing (
    .clk         (clk),
    .rst_n       (rst_n),
    .shift_en    (shift_en),
    .cnt         (phase),
    .pos         (pos),
    .feed        (feed),
    .second_lap  (second_lap),
    .write_win   (write_win),
    .period_wrap (period_wrap)
  );

  data_t feed_data;
  logic  feed_valid, load_valid;

  solar_feeder #(.N(N), .C(C)) u_feeder (
    .clk         (clk),
    .rst_n       (rst_n),
    .shift_en    (shift_en),
    .feed        (feed),
    .period_wrap (period_wrap),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_data     (in_data),
    .feed_data   (feed_data),
    .feed_valid  (feed_valid),
    .load_valid  (load_valid)
  );

  // Routing channel between columns: chan[c] enters column c.
  data_t chan  [COLS+1];
  logic  chval [COLS+1];

  assign chan[0]  = feed_data;
  assign chval[0] = load_valid;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    solar_column #(.L(L), .K(K)) u_col (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg         (node_cfg[c]),
      .shift_en    (shift_en),
      .pos         (pos),
      .second_lap  (second_lap),
      .feed        (feed),
      .write_win   (write_win),
      .period_wrap (period_wrap),
      .din         (chan[c]),
      .valid_in    (chval[c]),
      .dout        (chan[c+1]),
      .valid_out   (chval[c+1]),
      .node_mode   (node_mode[c]),
      .node_sel    (node_sel[c])
    );
  end

  // The last column's sample leaves during the feed lap that follows it.
  logic out_period_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           out_period_valid <= 1'b0;
    else if (period_wrap) out_period_valid <= chval[COLS];
  end

  assign feed_active = feed_valid && feed;
  assign out_valid = out_period_valid && feed && shift_en;
  assign out_slot  = SLOT_W'(pos);
  assign out_data  = chan[COLS];

endmodule
