// solar_node -- one processing node (neuron) attached to a column's channel.
//
// The node taps the channel at stage P: it sees the output of channel stage
// P-1 ("register 1", din) and can replace the value entering stage P
// ("register 2") by raising sel and presenting wdata to the 2:1 mux in front
// of that stage. The "soft" connection of the network is nothing but the slot
// numbers in cfg: the node reads the slots it is told to and overwrites the
// same slots with its result, so no routing wires are configured.
//
// Timing information comes from the shared controller. The slot passing the
// tap in the current shift cycle is tin = (pos - P) mod L. Over one period of
// 3L shift cycles the node goes through the four modes:
//   IDLE   until its read window opens at cnt = P;
//   READ   cnt P .. L+P-1, every slot passes once: on each shift strobe whose
//          slot matches cfg.slot_a (and, for add/sub, cfg.slot_b) the data is
//          captured;
//   PROC   once all operands are in, the result is registered one node
//          cycle later: each operand passes its input function (cfg.pre_a,
//          cfg.pre_b), the node function (cfg.func) combines them. The node
//          then waits for the column write
//          window (cnt L+P_k .. 2L+P_k-1, later by XL laps if the timing
//          controller inserts extra processing laps);
//   WRITE  sel is raised during the shift strobe of each matching slot, so the
//          result replaces the slot's data on its way to stage P;
//   back to IDLE when the write window closes, and in any case at
//   period_wrap. A node whose slots never arrive stays in READ and writes
//   nothing in that period. A disabled node (cfg.en = 0) stays IDLE.
// The node needs a few node cycles between the last read and the first write
// (M >= 4 node cycles per shift cycle).
//
// The modes, the read/write-back of the same slots and the write window follow
// the architecture; so do the input functions, which correspond to the
// function names drawn on the connections into a node in the published
// example network; a fixed-function controller with the solar_alu stands in
// for the node's program processor, which is this design's choice.
module solar_node
  import solar_pkg::*;
#(
  parameter int L = 16,           // channel length
  parameter int P = 3             // tap position, 1..L-1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  node_cfg_t               cfg,
  input  logic                    shift_en,
  input  logic [$clog2(L)-1:0]    pos,
  input  logic                    feed,
  input  logic                    second_lap,
  input  logic                    write_win,
  input  logic                    period_wrap,
  input  data_t                   din,
  output logic                    sel,
  output data_t                   wdata,
  output slot_t                   tin,
  output mode_e                   mode,
  output data_t                   result
);

  localparam int PW = $clog2(L);

  logic [PW-1:0] slot;
  logic          rd_win;
  logic          bin;
  logic          got_a, got_b, ops_done, res_valid;
  logic          hit_a, hit_b;
  data_t         op_a, op_b, pre_y_a, pre_y_b, alu_y;

  always_comb begin
    if (pos >= PW'(P)) slot = pos - PW'(P);
    else               slot = PW'(32'(pos) + L - P);
  end
  assign tin    = SLOT_W'(slot);
  assign rd_win = (feed && (pos >= PW'(P))) || (second_lap && (pos < PW'(P)));
  assign bin    = is_binary(cfg.func);
  assign hit_a  = (tin == cfg.slot_a);
  assign hit_b  = bin && (tin == cfg.slot_b);
  assign ops_done = got_a && (got_b || !bin);

  // each operand first passes its input function, then the node function
  solar_alu u_pre_a (
    .func (pre_fn(cfg.pre_a)),
    .a    (op_a),
    .b    ('0),
    .y    (pre_y_a)
  );

  solar_alu u_pre_b (
    .func (pre_fn(cfg.pre_b)),
    .a    (op_b),
    .b    ('0),
    .y    (pre_y_b)
  );

  solar_alu u_alu (
    .func (cfg.func),
    .a    (pre_y_a),
    .b    (pre_y_b),
    .y    (alu_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_IDLE;
      got_a     <= 1'b0;
      got_b     <= 1'b0;
      res_valid <= 1'b0;
      op_a      <= '0;
      op_b      <= '0;
      result    <= '0;
    end else if (period_wrap) begin
      mode      <= MODE_IDLE;
      got_a     <= 1'b0;
      got_b     <= 1'b0;
      res_valid <= 1'b0;
    end else begin
      if (shift_en && rd_win && cfg.en) begin
        if (hit_a && !got_a) begin
          op_a  <= din;
          got_a <= 1'b1;
        end
        if (hit_b && !got_b) begin
          op_b  <= din;
          got_b <= 1'b1;
        end
      end
      unique case (mode)
        MODE_IDLE:  if (cfg.en && rd_win && !res_valid) mode <= MODE_READ;
        MODE_READ:  if (ops_done) mode <= MODE_PROC;
        MODE_PROC: begin
          if (!res_valid) begin
            result    <= alu_y;
            res_valid <= 1'b1;
          end else if (write_win) begin
            mode <= MODE_WRITE;
          end
        end
        MODE_WRITE: if (!write_win) mode <= MODE_IDLE;
        default:    mode <= MODE_IDLE;
      endcase
    end
  end

  assign sel   = (mode == MODE_WRITE) && write_win && (hit_a || hit_b);
  assign wdata = result;

  // A node only drives the channel with a computed result, inside the window.
  a_write_rule: assert property (@(posedge clk) disable iff (!rst_n)
                                 sel |-> (res_valid && write_win && cfg.en))
    else $error("solar_node: channel written outside the write window or without a result");

  initial begin
    assert (P >= 1 && P < L) else $error("solar_node: P must lie in 1..L-1");
  end

endmodule
