// solar_feeder -- input data copier in front of the first column.
//
// A sample of N data items is fed to the first column as a stream of L = C*N
// channel slots: item 0 is repeated C times (the copy ratio), then item 1,
// and so on, so slot s carries item s div C. Repetition gives the nodes
// several copies of every input, so one node can overwrite a copy with its
// result while later columns can still read the original input.
//
// Interface: a sample is offered with in_valid/in_data and taken when
// in_ready (a one-sample holding buffer is empty); once offered it must be
// held unchanged until taken (checked by assertions). At period_wrap the held
// sample (or, if none is held, a sample offered in that cycle) becomes the
// active one and is streamed during the next feed lap, one
// item copy per shift strobe (feed && shift_en). If no sample was waiting, the
// period carries a bubble: feed_valid is low and zeros are fed.
// load_valid, read at period_wrap, tells whether the period that starts
// there will carry a sample; the first column takes its valid bit from it.
// feed_data is valid combinationally in every node cycle of the feed lap.
//
// Item repetition and L = c x N follow the architecture; the holding buffer,
// the valid/ready handshake and bubble insertion are this design's choices.
module solar_feeder
  import solar_pkg::*;
#(
  parameter int N = 4,           // data items per sample
  parameter int C = 4            // copy ratio
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift_en,
  input  logic  feed,
  input  logic  period_wrap,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t in_data [N],
  output data_t feed_data,
  output logic  feed_valid,
  output logic  load_valid
);

  localparam int IW = $clog2(N + 1);
  localparam int CPW = (C > 1) ? $clog2(C) : 1;

  data_t          buf_q [N];
  logic           buf_valid;
  data_t          act_q [N];
  logic           act_valid;
  logic [IW-1:0]  idx;
  logic [CPW-1:0] cpy;

  assign in_ready = !buf_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0;
      act_valid <= 1'b0;
      idx       <= '0;
      cpy       <= '0;
      for (int i = 0; i < N; i++) begin
        buf_q[i] <= '0;
        act_q[i] <= '0;
      end
    end else begin
      if (period_wrap) begin
        // the held sample, or one offered in this very cycle, becomes active
        act_valid <= buf_valid || in_valid;
        for (int i = 0; i < N; i++)
          act_q[i] <= buf_valid ? buf_q[i] : (in_valid ? in_data[i] : '0);
        buf_valid <= 1'b0;
        idx       <= '0;
        cpy       <= '0;
      end else begin
        if (in_valid && in_ready) begin
          buf_q     <= in_data;
          buf_valid <= 1'b1;
        end
        if (shift_en && feed && idx < IW'(N)) begin
          if (cpy == CPW'(C - 1)) begin
            cpy <= '0;
            idx <= idx + 1'b1;
          end else begin
            cpy <= cpy + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    feed_data = '0;
    for (int i = 0; i < N; i++)
      if (idx == IW'(i)) feed_data = act_q[i];
  end
  // Handshake rule for the source: an offered sample stays offered, unchanged,
  // until it is taken.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 (in_valid && !in_ready) |=> in_valid)
    else $error("solar_feeder: in_valid dropped before the sample was taken");
  for (genvar i = 0; i < N; i++) begin : g_hold
    a_hold_data: assert property (@(posedge clk) disable iff (!rst_n)
                                  (in_valid && !in_ready) |=> (in_data[i] == $past(in_data[i])))
      else $error("solar_feeder: in_data changed before the sample was taken");
  end

  assign feed_valid = act_valid;
  assign load_valid = buf_valid || in_valid;

endmodule
