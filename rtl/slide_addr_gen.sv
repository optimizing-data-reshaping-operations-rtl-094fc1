// slide_addr_gen: sliding-window read addresses, Slide<W,S> applied to an
// address counter and replaced by two counters and an adder.
//
// For an input of n elements at start, start+step, ... it emits the
// (n-W)/S+1 windows of W addresses each:
//   for k < repeat: for w < (n-W)/S+1: for e < W:
//     addr = start + w*S*step + e*step
// The outer window counter steps by S elements, the inner one walks the
// window; no shift register or window wiring is needed on the data. The
// outermost step-0 dimension repeats the whole sweep `repeat` times, which
// is how an input reused by an outer Map (one pass per output channel) is
// re-read without stalls.
//
// Interface: `start` latches the configuration; one address per cycle while
// `out_ready` is high; `out_win`, `out_elem`, `out_rep` give the window,
// element-in-window and repetition indices of the current address.
// The counter pair follows the document; the repeat dimension, the index
// outputs and the handshake are this design's choices.
module slide_addr_gen #(
  parameter int unsigned WIN    = 3,   // window size W
  parameter int unsigned STRIDE = 1,   // window step S
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] cfg_start,
  input  logic [ADDR_W-1:0] cfg_step,
  input  logic [CNT_W-1:0]  cfg_n,       // input length, >= WIN
  input  logic [CNT_W-1:0]  cfg_repeat,  // >= 1
  input  logic              out_ready,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  output logic [CNT_W-1:0]  out_win,
  output logic [CNT_W-1:0]  out_elem,
  output logic [CNT_W-1:0]  out_rep,
  output logic              out_win_last,
  output logic              out_last,
  output logic              done
);

  logic              fire;
  logic [CNT_W-1:0]  n_windows;
  logic [ADDR_W-1:0] p_win, p_elem, p_rep;
  logic              l_win, l_elem, l_rep;
  logic              w_win, w_elem, w_rep;

  assign fire      = out_valid && out_ready;
  assign n_windows = (cfg_n - CNT_W'(WIN)) / CNT_W'(STRIDE) + CNT_W'(1);

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_elem (
    .clk, .rst_n, .load(start),
    .cfg_start('0), .cfg_step(cfg_step), .cfg_count(CNT_W'(WIN)),
    .advance(fire), .restart(1'b0),
    .value(p_elem), .index(out_elem), .last(l_elem), .wrap(w_elem));

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_win (
    .clk, .rst_n, .load(start),
    .cfg_start(cfg_start), .cfg_step(cfg_step * ADDR_W'(STRIDE)),
    .cfg_count(n_windows),
    .advance(w_elem), .restart(1'b0),
    .value(p_win), .index(out_win), .last(l_win), .wrap(w_win));

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_rep (
    .clk, .rst_n, .load(start),
    .cfg_start('0), .cfg_step('0), .cfg_count(cfg_repeat),
    .advance(w_win), .restart(1'b0),
    .value(p_rep), .index(out_rep), .last(l_rep), .wrap(w_rep));

  assign out_addr     = p_win + p_elem;
  assign out_win_last = l_elem;
  assign out_last     = l_elem && l_win && l_rep;
  assign done         = fire && out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_valid <= 1'b0;
    else if (start)  out_valid <= 1'b1;
    else if (done)   out_valid <= 1'b0;
  end

  logic unused;
  assign unused = ^{p_rep, w_rep};

endmodule
