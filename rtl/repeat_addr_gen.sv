// repeat_addr_gen: 2D address counter with the row repetition folded into it.
//
// Emits the addresses of a matrix row by row, each row `cfg_repeat` times in a
// row before the next row starts:
//   for r in 0..rows-1: for k in 0..repeat-1: for c in 0..cols-1:
//     addr = base + r*row_step + c
// This is Read o MapStm(Repeat<N>) o Split<N> o Counter after the repeat has
// been moved next to the counter: the repeat logic sits in the same pipeline
// stage as the counter, so when the last address of a row is taken the row
// counter is told in the same cycle whether to go back to the row start
// (`repeat_row`) or move on. No cycle is lost: one valid address per cycle
// while `out_ready` is high.
//
// Built from three chained stream_counter dimensions: columns (step 1), a
// repeat dimension with step 0, and rows (step row_step).
//
// Interface: `start` latches the configuration; `out_valid` rises the next
// cycle and stays high until the transfer flagged `out_last` is taken
// (valid && ready). `done` pulses with that transfer. The configuration ports
// and the valid/ready handshake are this design's choices.
module repeat_addr_gen #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic [ADDR_W-1:0] cfg_row_step,
  input  logic [CNT_W-1:0]  cfg_rows,
  input  logic [CNT_W-1:0]  cfg_cols,
  input  logic [CNT_W-1:0]  cfg_repeat,
  input  logic              out_ready,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  output logic              out_row_last,  // last address of one row pass
  output logic              out_last,      // very last address
  output logic              repeat_row,    // row start is revisited next
  output logic              done
);

  logic             fire;
  logic [ADDR_W-1:0] col_v, rep_v, row_v;
  logic [CNT_W-1:0]  col_i, rep_i, row_i;
  logic             col_last, rep_last, row_last;
  logic             col_wrap, rep_wrap, row_wrap;

  assign fire = out_valid && out_ready;

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_col (
    .clk, .rst_n, .load(start),
    .cfg_start('0), .cfg_step(ADDR_W'(1)), .cfg_count(cfg_cols),
    .advance(fire), .restart(1'b0),
    .value(col_v), .index(col_i), .last(col_last), .wrap(col_wrap));

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_rep (
    .clk, .rst_n, .load(start),
    .cfg_start('0), .cfg_step('0), .cfg_count(cfg_repeat),
    .advance(col_wrap), .restart(1'b0),
    .value(rep_v), .index(rep_i), .last(rep_last), .wrap(rep_wrap));

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_row (
    .clk, .rst_n, .load(start),
    .cfg_start(cfg_base), .cfg_step(cfg_row_step), .cfg_count(cfg_rows),
    .advance(rep_wrap), .restart(1'b0),
    .value(row_v), .index(row_i), .last(row_last), .wrap(row_wrap));

  assign out_addr     = row_v + col_v;
  assign out_row_last = col_last;
  assign out_last     = col_last && rep_last && row_last;
  assign repeat_row   = col_wrap && !rep_last;
  assign done         = fire && out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_valid <= 1'b0;
    else if (start)  out_valid <= 1'b1;
    else if (done)   out_valid <= 1'b0;
  end

  // Unused parts of the counter outputs (values of the step-0 dimension,
  // indices, the outermost wrap) are left open on purpose.
  logic unused;
  assign unused = ^{rep_v, col_i, rep_i, row_i, row_wrap};

endmodule
