// stream_counter: one dimension of an address counter, Counter<C0, CS, n>.
//
// Produces the sequence C0, C0+CS, ..., C0+(n-1)*CS. The current value is
// always visible on `value`; `advance` consumes it. After the last value the
// counter wraps back to C0 and pulses `wrap`, which is how nested dimensions
// are chained: the wrap of an inner dimension is the advance of the next
// outer one. `restart` returns the dimension to C0 without a wrap (the
// "reset 1st dimension" signal of the repeat logic); it has priority.
// A step of 0 turns the dimension into a pure repeat count.
//
// Interface: `load` latches start/step/count (count >= 1) and shows the first
// value in the next cycle. Everything is registered; `last` and `wrap` are
// combinational from the state and `advance`.
//
// The counter primitive (initial value, step, length) follows the document;
// the count-based length, wrap-around chaining and restart port are this
// design's choices.
module stream_counter #(
  parameter int unsigned VAL_W = 32,   // width of the produced value
  parameter int unsigned CNT_W = 32    // width of the length / index
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [VAL_W-1:0] cfg_start,
  input  logic [VAL_W-1:0] cfg_step,
  input  logic [CNT_W-1:0] cfg_count,
  input  logic             advance,
  input  logic             restart,
  output logic [VAL_W-1:0] value,
  output logic [CNT_W-1:0] index,
  output logic             last,
  output logic             wrap
);

  logic [VAL_W-1:0] start_q, step_q;
  logic [CNT_W-1:0] count_q;

  assign last = (index == count_q - CNT_W'(1));
  assign wrap = advance && last && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= '0;
      step_q  <= '0;
      count_q <= CNT_W'(1);
      value   <= '0;
      index   <= '0;
    end else if (load) begin
      start_q <= cfg_start;
      step_q  <= cfg_step;
      count_q <= cfg_count;
      value   <= cfg_start;
      index   <= '0;
    end else if (restart || (advance && last)) begin
      value   <= start_q;
      index   <= '0;
    end else if (advance) begin
      value   <= value + step_q;
      index   <= index + CNT_W'(1);
    end
  end

endmodule
