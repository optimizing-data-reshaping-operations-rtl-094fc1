// dot_prod: MapVec(Mul) over two zipped vectors followed by Reduce(Add).
//
// Each valid input cycle multiplies VEC pairs of signed 8-bit elements in
// parallel (one multiplier per element), sums the products and adds the sum
// to a running accumulator. The reduction spans a stream of input vectors:
// the vector flagged `in_last` closes it, its total appears on `out_sum`
// with `out_valid`, and the accumulator restarts at zero. A dot product of
// VEC*k elements therefore takes k input cycles, and a new one may start in
// the very next cycle.
//
// Timing: two register stages. Products are registered one cycle after the
// input; the sum is registered one cycle after that (latency 2, throughput
// one vector per cycle). The multiply/accumulate function follows the
// document's programs; the pipelining and accumulator width are choices of
// this design. The product sum is written as a loop; a synthesis tool
// balances it into an adder tree.
module dot_prod
  import reshape_pkg::*;
#(
  parameter int unsigned VEC = 2048
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_last,
  input  elem_t [VEC-1:0]     in_a,
  input  elem_t [VEC-1:0]     in_b,
  output logic                out_valid,
  output acc_t                out_sum
);

  localparam int unsigned PROD_W = 2 * ELEM_W;

  logic signed [PROD_W-1:0] prod_q [VEC];
  logic                     v1_q, last1_q;
  acc_t                     acc_q, tree;

  always_ff @(posedge clk) begin
    for (int i = 0; i < VEC; i++) begin
      if (in_valid) prod_q[i] <= PROD_W'($signed(in_a[i]) * $signed(in_b[i]));
    end
  end

  always_comb begin
    tree = '0;
    for (int i = 0; i < VEC; i++) tree = tree + acc_t'(prod_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      last1_q   <= 1'b0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      v1_q      <= in_valid;
      last1_q   <= in_last;
      out_valid <= 1'b0;
      if (v1_q) begin
        if (last1_q) begin
          out_sum   <= acc_q + tree;
          out_valid <= 1'b1;
          acc_q     <= '0;
        end else begin
          acc_q     <= acc_q + tree;
        end
      end
    end
  end

endmodule
