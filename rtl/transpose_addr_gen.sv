// transpose_addr_gen: transposed (or tiled) 2D read addresses from two
// counters and an adder.
//
// Emits, for p1 in the outer sequence and p2 in the inner sequence,
//   addr = p1 + p2,  p1 = base + i*outer_step (i < outer_count),
//                    p2 = j*inner_step        (j < inner_count).
// With outer_step = 1, outer_count = N, inner_step = N, inner_count = M it
// reads an M x N row-major matrix column by column, i.e. its transpose,
// without any permutation network on the data. With outer_step = row pitch
// and inner_step = 1 it fetches a tile of a larger matrix, which is what a
// tiling expression reduces to once its transpositions are moved onto the
// counters. One address per cycle while `out_ready` is high.
//
// The two-counter-plus-adder structure follows the document; runtime
// configuration and the valid/ready handshake are this design's choices.
module transpose_addr_gen #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic [ADDR_W-1:0] cfg_outer_step,
  input  logic [CNT_W-1:0]  cfg_outer_count,
  input  logic [ADDR_W-1:0] cfg_inner_step,
  input  logic [CNT_W-1:0]  cfg_inner_count,
  input  logic              out_ready,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  output logic              out_inner_last,
  output logic              out_last,
  output logic              done
);

  logic              fire;
  logic [ADDR_W-1:0] p1, p2;
  logic [CNT_W-1:0]  i1, i2;
  logic              last1, last2, wrap1, wrap2;

  assign fire = out_valid && out_ready;

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_inner (
    .clk, .rst_n, .load(start),
    .cfg_start('0), .cfg_step(cfg_inner_step), .cfg_count(cfg_inner_count),
    .advance(fire), .restart(1'b0),
    .value(p2), .index(i2), .last(last2), .wrap(wrap2));

  stream_counter #(.VAL_W(ADDR_W), .CNT_W(CNT_W)) u_outer (
    .clk, .rst_n, .load(start),
    .cfg_start(cfg_base), .cfg_step(cfg_outer_step), .cfg_count(cfg_outer_count),
    .advance(wrap2), .restart(1'b0),
    .value(p1), .index(i1), .last(last1), .wrap(wrap1));

  assign out_addr       = p1 + p2;
  assign out_inner_last = last2;
  assign out_last       = last1 && last2;
  assign done           = fire && out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_valid <= 1'b0;
    else if (start)  out_valid <= 1'b1;
    else if (done)   out_valid <= 1'b0;
  end

  logic unused;
  assign unused = ^{i1, i2, wrap1};

endmodule
