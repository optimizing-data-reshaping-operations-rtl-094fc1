// conv_engine: tiled 3x3 2D convolution of a multi-channel 8-bit image tile.
//
// One tile is TILE_H rows of TILE_W pixels with CIN channels; one on-chip
// word holds a whole tile row (pixel-major, channel-minor). The engine
// produces, for each of the COUT output channels, the (TILE_H-K+1) x
// (TILE_W-K+1) valid-convolution results (stride 1, no padding).
//
//   LOAD     tile fetch: a two-counter address generator walks the TILE_H
//            rows inside the host image (row pitch in words) and the
//            responses fill the input buffer.
//   COMPUTE  the slide over rows is done on addresses: a slide address
//            generator emits, for every output row y, the K input rows
//            y..y+K-1, and repeats the whole sweep once per output channel
//            (the input is reused by the outer Map over weights). Each row
//            read (one cycle) is cut into TILE_W-K+1 overlapping windows of
//            K pixels x CIN channels (slide over columns, inside the word)
//            and fed to as many dot-product units, which multiply with the
//            weight row (channel, kernel row) read in the same cycle and
//            accumulate over the K rows. Every K cycles a full output row
//            of one channel leaves on the result port.
//
// Weights are written beforehand through the weight port: word
// co*K + i holds kernel row i of output channel co, K pixels x CIN channels.
//
// Timing: COMPUTE takes COUT * (TILE_H-K+1) * K cycles plus a 3-cycle tail;
// one input row per cycle, no stalls. The result port has no backpressure:
// the receiver must take a row whenever `res_valid` is high.
//
// Follows the document: image tile 128x128, 3x3 kernel, 3 input and 64
// output channels, 8-bit data, slide over rows moved onto the addresses,
// windows side by side feeding parallel dot products. This design's own
// choices: stride 1 and no padding, the row-per-word layout, weight port,
// host interface, 32-bit results.
module conv_engine
  import reshape_pkg::*;
#(
  parameter int unsigned TILE_W = 128,
  parameter int unsigned TILE_H = 128,
  parameter int unsigned CIN    = 3,
  parameter int unsigned COUT   = 64,
  parameter int unsigned K      = 3,
  localparam int unsigned WORD_W = TILE_W * CIN * ELEM_W,
  localparam int unsigned WIN_N  = K * CIN,            // elements per window row
  localparam int unsigned WROW_W = WIN_N * ELEM_W,
  localparam int unsigned OUT_W  = TILE_W - K + 1,
  localparam int unsigned OUT_H  = TILE_H - K + 1,
  localparam int unsigned WA_W   = $clog2(COUT * K),
  localparam int unsigned OR_W   = $clog2(OUT_H),
  localparam int unsigned CH_W   = (COUT > 1) ? $clog2(COUT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [31:0]       cmd_base,       // host word address of tile row 0
  input  logic [31:0]       cmd_row_pitch,  // host words per image row
  // weights
  input  logic              w_wr_en,
  input  logic [WA_W-1:0]   w_wr_addr,
  input  logic [WROW_W-1:0] w_wr_data,
  // host memory reads
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [31:0]       mem_req_addr,
  input  logic              mem_rsp_valid,
  input  logic [WORD_W-1:0] mem_rsp_data,
  // result rows
  output logic              res_valid,
  output logic [CH_W-1:0]   res_ch,
  output logic [OR_W-1:0]   res_row,
  output acc_t [OUT_W-1:0]  res_data,
  output phase_e            phase
);

  localparam int unsigned IA_W = $clog2(TILE_H);
  localparam int unsigned TAG_W = 1 + 1 + OR_W + CH_W;

  phase_e phase_q;
  assign phase     = phase_q;
  assign cmd_ready = (phase_q == PH_IDLE);

  // ---------------- tile fetch -----------------
  logic            cmd_fire, load_done, comp_start;
  logic [IA_W-1:0] wcnt_q;
  logic            f_inner_last, f_last, f_done;   // status outputs not needed here

  assign cmd_fire   = cmd_valid && cmd_ready;
  assign load_done  = mem_rsp_valid && (phase_q == PH_LOAD_A) &&
                      (wcnt_q == IA_W'(TILE_H - 1));
  assign comp_start = load_done;

  transpose_addr_gen #(.ADDR_W(32), .CNT_W(32)) u_fetch (
    .clk, .rst_n, .start(cmd_fire),
    .cfg_base(cmd_base), .cfg_outer_step(cmd_row_pitch),
    .cfg_outer_count(32'(TILE_H)),
    .cfg_inner_step(32'd1), .cfg_inner_count(32'd1),
    .out_ready(mem_req_ready), .out_valid(mem_req_valid), .out_addr(mem_req_addr),
    .out_inner_last(f_inner_last), .out_last(f_last), .done(f_done));

  // ---------------- input rows by sliding addresses -----------------
  logic        s_valid, s_win_last, s_last, s_done;
  logic [31:0] s_addr, s_win, s_elem, s_rep;

  slide_addr_gen #(.WIN(K), .STRIDE(1), .ADDR_W(32), .CNT_W(32)) u_slide (
    .clk, .rst_n, .start(comp_start),
    .cfg_start('0), .cfg_step(32'd1),
    .cfg_n(32'(TILE_H)), .cfg_repeat(32'(COUT)),
    .out_ready(1'b1), .out_valid(s_valid), .out_addr(s_addr),
    .out_win(s_win), .out_elem(s_elem), .out_rep(s_rep),
    .out_win_last(s_win_last), .out_last(s_last), .done(s_done));

  logic              r_valid;
  logic [WORD_W-1:0] r_data;
  logic [TAG_W-1:0]  r_tag;

  vec_ram #(.DEPTH(TILE_H), .WIDTH(WORD_W), .TAG_W(TAG_W)) u_inbuf (
    .clk, .rst_n,
    .wr_en(mem_rsp_valid && phase_q == PH_LOAD_A), .wr_addr(wcnt_q),
    .wr_data(mem_rsp_data),
    .rd_valid(s_valid), .rd_addr(IA_W'(s_addr)),
    .rd_tag({s_last, s_win_last, OR_W'(s_win), CH_W'(s_rep)}),
    .rsp_valid(r_valid), .rsp_data(r_data), .rsp_tag(r_tag));

  // Weight row of (channel, kernel row), read in step with the input row.
  logic [WROW_W-1:0] w_mem [COUT * K];
  logic [WROW_W-1:0] w_row;

  always_ff @(posedge clk) begin
    if (w_wr_en) w_mem[w_wr_addr] <= w_wr_data;
    if (s_valid) w_row <= w_mem[WA_W'(s_rep * 32'(K) + s_elem)];
  end

  // ---------------- windows side by side, parallel dot products ---------
  logic [OUT_W-1:0] dp_valid;
  acc_t [OUT_W-1:0] dp_sum;

  for (genvar x = 0; x < OUT_W; x++) begin : g_win
    dot_prod #(.VEC(WIN_N)) u_dp (
      .clk, .rst_n,
      .in_valid(r_valid), .in_last(r_tag[TAG_W-2]),
      .in_a(r_data[x*CIN*ELEM_W +: WROW_W]), .in_b(w_row),
      .out_valid(dp_valid[x]), .out_sum(dp_sum[x]));
  end

  // The dot products take two cycles; carry the row tag along.
  logic [TAG_W-1:0] tag1_q, tag2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1_q <= '0;
      tag2_q <= '0;
    end else begin
      if (r_valid) tag1_q <= r_tag;
      tag2_q <= tag1_q;
    end
  end

  assign res_valid = dp_valid[0];
  assign res_data  = dp_sum;
  assign res_row   = tag2_q[CH_W +: OR_W];
  assign res_ch    = tag2_q[CH_W-1:0];

  // ---------------- sequencing -----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      wcnt_q  <= '0;
    end else begin
      if (mem_rsp_valid && phase_q == PH_LOAD_A)
        wcnt_q <= load_done ? '0 : wcnt_q + IA_W'(1);
      unique case (phase_q)
        PH_IDLE:    if (cmd_valid) phase_q <= PH_LOAD_A;
        PH_LOAD_A:  if (load_done) phase_q <= PH_COMPUTE;
        PH_COMPUTE: if (res_valid && tag2_q[TAG_W-1]) phase_q <= PH_IDLE;
        default:    phase_q <= PH_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{f_inner_last, f_last, f_done, s_done, s_addr[31:IA_W], s_win[31:OR_W], s_elem, s_rep, dp_valid[OUT_W-1:1]};

endmodule
