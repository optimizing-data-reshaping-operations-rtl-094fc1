// mxm_engine: tiled matrix multiplication C += A x B^T on one tile pair.
//
// Operands arrive from host memory row by row: a TM x TK tile of A and a
// TN x TK tile of B stored transposed (row j of the B tile is column j of B).
// One command runs three phases:
//   LOAD_A / LOAD_B  tile fetch. A two-counter address generator walks the
//                    tile inside the larger matrix (row pitch, words per row)
//                    and the responses fill the on-chip buffers.
//   COMPUTE          every row of A is paired with every row of B. Instead
//                    of repeating data, the address generators repeat
//                    addresses: A's generator emits each row of A TN times,
//                    B's generator emits the whole B tile TM times. Both run
//                    in lockstep, one address pair per cycle, without stalls,
//                    into the buffers (one-cycle read) and the dot-product
//                    unit of VEC multipliers. Each finished dot product is
//                    written into the on-chip C tile, either replacing it or
//                    added to it (accumulation over the k-tiles of a row of
//                    tiles).
//   DRAIN            optional: the C tile is streamed out, one element per
//                    accepted cycle, row-major.
// Memory words are VEC elements wide, as wide as the multiplier array, so no
// stream/vector conversion is needed between memory and compute.
//
// Timing: COMPUTE takes TM*TN*(TK/VEC) cycles plus a 4-cycle pipeline tail.
// Host interface: in-order read requests (valid/ready) and responses (valid,
// no backpressure). Results: valid/ready.
//
// Follows the document: tile and matrix sizes, 2048 multipliers, address
// repetition, on-chip accumulation of tiles. This design's own choices: the
// command/host interface, the phase sequencing (loading is not overlapped
// with compute), B supplied transposed, 32-bit results.
module mxm_engine
  import reshape_pkg::*;
#(
  parameter int unsigned TM  = 512,    // rows of the A tile / C tile
  parameter int unsigned TN  = 512,    // rows of the B^T tile / C tile cols
  parameter int unsigned TK  = 2048,   // shared dimension of one tile
  parameter int unsigned VEC = 2048,   // multipliers, elements per word
  localparam int unsigned KW    = TK / VEC,
  localparam int unsigned WORD_W = VEC * ELEM_W,
  localparam int unsigned CN    = TM * TN,
  localparam int unsigned RW_W  = (TM > 1) ? $clog2(TM) : 1,
  localparam int unsigned CL_W  = (TN > 1) ? $clog2(TN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [31:0]       cmd_a_base,     // host word address of A tile
  input  logic [31:0]       cmd_b_base,     // host word address of B^T tile
  input  logic [31:0]       cmd_row_pitch,  // host words per matrix row
  input  logic              cmd_accumulate, // add to C instead of replacing
  input  logic              cmd_drain,      // stream C out afterwards
  // host memory reads
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [31:0]       mem_req_addr,
  input  logic              mem_rsp_valid,
  input  logic [WORD_W-1:0] mem_rsp_data,
  // result tile
  output logic              res_valid,
  input  logic              res_ready,
  output logic [RW_W-1:0]   res_row,
  output logic [CL_W-1:0]   res_col,
  output acc_t              res_data,
  output phase_e            phase
);

  localparam int unsigned AA_W = (TM * KW > 1) ? $clog2(TM * KW) : 1;
  localparam int unsigned BA_W = (TN * KW > 1) ? $clog2(TN * KW) : 1;
  localparam int unsigned CI_W = (CN > 1) ? $clog2(CN) : 1;
  localparam int unsigned LW_W = $clog2(((TM > TN) ? TM : TN) * KW + 1);

  phase_e phase_q;
  logic   acc_mode_q, drain_q;
  logic [31:0] b_base_q, pitch_q;

  assign phase     = phase_q;
  assign cmd_ready = (phase_q == PH_IDLE);

  // ---------------- tile fetch -----------------
  logic        fetch_start;
  logic [31:0] fetch_base;
  logic [LW_W-1:0] wcnt_q;
  logic        load_done;
  logic [31:0] fetch_rows, fetch_pitch;
  logic        f_inner_last, f_last, f_done;   // status outputs not needed here

  // The A fetch starts from IDLE (command values), the B fetch from LOAD_A.
  assign fetch_rows  = (phase_q == PH_IDLE) ? 32'(TM) : 32'(TN);
  assign fetch_pitch = (phase_q == PH_IDLE) ? cmd_row_pitch : pitch_q;

  transpose_addr_gen #(.ADDR_W(32), .CNT_W(32)) u_fetch (
    .clk, .rst_n, .start(fetch_start),
    .cfg_base(fetch_base), .cfg_outer_step(fetch_pitch),
    .cfg_outer_count(fetch_rows),
    .cfg_inner_step(32'd1), .cfg_inner_count(32'(KW)),
    .out_ready(mem_req_ready), .out_valid(mem_req_valid), .out_addr(mem_req_addr),
    .out_inner_last(f_inner_last), .out_last(f_last), .done(f_done));

  assign fetch_base  = (phase_q == PH_IDLE) ? cmd_a_base : b_base_q;
  assign load_done   = mem_rsp_valid &&
                       (wcnt_q == LW_W'(((phase_q == PH_LOAD_A) ? TM : TN) * KW - 1));
  assign fetch_start = (cmd_valid && cmd_ready) ||
                       (phase_q == PH_LOAD_A && load_done);

  // ---------------- operand buffers -----------------
  logic              a_wr, b_wr;
  logic              a_rd_valid, b_rd_valid;
  logic [31:0]       a_rd_addr, b_rd_addr;
  logic              a_row_last;
  logic              a_rsp_valid, b_rsp_valid;
  logic [WORD_W-1:0] a_rsp_data, b_rsp_data;
  logic              a_rsp_last, b_rsp_tag;
  logic              comp_start;
  logic              ag_last, ag_rep, ag_done, bg_row_last, bg_last, bg_rep, bg_done;

  assign a_wr       = mem_rsp_valid && (phase_q == PH_LOAD_A);
  assign b_wr       = mem_rsp_valid && (phase_q == PH_LOAD_B);
  assign comp_start = (phase_q == PH_LOAD_B) && load_done;

  vec_ram #(.DEPTH(TM * KW), .WIDTH(WORD_W), .TAG_W(1)) u_abuf (
    .clk, .rst_n,
    .wr_en(a_wr), .wr_addr(AA_W'(wcnt_q)), .wr_data(mem_rsp_data),
    .rd_valid(a_rd_valid), .rd_addr(AA_W'(a_rd_addr)), .rd_tag(a_row_last),
    .rsp_valid(a_rsp_valid), .rsp_data(a_rsp_data), .rsp_tag(a_rsp_last));

  vec_ram #(.DEPTH(TN * KW), .WIDTH(WORD_W), .TAG_W(1)) u_bbuf (
    .clk, .rst_n,
    .wr_en(b_wr), .wr_addr(BA_W'(wcnt_q)), .wr_data(mem_rsp_data),
    .rd_valid(b_rd_valid), .rd_addr(BA_W'(b_rd_addr)), .rd_tag(1'b0),
    .rsp_valid(b_rsp_valid), .rsp_data(b_rsp_data), .rsp_tag(b_rsp_tag));

  // A: each row (KW words) repeated TN times, rows in order.
  repeat_addr_gen #(.ADDR_W(32), .CNT_W(32)) u_agen (
    .clk, .rst_n, .start(comp_start),
    .cfg_base('0), .cfg_row_step(32'(KW)),
    .cfg_rows(32'(TM)), .cfg_cols(32'(KW)), .cfg_repeat(32'(TN)),
    .out_ready(1'b1), .out_valid(a_rd_valid), .out_addr(a_rd_addr),
    .out_row_last(a_row_last), .out_last(ag_last), .repeat_row(ag_rep), .done(ag_done));

  // B: the whole tile (one "row" of TN*KW words) repeated TM times.
  repeat_addr_gen #(.ADDR_W(32), .CNT_W(32)) u_bgen (
    .clk, .rst_n, .start(comp_start),
    .cfg_base('0), .cfg_row_step('0),
    .cfg_rows(32'd1), .cfg_cols(32'(TN * KW)), .cfg_repeat(32'(TM)),
    .out_ready(1'b1), .out_valid(b_rd_valid), .out_addr(b_rd_addr),
    .out_row_last(bg_row_last), .out_last(bg_last), .repeat_row(bg_rep), .done(bg_done));

  // ---------------- dot product and C tile -----------------
  logic dp_valid;
  acc_t dp_sum;

  dot_prod #(.VEC(VEC)) u_dot (
    .clk, .rst_n,
    .in_valid(a_rsp_valid), .in_last(a_rsp_last),
    .in_a(a_rsp_data), .in_b(b_rsp_data),
    .out_valid(dp_valid), .out_sum(dp_sum));

  acc_t c_mem [CN];
  logic [CI_W-1:0] c_idx_q;
  logic [CI_W-1:0] d_idx_q;
  logic            d_left_q;
  logic            comp_done;

  assign comp_done = dp_valid && (c_idx_q == CI_W'(CN - 1));

  always_ff @(posedge clk) begin
    if (dp_valid) c_mem[c_idx_q] <= acc_mode_q ? c_mem[c_idx_q] + dp_sum : dp_sum;
  end

  // ---------------- sequencing -----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= PH_IDLE;
      acc_mode_q <= 1'b0;
      drain_q    <= 1'b0;
      b_base_q   <= '0;
      pitch_q    <= '0;
      wcnt_q     <= '0;
      c_idx_q    <= '0;
      d_idx_q    <= '0;
      d_left_q   <= 1'b0;
      res_valid  <= 1'b0;
      res_data   <= '0;
      res_row    <= '0;
      res_col    <= '0;
    end else begin
      if (mem_rsp_valid) wcnt_q <= load_done ? '0 : wcnt_q + LW_W'(1);
      if (dp_valid)      c_idx_q <= comp_done ? '0 : c_idx_q + CI_W'(1);
      if (res_valid && res_ready) res_valid <= 1'b0;

      unique case (phase_q)
        PH_IDLE: if (cmd_valid) begin
          phase_q    <= PH_LOAD_A;
          acc_mode_q <= cmd_accumulate;
          drain_q    <= cmd_drain;
          b_base_q   <= cmd_b_base;
          pitch_q    <= cmd_row_pitch;
        end
        PH_LOAD_A:  if (load_done) phase_q <= PH_LOAD_B;
        PH_LOAD_B:  if (load_done) phase_q <= PH_COMPUTE;
        PH_COMPUTE: if (comp_done) begin
          phase_q  <= drain_q ? PH_DRAIN : PH_IDLE;
          d_idx_q  <= '0;
          d_left_q <= drain_q;
        end
        PH_DRAIN: begin
          if (d_left_q && (!res_valid || res_ready)) begin
            res_valid <= 1'b1;
            res_data  <= c_mem[d_idx_q];
            res_row   <= RW_W'(d_idx_q / CI_W'(TN));
            res_col   <= CL_W'(d_idx_q % CI_W'(TN));
            d_idx_q   <= d_idx_q + CI_W'(1);
            if (d_idx_q == CI_W'(CN - 1)) d_left_q <= 1'b0;
          end
          if (!d_left_q && (!res_valid || res_ready)) phase_q <= PH_IDLE;
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{b_rsp_valid, b_rsp_tag, f_inner_last, f_last, f_done,
                    ag_last, ag_rep, ag_done, bg_row_last, bg_last, bg_rep, bg_done,
                    a_rd_addr[31:AA_W], b_rd_addr[31:BA_W]};

endmodule
