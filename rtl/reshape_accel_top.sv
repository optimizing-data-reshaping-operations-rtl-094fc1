// reshape_accel_top: the two evaluated accelerators side by side.
//
// Both accelerators are built from the same few parts: counter-based address
// generators that absorb the data reshaping (repetition, transposition /
// tiling, sliding windows), on-chip buffers read by those addresses in one
// cycle, and arrays of multipliers fed at the full width of the buffers.
//   mxm   tiled matrix multiplication: 512x2048 operand tiles, 2048
//         multipliers, on-chip 512x512 result tile.
//   conv  tiled 3x3 convolution: 128x128 image tiles, 3 input and 64 output
//         channels.
// They share nothing; each brings out its own command, host-memory read,
// weight (conv only) and result ports, prefixed mxm_ and cv_. The host
// processor, its memory and the PCIe link that serve these ports are not
// part of this design. All parameters default to the evaluated sizes.
module reshape_accel_top
  import reshape_pkg::*;
#(
  parameter int unsigned MXM_TM  = 512,
  parameter int unsigned MXM_TN  = 512,
  parameter int unsigned MXM_TK  = 2048,
  parameter int unsigned MXM_VEC = 2048,
  parameter int unsigned CV_TILE_W = 128,
  parameter int unsigned CV_TILE_H = 128,
  parameter int unsigned CV_CIN    = 3,
  parameter int unsigned CV_COUT   = 64,
  parameter int unsigned CV_K      = 3,
  localparam int unsigned MXM_WORD_W = MXM_VEC * ELEM_W,
  localparam int unsigned MXM_RW_W   = (MXM_TM > 1) ? $clog2(MXM_TM) : 1,
  localparam int unsigned MXM_CL_W   = (MXM_TN > 1) ? $clog2(MXM_TN) : 1,
  localparam int unsigned CV_WORD_W  = CV_TILE_W * CV_CIN * ELEM_W,
  localparam int unsigned CV_WROW_W  = CV_K * CV_CIN * ELEM_W,
  localparam int unsigned CV_OUT_W   = CV_TILE_W - CV_K + 1,
  localparam int unsigned CV_WA_W    = $clog2(CV_COUT * CV_K),
  localparam int unsigned CV_OR_W    = $clog2(CV_TILE_H - CV_K + 1),
  localparam int unsigned CV_CH_W    = (CV_COUT > 1) ? $clog2(CV_COUT) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- matrix multiplication ----
  input  logic                  mxm_cmd_valid,
  output logic                  mxm_cmd_ready,
  input  logic [31:0]           mxm_cmd_a_base,
  input  logic [31:0]           mxm_cmd_b_base,
  input  logic [31:0]           mxm_cmd_row_pitch,
  input  logic                  mxm_cmd_accumulate,
  input  logic                  mxm_cmd_drain,
  output logic                  mxm_mem_req_valid,
  input  logic                  mxm_mem_req_ready,
  output logic [31:0]           mxm_mem_req_addr,
  input  logic                  mxm_mem_rsp_valid,
  input  logic [MXM_WORD_W-1:0] mxm_mem_rsp_data,
  output logic                  mxm_res_valid,
  input  logic                  mxm_res_ready,
  output logic [MXM_RW_W-1:0]   mxm_res_row,
  output logic [MXM_CL_W-1:0]   mxm_res_col,
  output acc_t                  mxm_res_data,
  output phase_e                mxm_phase,
  // ---- 2D convolution ----
  input  logic                  cv_cmd_valid,
  output logic                  cv_cmd_ready,
  input  logic [31:0]           cv_cmd_base,
  input  logic [31:0]           cv_cmd_row_pitch,
  input  logic                  cv_w_wr_en,
  input  logic [CV_WA_W-1:0]    cv_w_wr_addr,
  input  logic [CV_WROW_W-1:0]  cv_w_wr_data,
  output logic                  cv_mem_req_valid,
  input  logic                  cv_mem_req_ready,
  output logic [31:0]           cv_mem_req_addr,
  input  logic                  cv_mem_rsp_valid,
  input  logic [CV_WORD_W-1:0]  cv_mem_rsp_data,
  output logic                  cv_res_valid,
  output logic [CV_CH_W-1:0]    cv_res_ch,
  output logic [CV_OR_W-1:0]    cv_res_row,
  output acc_t [CV_OUT_W-1:0]   cv_res_data,
  output phase_e                cv_phase
);

  mxm_engine #(.TM(MXM_TM), .TN(MXM_TN), .TK(MXM_TK), .VEC(MXM_VEC)) u_mxm (
    .clk, .rst_n,
    .cmd_valid(mxm_cmd_valid), .cmd_ready(mxm_cmd_ready),
    .cmd_a_base(mxm_cmd_a_base), .cmd_b_base(mxm_cmd_b_base),
    .cmd_row_pitch(mxm_cmd_row_pitch), .cmd_accumulate(mxm_cmd_accumulate),
    .cmd_drain(mxm_cmd_drain),
    .mem_req_valid(mxm_mem_req_valid), .mem_req_ready(mxm_mem_req_ready),
    .mem_req_addr(mxm_mem_req_addr),
    .mem_rsp_valid(mxm_mem_rsp_valid), .mem_rsp_data(mxm_mem_rsp_data),
    .res_valid(mxm_res_valid), .res_ready(mxm_res_ready),
    .res_row(mxm_res_row), .res_col(mxm_res_col), .res_data(mxm_res_data),
    .phase(mxm_phase));

  conv_engine #(.TILE_W(CV_TILE_W), .TILE_H(CV_TILE_H), .CIN(CV_CIN),
                .COUT(CV_COUT), .K(CV_K)) u_conv (
    .clk, .rst_n,
    .cmd_valid(cv_cmd_valid), .cmd_ready(cv_cmd_ready),
    .cmd_base(cv_cmd_base), .cmd_row_pitch(cv_cmd_row_pitch),
    .w_wr_en(cv_w_wr_en), .w_wr_addr(cv_w_wr_addr), .w_wr_data(cv_w_wr_data),
    .mem_req_valid(cv_mem_req_valid), .mem_req_ready(cv_mem_req_ready),
    .mem_req_addr(cv_mem_req_addr),
    .mem_rsp_valid(cv_mem_rsp_valid), .mem_rsp_data(cv_mem_rsp_data),
    .res_valid(cv_res_valid), .res_ch(cv_res_ch), .res_row(cv_res_row),
    .res_data(cv_res_data), .phase(cv_phase));

endmodule
