// tb_reshape_accel_top: end-to-end run of both accelerators at their full
// default sizes, side by side.
//
// Matrix multiplication: A and B^T are 4096 x 4096 8-bit matrices in
// modelled host memory (2 words of 2048 elements per row; B^T starts at word
// 2^20). Element e of word w is a fixed function of (w, e). One output tile
// (A rows 512..1023, B^T rows 1024..1535) is computed over both k-tiles of
// 2048: the first command replaces the C tile, the second accumulates and
// drains all 512 x 512 results, which are checked against a software product.
//
// Convolution: a 1024-pixel-wide, 3-channel image (8 words per row) and 64
// random 3x3x3 kernels; the 128 x 128 tile at image row 128, pixel 384 is
// convolved and every one of the 64 x 126 x 126 results is checked.
//
// Host requests and MxM result acceptance stall at random. The run counts
// how often each mechanism happened: row-address repeats and B-tile
// re-reads, tile-fetch row jumps, request stalls, accumulation into C,
// result backpressure, window slides over rows and per-channel sweep
// repeats. Each must occur at least once, and both COMPUTE phases must run
// at one step per cycle.
module tb_reshape_accel_top;
  import reshape_pkg::*;
  localparam int VEC = 2048, TM = 512, TN = 512, TK = 2048;
  localparam int M_PITCH = 4096 / VEC, A0 = 0, B0 = 1 << 20, AR = 512, BR = 1024;
  localparam int KTOT = 4096;
  localparam int TW = 128, TH = 128, CIN = 3, COUT = 64, K = 3;
  localparam int OW = TW - K + 1, OH = TH - K + 1, WN = K * CIN;
  localparam int C_PITCH = 1024 * CIN * 8 / (TW * CIN * 8), C_BASE = 128 * C_PITCH + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- MxM side ----
  logic mxm_cmd_valid, mxm_cmd_ready, mxm_cmd_accumulate, mxm_cmd_drain;
  logic [31:0] mxm_cmd_a_base, mxm_cmd_b_base, mxm_cmd_row_pitch;
  logic mxm_mem_req_valid, mxm_mem_req_ready, mxm_mem_rsp_valid;
  logic [31:0] mxm_mem_req_addr;
  logic [VEC*8-1:0] mxm_mem_rsp_data;
  logic mxm_res_valid, mxm_res_ready;
  logic [8:0] mxm_res_row, mxm_res_col;
  acc_t mxm_res_data;
  phase_e mxm_phase;
  // ---- conv side ----
  logic cv_cmd_valid, cv_cmd_ready, cv_w_wr_en;
  logic [31:0] cv_cmd_base, cv_cmd_row_pitch;
  logic [7:0] cv_w_wr_addr;
  logic [WN*8-1:0] cv_w_wr_data;
  logic cv_mem_req_valid, cv_mem_req_ready, cv_mem_rsp_valid;
  logic [31:0] cv_mem_req_addr;
  logic [TW*CIN*8-1:0] cv_mem_rsp_data;
  logic cv_res_valid;
  logic [5:0] cv_res_ch;
  logic [6:0] cv_res_row;
  acc_t [OW-1:0] cv_res_data;
  phase_e cv_phase;

  int checks = 0, failures = 0;

  reshape_accel_top dut (.*);

  function automatic elem_t gen_m(int w, int e);
    return elem_t'((w * 131 + e * 29 + (w * e) % 251 + 7) & 255);
  endfunction
  function automatic elem_t gen_c(int w, int e);
    return elem_t'((w * 97 + e * 13 + (w * e) % 241 + 3) & 255);
  endfunction

  // host memories: one-cycle responses, random request stalls
  always_ff @(posedge clk) begin
    logic [VEC*8-1:0] dm;
    logic [TW*CIN*8-1:0] dc;
    if (mxm_mem_req_valid && mxm_mem_req_ready)
      for (int e = 0; e < VEC; e++) dm[e*8 +: 8] = gen_m(mxm_mem_req_addr, e);
    if (cv_mem_req_valid && cv_mem_req_ready)
      for (int e = 0; e < TW * CIN; e++) dc[e*8 +: 8] = gen_c(cv_mem_req_addr, e);
    mxm_mem_rsp_valid <= rst_n && mxm_mem_req_valid && mxm_mem_req_ready;
    cv_mem_rsp_valid  <= rst_n && cv_mem_req_valid && cv_mem_req_ready;
    if (mxm_mem_req_valid && mxm_mem_req_ready) mxm_mem_rsp_data <= dm;
    if (cv_mem_req_valid && cv_mem_req_ready)   cv_mem_rsp_data  <= dc;
    mxm_mem_req_ready <= ($urandom_range(0, 7) != 0);
    cv_mem_req_ready  <= ($urandom_range(0, 7) != 0);
  end

  // ---- mechanism counters ----
  int n_repeat_row = 0, n_b_reread = 0, n_fetch_jump = 0, n_req_stall = 0;
  int n_accumulate = 0, n_res_stall = 0, n_slide = 0, n_sweep = 0;
  int mxm_comp = 0, cv_comp = 0;
  logic [31:0] last_req_m = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mxm.u_agen.repeat_row) n_repeat_row++;
    if (dut.u_mxm.u_bgen.repeat_row) n_b_reread++;
    if (mxm_mem_req_valid && mxm_mem_req_ready) begin
      if (mxm_mem_req_addr != last_req_m + 1) n_fetch_jump++;
      last_req_m <= mxm_mem_req_addr;
    end
    if ((mxm_mem_req_valid && !mxm_mem_req_ready) || (cv_mem_req_valid && !cv_mem_req_ready))
      n_req_stall++;
    if (dut.u_mxm.dp_valid && dut.u_mxm.acc_mode_q) n_accumulate++;
    if (mxm_res_valid && !mxm_res_ready) n_res_stall++;
    if (dut.u_conv.s_valid && dut.u_conv.s_elem == 0 && dut.u_conv.s_win != 0) n_slide++;
    if (dut.u_conv.s_valid && dut.u_conv.s_elem == 0 && dut.u_conv.s_win == 0 &&
        dut.u_conv.s_rep != 0) n_sweep++;
    if (mxm_phase == PH_COMPUTE) mxm_comp++;
    if (cv_phase == PH_COMPUTE) cv_comp++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- references ----
  elem_t a_t [TM][KTOT];
  elem_t b_t [TN][KTOT];
  elem_t wt [COUT][K][WN];

  task automatic mxm_run();
    int n = 0, bad = 0, errs = 0;
    for (int kt = 0; kt < KTOT / TK; kt++) begin
      while (!mxm_cmd_ready) @(negedge clk);
      mxm_cmd_valid = 1;
      mxm_cmd_a_base = A0 + AR * M_PITCH + kt;
      mxm_cmd_b_base = B0 + BR * M_PITCH + kt;
      mxm_cmd_row_pitch = M_PITCH;
      mxm_cmd_accumulate = (kt != 0);
      mxm_cmd_drain = (kt == KTOT / TK - 1);
      @(negedge clk);
      mxm_cmd_valid = 0;
    end
    while (n < TM * TN) begin
      mxm_res_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (mxm_res_valid && mxm_res_ready) begin
        int i = n / TN, j = n % TN;
        acc_t s = 0;
        for (int k = 0; k < KTOT; k++) s += acc_t'(a_t[i][k]) * acc_t'(b_t[j][k]);
        if (mxm_res_row != 9'(i) || mxm_res_col != 9'(j) || mxm_res_data != s) begin
          bad++;
          if (errs++ < 5) $display("FAIL C[%0d][%0d]=%0d exp %0d", i, j, mxm_res_data, s);
        end
        n++;
      end
      @(negedge clk);
    end
    checks += TM * TN;
    failures += bad;
    while (mxm_phase != PH_IDLE) @(negedge clk);
    // two compute phases, each TM*TN*(TK/VEC) steps plus a 3-cycle tail
    check(mxm_comp == 2 * (TM * TN * (TK / VEC) + 3), "MxM compute at one step per cycle");
    $display("MxM: %0d results, compute cycles %0d", n, mxm_comp);
  endtask

  task automatic conv_run();
    int n = 0, bad = 0, errs = 0;
    for (int co = 0; co < COUT; co++)
      for (int i = 0; i < K; i++) begin
        for (int e = 0; e < WN; e++) begin
          wt[co][i][e] = elem_t'($urandom);
          cv_w_wr_data[e*8 +: 8] = wt[co][i][e];
        end
        cv_w_wr_en = 1; cv_w_wr_addr = 8'(co * K + i);
        @(negedge clk);
      end
    cv_w_wr_en = 0;
    cv_cmd_valid = 1; cv_cmd_base = C_BASE; cv_cmd_row_pitch = C_PITCH;
    @(negedge clk);
    cv_cmd_valid = 0;
    while (n < COUT * OH) begin
      if (cv_res_valid) begin
        int co = n / OH, y = n % OH;
        if (cv_res_ch != 6'(co) || cv_res_row != 7'(y)) begin
          bad++;
          if (errs++ < 5) $display("FAIL conv order ch %0d row %0d", cv_res_ch, cv_res_row);
        end
        for (int x = 0; x < OW; x++) begin
          acc_t s = 0;
          for (int i = 0; i < K; i++)
            for (int e = 0; e < WN; e++)
              s += acc_t'(gen_c(C_BASE + (y + i) * C_PITCH, x * CIN + e)) *
                   acc_t'(wt[co][i][e]);
          if (cv_res_data[x] != s) begin
            bad++;
            if (errs++ < 5) $display("FAIL conv[%0d][%0d][%0d]=%0d exp %0d", co, y, x, cv_res_data[x], s);
          end
        end
        n++;
      end
      @(negedge clk);
    end
    checks += COUT * OH * (OW + 1);
    failures += bad;
    while (cv_phase != PH_IDLE) @(negedge clk);
    check(cv_comp == COUT * OH * K + 3, "conv compute at one row per cycle");
    $display("conv: %0d result rows, compute cycles %0d", n, cv_comp);
  endtask

  initial begin
    mxm_cmd_valid = 0; mxm_cmd_accumulate = 0; mxm_cmd_drain = 0;
    mxm_cmd_a_base = 0; mxm_cmd_b_base = 0; mxm_cmd_row_pitch = 0; mxm_res_ready = 0;
    cv_cmd_valid = 0; cv_cmd_base = 0; cv_cmd_row_pitch = 0;
    cv_w_wr_en = 0; cv_w_wr_addr = 0; cv_w_wr_data = 0;
    for (int i = 0; i < TM; i++)
      for (int k = 0; k < KTOT; k++) a_t[i][k] = gen_m(A0 + (AR + i) * M_PITCH + k / VEC, k % VEC);
    for (int j = 0; j < TN; j++)
      for (int k = 0; k < KTOT; k++) b_t[j][k] = gen_m(B0 + (BR + j) * M_PITCH + k / VEC, k % VEC);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      mxm_run();
      conv_run();
    join
    $display("mechanisms: repeat_row=%0d b_reread=%0d fetch_jump=%0d req_stall=%0d accumulate=%0d res_stall=%0d slide=%0d sweep=%0d",
             n_repeat_row, n_b_reread, n_fetch_jump, n_req_stall, n_accumulate, n_res_stall,
             n_slide, n_sweep);
    check(n_repeat_row > 0, "A row address repeated");
    check(n_b_reread > 0, "B tile re-read by address");
    check(n_fetch_jump > 0, "tile fetch jumped rows");
    check(n_req_stall > 0, "host request stall");
    check(n_accumulate > 0, "accumulation into C");
    check(n_res_stall > 0, "result backpressure");
    check(n_slide > 0, "window slid over rows");
    check(n_sweep > 0, "input sweep repeated per channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
