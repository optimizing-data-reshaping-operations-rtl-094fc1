// tb_mxm_workload: a complete tiled matrix product driven the way a host
// would drive the engine, at reduced sizes. A is 16 x 64 and B^T is 12 x 64
// (8-bit, in modelled host memory, 8 words of 8 elements per row). The engine
// (4 x 4 C tiles, 32-long k-tiles, 8 multipliers) is given every output tile
// in turn, each over both k-tiles: the first replaces the C tile, the second
// accumulates and drains. All 16 x 12 results of the product are checked.
// Host requests and result acceptance stall at random.
module tb_mxm_workload;
  import reshape_pkg::*;
  localparam int TM = 4, TN = 4, TK = 32, VEC = 8;
  localparam int M = 16, N = 12, KT = 64, PITCH = KT / VEC, A0 = 0, B0 = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, cmd_accumulate, cmd_drain;
  logic [31:0] cmd_a_base, cmd_b_base, cmd_row_pitch;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  logic [VEC*8-1:0] mem_rsp_data;
  logic res_valid, res_ready;
  logic [1:0] res_row, res_col;
  acc_t res_data;
  phase_e phase;
  int checks = 0, failures = 0;

  mxm_engine #(.TM(TM), .TN(TN), .TK(TK), .VEC(VEC)) dut (.*);

  function automatic elem_t gen(int w, int e);
    return elem_t'((w * 37 + e * 101 + (w * e) % 253 + 11) & 255);
  endfunction

  always_ff @(posedge clk) begin
    logic [VEC*8-1:0] d;
    for (int e = 0; e < VEC; e++) d[e*8 +: 8] = gen(mem_req_addr, e);
    mem_rsp_valid <= rst_n && mem_req_valid && mem_req_ready;
    mem_rsp_data  <= d;
    mem_req_ready <= ($urandom_range(0, 4) != 0);
  end

  acc_t c_got [M][N];
  bit   c_seen [M][N];

  initial begin
    cmd_valid = 0; cmd_accumulate = 0; cmd_drain = 0;
    cmd_a_base = 0; cmd_b_base = 0; cmd_row_pitch = 0; res_ready = 0;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) c_seen[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ti = 0; ti < M / TM; ti++)
      for (int tj = 0; tj < N / TN; tj++) begin
        for (int kt = 0; kt < KT / TK; kt++) begin
          while (!cmd_ready) @(negedge clk);
          cmd_valid = 1;
          cmd_a_base = A0 + ti * TM * PITCH + kt * (TK / VEC);
          cmd_b_base = B0 + tj * TN * PITCH + kt * (TK / VEC);
          cmd_row_pitch = PITCH;
          cmd_accumulate = (kt != 0);
          cmd_drain = (kt == KT / TK - 1);
          @(negedge clk);
          cmd_valid = 0;
        end
        for (int n = 0; n < TM * TN; ) begin
          res_ready = 1'($urandom_range(0, 1));
          #1;
          if (res_valid && res_ready) begin
            c_got[ti * TM + res_row][tj * TN + res_col] = res_data;
            c_seen[ti * TM + res_row][tj * TN + res_col] = 1;
            n++;
          end
          @(negedge clk);
        end
      end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        automatic acc_t s = 0;
        for (int k = 0; k < KT; k++)
          s += acc_t'(gen(A0 + i * PITCH + k / VEC, k % VEC)) *
               acc_t'(gen(B0 + j * PITCH + k / VEC, k % VEC));
        checks++;
        if (!c_seen[i][j] || c_got[i][j] != s) begin
          failures++;
          $display("FAIL C[%0d][%0d]=%0d exp %0d", i, j, c_got[i][j], s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
