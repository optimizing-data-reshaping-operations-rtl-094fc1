// tb_mxm_engine: one output tile of a tiled matrix product, over two k-tiles.
// Host memory is modelled here: element e of word w is a fixed function of
// (w, e), so no storage is needed and the reference recomputes it. A is an
// 8 x 32 matrix at word 0, B^T a 6 x 32 matrix at word 1000, 4 words per
// row. The engine computes the 4 x 3 tile at rows 4.. of A and rows 3.. of
// B^T: the first command replaces C with k-tile 0, the second adds k-tile 1
// and drains. Request-ready and result-ready stall at random. Checks every C
// element, the drain order, and that COMPUTE lasts TM*TN*TK/VEC cycles plus
// the 3-cycle pipeline tail (one dot-product step per cycle, no stalls).
module tb_mxm_engine;
  import reshape_pkg::*;
  localparam int TM = 4, TN = 3, TK = 16, VEC = 8, KW = TK / VEC;
  localparam int PITCH = 4, KTOT = PITCH * VEC, A0 = 0, B0 = 1000, AR = 4, BR = 3;

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
    return elem_t'((w * 131 + e * 29 + (w * e) % 251 + 7) & 255);
  endfunction

  function automatic logic [VEC*8-1:0] word(int w);
    logic [VEC*8-1:0] d;
    for (int e = 0; e < VEC; e++) d[e*8 +: 8] = gen(w, e);
    return d;
  endfunction

  // host memory: responses one cycle after an accepted request
  always_ff @(posedge clk) begin
    mem_rsp_valid <= rst_n && mem_req_valid && mem_req_ready;
    mem_rsp_data  <= word(mem_req_addr);
    mem_req_ready <= ($urandom_range(0, 4) != 0);
  end

  int comp_cycles = 0;
  always @(posedge clk) if (phase == PH_COMPUTE) comp_cycles++;

  function automatic acc_t ref_c(int i, int j);
    acc_t s = 0;
    for (int k = 0; k < KTOT; k++)
      s += acc_t'(gen(A0 + (AR + i) * PITCH + k / VEC, k % VEC)) *
           acc_t'(gen(B0 + (BR + j) * PITCH + k / VEC, k % VEC));
    return s;
  endfunction

  task automatic issue(input int kt, input bit acc, input bit drain);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1;
    cmd_a_base = A0 + AR * PITCH + kt * KW;
    cmd_b_base = B0 + BR * PITCH + kt * KW;
    cmd_row_pitch = PITCH; cmd_accumulate = acc; cmd_drain = drain;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    int n;
    cmd_valid = 0; cmd_accumulate = 0; cmd_drain = 0;
    cmd_a_base = 0; cmd_b_base = 0; cmd_row_pitch = 0; res_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // k-tiles 0 and 1 of the 32-long shared dimension (16 per tile)
    issue(0, 0, 0);
    while (phase != PH_IDLE) @(negedge clk);
    checks++;
    if (comp_cycles != TM * TN * KW + 3) begin
      failures++; $display("FAIL compute took %0d cycles", comp_cycles);
    end
    issue(1, 1, 1);
    n = 0;
    while (n < TM * TN) begin
      res_ready = 1'($urandom_range(0, 1));
      #1;
      if (res_valid && res_ready) begin
        checks++;
        if (res_row != 2'(n / TN) || res_col != 2'(n % TN) ||
            res_data != ref_c(n / TN, n % TN)) begin
          failures++;
          $display("FAIL C[%0d][%0d]=%0d exp %0d", res_row, res_col, res_data,
                   ref_c(n / TN, n % TN));
        end
        n++;
      end
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (phase != PH_IDLE || res_valid) begin
      failures++; $display("FAIL not idle after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
