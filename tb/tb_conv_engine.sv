// tb_conv_engine: one convolution tile at reduced size (8 x 6 pixels, 3
// input channels, 4 output channels, 3x3 kernel). The host image is 16
// pixels (2 words) wide; pixel data is a fixed function of (word, element)
// so the reference recomputes it. Weights are random. Checks every output
// row of every channel against a software convolution, the channel-major /
// row-minor order, the row spacing of K cycles, and that COMPUTE lasts
// COUT*(TILE_H-K+1)*K cycles plus the 3-cycle tail. The host stalls requests
// at random.
module tb_conv_engine;
  import reshape_pkg::*;
  localparam int TW = 8, TH = 6, CIN = 3, COUT = 4, K = 3;
  localparam int OW = TW - K + 1, OH = TH - K + 1, WN = K * CIN;
  localparam int PITCH = 2, BASE = 1 * PITCH + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, w_wr_en;
  logic [31:0] cmd_base, cmd_row_pitch;
  logic [3:0] w_wr_addr;
  logic [WN*8-1:0] w_wr_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  logic [TW*CIN*8-1:0] mem_rsp_data;
  logic res_valid;
  logic [1:0] res_ch, res_row;
  acc_t [OW-1:0] res_data;
  phase_e phase;
  int checks = 0, failures = 0;

  conv_engine #(.TILE_W(TW), .TILE_H(TH), .CIN(CIN), .COUT(COUT), .K(K)) dut (.*);

  elem_t wt [COUT][K][WN];

  function automatic elem_t gen(int w, int e);
    return elem_t'((w * 97 + e * 13 + (w * e) % 241 + 3) & 255);
  endfunction

  always_ff @(posedge clk) begin
    logic [TW*CIN*8-1:0] d;
    for (int e = 0; e < TW * CIN; e++) d[e*8 +: 8] = gen(mem_req_addr, e);
    mem_rsp_valid <= rst_n && mem_req_valid && mem_req_ready;
    mem_rsp_data  <= d;
    mem_req_ready <= ($urandom_range(0, 3) != 0);
  end

  function automatic acc_t ref_out(int co, int y, int x);
    acc_t s = 0;
    for (int i = 0; i < K; i++)
      for (int e = 0; e < WN; e++)
        s += acc_t'(gen(BASE + (y + i) * PITCH, x * CIN + e)) * acc_t'(wt[co][i][e]);
    return s;
  endfunction

  int comp_cycles = 0;
  always @(posedge clk) if (phase == PH_COMPUTE) comp_cycles++;

  initial begin
    int n, last_cyc, cyc;
    cmd_valid = 0; cmd_base = 0; cmd_row_pitch = 0;
    w_wr_en = 0; w_wr_addr = 0; w_wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int co = 0; co < COUT; co++)
      for (int i = 0; i < K; i++) begin
        for (int e = 0; e < WN; e++) begin
          wt[co][i][e] = elem_t'($urandom);
          w_wr_data[e*8 +: 8] = wt[co][i][e];
        end
        w_wr_en = 1; w_wr_addr = 4'(co * K + i);
        @(negedge clk);
      end
    w_wr_en = 0;
    cmd_valid = 1; cmd_base = BASE; cmd_row_pitch = PITCH;
    @(negedge clk);
    cmd_valid = 0;
    n = 0; cyc = 0; last_cyc = -100;
    while (n < COUT * OH && cyc < 2000) begin
      cyc++;
      if (res_valid) begin
        int co, y;
        co = n / OH; y = n % OH;
        checks++;
        if (res_ch != 2'(co) || res_row != 2'(y)) begin
          failures++; $display("FAIL order: ch=%0d row=%0d exp %0d %0d", res_ch, res_row, co, y);
        end
        for (int x = 0; x < OW; x++) begin
          checks++;
          if (res_data[x] != ref_out(co, y, x)) begin
            failures++;
            $display("FAIL out[%0d][%0d][%0d]=%0d exp %0d", co, y, x, res_data[x], ref_out(co, y, x));
          end
        end
        if (n > 0) begin
          checks++;
          if (cyc - last_cyc != K) begin failures++; $display("FAIL row spacing %0d", cyc - last_cyc); end
        end
        last_cyc = cyc;
        n++;
      end
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (phase != PH_IDLE || comp_cycles != COUT * OH * K + 3) begin
      failures++; $display("FAIL compute cycles %0d phase %0d", comp_cycles, phase);
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
