// tb_conv_workload: a complete image convolved tile by tile, at reduced
// sizes. The image is 20 x 20 pixels with 3 channels; the engine takes 8 x 8
// tiles and 4 output channels. Tiles start every 6 pixels (overlap K-1 = 2),
// so 3 x 3 tiles cover all 18 x 18 valid outputs. The modelled host memory
// is addressed in pixels: address row*20 + col returns the 8 pixels starting
// there, standing in for a host that serves tile rows. Every output of every
// channel is checked once.
module tb_conv_workload;
  import reshape_pkg::*;
  localparam int TW = 8, TH = 8, CIN = 3, COUT = 4, K = 3;
  localparam int OW = TW - K + 1, OH = TH - K + 1, WN = K * CIN;
  localparam int IW = 20, IH = 20, STEP = TW - K + 1;

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
  logic [1:0] res_ch;
  logic [2:0] res_row;
  acc_t [OW-1:0] res_data;
  phase_e phase;
  int checks = 0, failures = 0;

  conv_engine #(.TILE_W(TW), .TILE_H(TH), .CIN(CIN), .COUT(COUT), .K(K)) dut (.*);

  elem_t wt [COUT][K][WN];

  // pixel (y, x), channel c of the image
  function automatic elem_t px(int y, int x, int c);
    return elem_t'((y * 53 + x * 19 + c * 7 + (y * x) % 29) & 255);
  endfunction

  always_ff @(posedge clk) begin
    logic [TW*CIN*8-1:0] d;
    int y, x;
    y = mem_req_addr / IW; x = mem_req_addr % IW;
    for (int p = 0; p < TW; p++)
      for (int c = 0; c < CIN; c++)
        d[(p*CIN + c)*8 +: 8] = (x + p < IW) ? px(y, x + p, c) : 8'sd0;
    mem_rsp_valid <= rst_n && mem_req_valid && mem_req_ready;
    mem_rsp_data  <= d;
    mem_req_ready <= ($urandom_range(0, 3) != 0);
  end

  int hits [COUT][IH-K+1][IW-K+1];

  initial begin
    cmd_valid = 0; cmd_base = 0; cmd_row_pitch = 0;
    w_wr_en = 0; w_wr_addr = 0; w_wr_data = 0;
    for (int co = 0; co < COUT; co++)
      for (int y = 0; y < IH - K + 1; y++)
        for (int x = 0; x < IW - K + 1; x++) hits[co][y][x] = 0;
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
    for (int ty = 0; ty + TH <= IH; ty += STEP)
      for (int tx = 0; tx + TW <= IW; tx += STEP) begin
        automatic int n = 0;
        while (!cmd_ready) @(negedge clk);
        cmd_valid = 1; cmd_base = ty * IW + tx; cmd_row_pitch = IW;
        @(negedge clk);
        cmd_valid = 0;
        while (n < COUT * OH) begin
          if (res_valid) begin
            for (int x = 0; x < OW; x++) begin
              automatic int oy = ty + res_row, ox = tx + x;
              automatic acc_t s = 0;
              for (int i = 0; i < K; i++)
                for (int j = 0; j < K; j++)
                  for (int c = 0; c < CIN; c++)
                    s += acc_t'(px(oy + i, ox + j, c)) * acc_t'(wt[res_ch][i][j*CIN + c]);
              checks++;
              hits[res_ch][oy][ox]++;
              if (res_data[x] != s) begin
                failures++;
                $display("FAIL out[%0d][%0d][%0d]=%0d exp %0d", res_ch, oy, ox, res_data[x], s);
              end
            end
            n++;
          end
          @(negedge clk);
        end
      end
    // every valid output position of every channel produced exactly once
    for (int co = 0; co < COUT; co++)
      for (int y = 0; y < IH - K + 1; y++)
        for (int x = 0; x < IW - K + 1; x++) begin
          checks++;
          if (hits[co][y][x] != 1) begin
            failures++; $display("FAIL output %0d,%0d,%0d seen %0d times", co, y, x, hits[co][y][x]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
