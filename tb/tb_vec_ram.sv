// tb_vec_ram: fills the buffer with random words, then reads random addresses
// back-to-back and checks data and tag one cycle after each request, and
// that the response valid follows the request valid with one cycle delay.
module tb_vec_ram;
  localparam int DEPTH = 16, WIDTH = 72, TAG_W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             wr_en, rd_valid, rsp_valid;
  logic [3:0]       wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rsp_data;
  logic [TAG_W-1:0] rd_tag, rsp_tag;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  vec_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .TAG_W(TAG_W)) dut (.*);

  initial begin
    logic             exp_v;
    logic [WIDTH-1:0] exp_d;
    logic [TAG_W-1:0] exp_t;
    wr_en = 0; rd_valid = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; rd_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = 4'(i);
      wr_data = {$urandom, $urandom, $urandom};
      model[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      rd_valid = 1'($urandom_range(0, 3) != 0);
      rd_addr  = 4'($urandom);
      rd_tag   = TAG_W'($urandom);
      exp_v = rd_valid; exp_d = model[rd_addr]; exp_t = rd_tag;
      // occasionally overwrite another word in the same cycle
      wr_en   = ($urandom_range(0, 7) == 0) && (rd_addr != 4'(i));
      wr_addr = 4'(i);
      wr_data = {$urandom, $urandom, $urandom};
      @(negedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      wr_en = 0;
      checks++;
      if (rsp_valid !== exp_v || (exp_v && (rsp_data !== exp_d || rsp_tag !== exp_t))) begin
        failures++;
        $display("FAIL read %0d: valid=%0b data=%h tag=%h", i, rsp_valid, rsp_data, rsp_tag);
      end
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
