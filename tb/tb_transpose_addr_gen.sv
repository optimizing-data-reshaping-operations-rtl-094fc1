// tb_transpose_addr_gen: checks the transposed address stream of an M x N
// row-major matrix (address of element (r,c) is r*N+c; the transpose reads
// c*1 + r*N for c outer, r inner), at one address per cycle, then a tile
// fetch configuration (row pitch outer, unit step inner) under random stalls.
module tb_transpose_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, out_ready, out_valid, out_inner_last, out_last, done;
  logic [31:0] cfg_base, cfg_outer_step, cfg_outer_count, cfg_inner_step, cfg_inner_count;
  logic [31:0] out_addr;
  int checks = 0, failures = 0;

  transpose_addr_gen dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: addr=%0d", what, $time, out_addr);
    end
  endtask

  // expected address n of a run: outer index n / ic, inner n % ic
  task automatic run(input int base, input int os, input int oc, input int is, input int ic,
                     input bit stall);
    int n = 0, cycles = 0;
    @(negedge clk);
    start = 1; cfg_base = base; cfg_outer_step = os; cfg_outer_count = oc;
    cfg_inner_step = is; cfg_inner_count = ic;
    @(negedge clk);
    start = 0;
    while (n < oc * ic && cycles < 100000) begin
      out_ready = stall ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      cycles++;
      if (out_valid && out_ready) begin
        check(out_addr == 32'(base + (n / ic) * os + (n % ic) * is), "address");
        check(out_inner_last == ((n % ic) == ic - 1), "inner_last");
        check(out_last == (n == oc * ic - 1), "last");
        n++;
      end
      @(negedge clk);
    end
    #1;
    check(!out_valid, "idle after done");
    if (!stall) check(cycles == oc * ic, "one address per cycle");
    out_ready = 1;
  endtask

  initial begin
    start = 0; out_ready = 1;
    cfg_base = 0; cfg_outer_step = 0; cfg_outer_count = 1; cfg_inner_step = 0; cfg_inner_count = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // transpose of M=3 rows x N=5 columns: outer Counter<0,1,N>, inner Counter<0,N,M>
    run(0, 1, 5, 5, 3, 0);
    // transpose of 8 x 8
    run(0, 1, 8, 8, 8, 0);
    // tile of 4 rows x 3 words inside a matrix with 10 words per row
    run(23, 10, 4, 1, 3, 1);
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
