// tb_repeat_addr_gen: checks the repeated-row address stream.
// First the 8x8 example with each row emitted 8 times and the consumer always
// ready: the sequence must match row*8+col in order, with one valid address
// every cycle (exactly 8*8*8 cycles from the first address to done) and 7
// row-repeat signals per row. Then a second configuration with a base, a
// row pitch larger than the row, and a randomly stalling consumer.
module tb_repeat_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, out_ready, out_valid, out_row_last, out_last, repeat_row, done;
  logic [31:0] cfg_base, cfg_row_step, cfg_rows, cfg_cols, cfg_repeat, out_addr;
  int checks = 0, failures = 0;

  repeat_addr_gen dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: addr=%0d", what, $time, out_addr);
    end
  endtask

  task automatic run(input int base, input int pitch, input int rows, input int cols,
                     input int rep, input bit stall);
    int n = 0, cycles = 0, reps = 0;
    int total = rows * cols * rep;
    @(negedge clk);
    start = 1; cfg_base = base; cfg_row_step = pitch;
    cfg_rows = rows; cfg_cols = cols; cfg_repeat = rep;
    @(negedge clk);
    start = 0;
    while (n < total && cycles < 100000) begin
      out_ready = stall ? 1'($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      cycles++;
      if (!stall) check(out_valid, "valid every cycle");
      if (out_valid && out_ready) begin
        int r = n / (cols * rep), c = n % cols;
        check(out_addr == 32'(base + r * pitch + c), "address");
        check(out_row_last == (c == cols - 1), "row_last");
        check(out_last == (n == total - 1), "last");
        check(done == (n == total - 1), "done");
        if (repeat_row) reps++;
        n++;
      end
      @(negedge clk);
    end
    #1;
    check(!out_valid, "idle after done");
    check(reps == rows * (rep - 1), "repeat_row count");
    if (!stall) check(cycles == total, "one address per cycle");
    out_ready = 1;
  endtask

  initial begin
    start = 0; out_ready = 1;
    cfg_base = 0; cfg_row_step = 0; cfg_rows = 1; cfg_cols = 1; cfg_repeat = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 8, 8, 8, 8, 0);
    run(100, 11, 5, 7, 3, 1);
    run(4, 0, 1, 12, 4, 0);   // whole block repeated
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
