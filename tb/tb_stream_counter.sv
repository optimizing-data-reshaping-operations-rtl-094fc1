// tb_stream_counter: checks one counter dimension against a software model.
// Loads several configurations (including a step-0 repeat dimension), advances
// with a random enable, checks value/index/last/wrap every cycle, and checks
// that restart returns to the start value without a wrap.
module tb_stream_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load, advance, restart;
  logic [15:0] cfg_start, cfg_step, value;
  logic [7:0]  cfg_count, index;
  logic        last, wrap;
  int checks = 0, failures = 0;

  stream_counter #(.VAL_W(16), .CNT_W(8)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: value=%0d index=%0d last=%0b wrap=%0b", what, value, index, last, wrap);
    end
  endtask

  task automatic run(input int s, input int st, input int n, input int cycles);
    int exp_i = 0;
    @(negedge clk);
    load = 1; cfg_start = 16'(s); cfg_step = 16'(st); cfg_count = 8'(n);
    @(negedge clk);
    load = 0;
    repeat (cycles) begin
      advance = 1'($urandom_range(0, 1));
      restart = ($urandom_range(0, 15) == 0);
      #1;
      check(value == 16'(s + exp_i * st), "value");
      check(index == 8'(exp_i), "index");
      check(last == (exp_i == n - 1), "last");
      check(wrap == (advance && !restart && exp_i == n - 1), "wrap");
      @(negedge clk);
      if (restart) exp_i = 0;
      else if (advance) exp_i = (exp_i == n - 1) ? 0 : exp_i + 1;
    end
    advance = 0; restart = 0;
  endtask

  initial begin
    load = 0; advance = 0; restart = 0;
    cfg_start = 0; cfg_step = 0; cfg_count = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 3, 4, 200);
    run(100, 0, 6, 200);     // step 0: pure repeat count
    run(0, 64, 1, 50);       // single-value dimension
    run(7, 1, 13, 400);
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
