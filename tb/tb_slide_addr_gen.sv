// tb_slide_addr_gen: checks the sliding-window address stream against
// Slide<W,S> applied to a list of addresses: window w of an input
// start, start+step, ... holds elements w*S .. w*S+W-1. Two instances:
// W=3, S=1 (the convolution case) with a repeated sweep, and W=4, S=2 with a
// non-unit address step and a stalling consumer.
module tb_slide_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic        start, out_ready;
  logic [31:0] cfg_start, cfg_step, cfg_n, cfg_repeat;
  logic        v1, wl1, l1, d1, v2, wl2, l2, d2;
  logic [31:0] a1, w1, e1, r1, a2, w2, e2, r2;

  slide_addr_gen #(.WIN(3), .STRIDE(1)) dut1 (
    .clk, .rst_n, .start(start && cfg_step == 1), .cfg_start, .cfg_step, .cfg_n, .cfg_repeat,
    .out_ready, .out_valid(v1), .out_addr(a1), .out_win(w1), .out_elem(e1), .out_rep(r1),
    .out_win_last(wl1), .out_last(l1), .done(d1));

  slide_addr_gen #(.WIN(4), .STRIDE(2)) dut2 (
    .clk, .rst_n, .start(start && cfg_step != 1), .cfg_start, .cfg_step, .cfg_n, .cfg_repeat,
    .out_ready, .out_valid(v2), .out_addr(a2), .out_win(w2), .out_elem(e2), .out_rep(r2),
    .out_win_last(wl2), .out_last(l2), .done(d2));

  task automatic run(input int W, input int S, input int st, input int step, input int n,
                     input int rep, input bit stall);
    int nwin = (n - W) / S + 1;
    int total = rep * nwin * W;
    int k = 0, cycles = 0;
    @(negedge clk);
    start = 1; cfg_start = st; cfg_step = step; cfg_n = n; cfg_repeat = rep;
    @(negedge clk);
    start = 0;
    while (k < total && cycles < 100000) begin
      logic v, wl, l;
      logic [31:0] a, w, e, r;
      out_ready = stall ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      cycles++;
      if (W == 3) begin v = v1; a = a1; w = w1; e = e1; r = r1; wl = wl1; l = l1; end
      else        begin v = v2; a = a2; w = w2; e = e2; r = r2; wl = wl2; l = l2; end
      if (!stall) check(v, "valid every cycle");
      if (v && out_ready) begin
        int ew = (k / W) % nwin, ee = k % W, er = k / (W * nwin);
        check(a == 32'(st + (ew * S + ee) * step), "address");
        check(w == 32'(ew) && e == 32'(ee) && r == 32'(er), "indices");
        check(wl == (ee == W - 1), "window last");
        check(l == (k == total - 1), "last");
        k++;
      end
      @(negedge clk);
    end
    #1;
    check(!v1 && !v2, "idle after done");
    if (!stall) check(cycles == total, "one address per cycle");
    out_ready = 1;
  endtask

  initial begin
    start = 0; out_ready = 1;
    cfg_start = 0; cfg_step = 1; cfg_n = 3; cfg_repeat = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 1, 10, 1, 8, 3, 0);
    run(4, 2, 0, 2, 11, 2, 1);
    run(3, 1, 0, 1, 128, 2, 0);
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
