// tb_dot_prod: feeds random signed 8-bit vectors in reductions of 1 to 4
// vectors, with random idle cycles, and checks each sum against a software
// dot product, its arrival exactly two cycles after the closing vector, and
// that no other output is produced. Includes the extreme values -128 and 127.
module tb_dot_prod;
  import reshape_pkg::*;
  localparam int VEC = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid, in_last, out_valid;
  elem_t [VEC-1:0] in_a, in_b;
  acc_t            out_sum;
  int checks = 0, failures = 0;

  dot_prod #(.VEC(VEC)) dut (.*);

  acc_t exp_q[$];
  int   due_q[$];
  int   cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // output monitor, sampled in the middle of the cycle
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output %0d", out_sum);
      end else begin
        acc_t e;
        int   d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (out_sum !== e || cyc != d) begin
          failures++;
          $display("FAIL sum=%0d exp=%0d cycle=%0d due=%0d", out_sum, e, cyc, d);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_last = 0; in_a = '0; in_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int   len;
      acc_t sum;
      len = $urandom_range(1, 4);
      sum = 0;
      for (int v = 0; v < len; v++) begin
        for (int i = 0; i < VEC; i++) begin
          in_a[i] = (t == 0) ? -8'sd128 : elem_t'($urandom);
          in_b[i] = (t == 0) ? ((v == 0) ? -8'sd128 : 8'sd127) : elem_t'($urandom);
          sum += acc_t'(in_a[i]) * acc_t'(in_b[i]);
        end
        in_valid = 1; in_last = (v == len - 1);
        if (in_last) begin
          exp_q.push_back(sum);
          due_q.push_back(cyc + 2);
        end
        @(negedge clk);
        in_valid = 0; in_last = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL %0d sums missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
