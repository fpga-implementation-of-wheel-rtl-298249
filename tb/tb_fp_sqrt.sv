// tb_fp_sqrt: self-checking test of the single-precision square root.
// Random operands of both exponent parities and special values are
// compared with a double-precision reference rounded to single; every operation must take
// exactly LAT_SQRT cycles from start to done, also when operations are started back to back
// every II_SQRT cycles.
module tb_fp_sqrt;
  import wrc_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  fp32_t a = '0;
  logic  busy, done;
  fp32_t result;
  int    checks = 0, failures = 0;

  fp_sqrt dut (.clk, .rst_n, .start, .a, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fp32_t x);
    int    cyc;
    fp32_t exp;
    real   rx;
    rx  = fp_to_real(x);
    if (x[31] && x[30:23] != 0) exp = 32'h7FC0_0000;
    else if (x[30:23] == 0)     exp = {x[31], 31'd0};
    else                        exp = real_to_fp($sqrt(rx));
    if (is_nan(x)) exp = 32'h7FC0_0000;
    @(negedge clk);
    a = x; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!fp_same(result, exp)) begin
      failures++;
      if (failures < 10) $display("FAIL sqrt(%h) = %h, expected %h", x, result, exp);
    end
    checks++;
    if (cyc != LAT_SQRT) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d, expected %0d", cyc, LAT_SQRT);
    end
  endtask

  function automatic fp32_t ref_result(fp32_t x);
    if (is_nan(x)) return 32'h7FC0_0000;
    if (x[31] && x[30:23] != 0) return 32'h7FC0_0000;
    if (x[30:23] == 0) return {x[31], 31'd0};
    return real_to_fp($sqrt(fp_to_real(x)));
  endfunction

  // Back to back: a new operand set is offered whenever the core is not busy, so it starts
  // one every II_SQRT cycles; each result must come out LAT_SQRT cycles after its own start.
  task automatic stream(int n);
    fp32_t exp_q[$];
    int    t_q[$];
    int    k = 0, sent = 0, last = 0;
    fp32_t x;
    while (sent < n || exp_q.size() != 0) begin
      @(negedge clk);
      k++;
      if (done) begin
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL done without an operation");
        end else begin
          if (!fp_same(result, exp_q[0])) begin
            failures++;
            if (failures < 10) $display("FAIL stream result %h, expected %h", result, exp_q[0]);
          end
          if (k - t_q[0] != int'(LAT_SQRT)) begin
            failures++;
            if (failures < 10) $display("FAIL stream latency %0d", k - t_q[0]);
          end
          void'(exp_q.pop_front());
          void'(t_q.pop_front());
        end
      end
      start = 1'b0;
      if (sent < n && !busy) begin
        x = rand_fp(1, 254);
        a = x;
        start = 1'b1;
        exp_q.push_back(ref_result(x));
        t_q.push_back(k);
        if (sent > 0) begin
          checks++;
          if (k - last != int'(II_SQRT)) begin
            failures++;
            if (failures < 10) $display("FAIL stream interval %0d", k - last);
          end
        end
        last = k;
        sent++;
      end
    end
  endtask

  initial begin
    fp32_t x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // special values
    run(32'h3F80_0000);          // 1
    run(32'h4080_0000);          // 4
    run(32'h4000_0000);          // 2
    run(32'h8000_0000);          // -0
    run(32'hBF80_0000);          // -1 = NaN
    run(32'h7F80_0000);          // inf
    run(32'h0080_0000);          // smallest normal
    run(32'h7F7F_FFFF);          // largest normal
    for (int i = 0; i < 3000; i++) begin
      x = rand_fp(1, 254);
      x[31] = 1'b0;
      run(x);
    end
    stream(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
