// tb_fp_add: self-checking test of the single-precision adder/subtractor.
// Random operands (wide and close exponents, cancellation cases) and special values are
// compared with a double-precision reference rounded to single; every operation must take
// exactly LAT_ADD cycles from start to done, also when operations are started back to back
// every II_ADD cycles.
module tb_fp_add;
  import wrc_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  logic  sub = 1'b0;
  fp32_t a = '0, b = '0;
  logic  busy, done;
  fp32_t result;
  int    checks = 0, failures = 0;

  fp_add dut (.clk, .rst_n, .start, .a, .b, .sub, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fp32_t x, fp32_t y, logic s);
    int    cyc;
    fp32_t exp;
    real   rx, ry;
    rx  = fp_to_real(x);
    ry  = fp_to_real(y);
    exp = real_to_fp(s ? rx - ry : rx + ry);
    if (is_nan(x) || is_nan(y)) exp = 32'h7FC0_0000;
    @(negedge clk);
    a = x; b = y; sub = s; start = 1'b1;
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
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", x, s ? "-" : "+", y, result, exp);
    end
    checks++;
    if (cyc != LAT_ADD) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d, expected %0d", cyc, LAT_ADD);
    end
  endtask

  function automatic fp32_t ref_result(fp32_t x, fp32_t y, logic s);
    real rx, ry;
    rx = fp_to_real(x);
    ry = fp_to_real(y);
    if (is_nan(x) || is_nan(y)) return 32'h7FC0_0000;
    return real_to_fp(s ? rx - ry : rx + ry);
  endfunction

  // Back to back: a new operand set is offered whenever the core is not busy, so it starts
  // one every II_ADD cycles; each result must come out LAT_ADD cycles after its own start.
  task automatic stream(int n);
    fp32_t exp_q[$];
    int    t_q[$];
    int    k = 0, sent = 0, last = 0;
    fp32_t x, y;
    logic  s;
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
          if (k - t_q[0] != int'(LAT_ADD)) begin
            failures++;
            if (failures < 10) $display("FAIL stream latency %0d", k - t_q[0]);
          end
          void'(exp_q.pop_front());
          void'(t_q.pop_front());
        end
      end
      start = 1'b0;
      if (sent < n && !busy) begin
        x = rand_fp(100, 150);
        y = rand_fp(100, 150);
        s = 1'($urandom);
        a = x; b = y; sub = s;
        start = 1'b1;
        exp_q.push_back(ref_result(x, y, s));
        t_q.push_back(k);
        if (sent > 0) begin
          checks++;
          if (k - last != int'(II_ADD)) begin
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
    fp32_t x, y;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // special values
    run(32'h3F80_0000, 32'h3F80_0000, 1'b0);          // 1 + 1
    run(32'h3F80_0000, 32'h3F80_0000, 1'b1);          // 1 - 1 = +0
    run(32'h7F80_0000, 32'h7F80_0000, 1'b1);          // inf - inf = NaN
    run(32'h7F80_0000, 32'h3F80_0000, 1'b0);          // inf + 1
    run(32'h0000_0000, 32'h8000_0000, 1'b0);          // 0 + -0
    run(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);          // overflow
    run(32'h0080_0001, 32'h0080_0000, 1'b1);          // underflow flushed
    run(32'h3F80_0000, 32'h3380_0000, 1'b0);          // tie to even
    run(32'h3F80_0001, 32'h3380_0000, 1'b0);          // tie, round up
    for (int i = 0; i < 3000; i++) begin
      x = rand_fp(90, 160);
      y = rand_fp(90, 160);
      run(x, y, 1'($urandom));
    end
    for (int i = 0; i < 3000; i++) begin
      x = rand_fp(120, 130);
      y = {x[31:23] ^ {1'($urandom), 8'd0}, x[22:0] ^ 23'($urandom % 64)};
      if ($urandom % 2) y[30:23] = y[30:23] - 1;
      run(x, y, 1'($urandom));
    end
    stream(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
