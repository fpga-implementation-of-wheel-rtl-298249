// tb_fpu_token_ring: self-checking test of the FPU sharing ring.
// Five masters all try to use the FPU at once. Checked each step: only the token holder
// reaches the FPU (and gets its data), the others are held with waitrequest; the TOKEN
// register answers every master at once; an INFORM from a non-holder is held and moves
// nothing; an INFORM from the holder moves the token to the next master, wrapping round.
module tb_fpu_token_ring;
  import wrc_pkg::*;
  localparam int unsigned N = 5;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     m_sel [N];
  bus_req_t m_req [N];
  bus_rsp_t m_rsp [N];
  logic     s_sel;
  bus_req_t s_req;
  bus_rsp_t s_rsp;
  logic [N-1:0] grant;
  int checks = 0, failures = 0;
  int slave_writes = 0;

  fpu_token_ring #(.N(N)) dut (.clk, .rst_n, .m_sel, .m_req, .m_rsp, .s_sel, .s_req, .s_rsp,
                               .grant);

  // FPU stand-in: answers every read with a tag made of the address and written data.
  always_comb begin
    s_rsp.readdata    = s_sel ? {22'h2A5A5, s_req.addr} : 32'd0;
    s_rsp.waitrequest = 1'b0;
  end
  always_ff @(posedge clk) if (s_sel && s_req.write) slave_writes <= slave_writes + 1;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle_all();
    for (int m = 0; m < N; m++) begin
      m_sel[m] = 1'b0;
      m_req[m] = BUS_REQ_IDLE;
    end
  endtask

  task automatic set(int m, logic [2:0] off, logic rd, logic wr);
    m_sel[m] = 1'b1;
    m_req[m] = '{addr: {7'd0, off}, read: rd, write: wr, writedata: 32'(m)};
  endtask

  initial begin
    int holder, w0;
    idle_all();
    repeat (2) @(posedge clk);
    rst_n  = 1'b1;
    holder = 0;
    for (int round = 0; round < 3 * N + 2; round++) begin
      // every master reads the TOKEN register
      @(negedge clk);
      idle_all();
      for (int m = 0; m < N; m++) set(m, FPU_REG_TOKEN, 1'b1, 1'b0);
      #2;
      check(grant == N'(1) << holder, "grant one-hot at holder");
      for (int m = 0; m < N; m++) begin
        check(!m_rsp[m].waitrequest, "TOKEN read waits");
        check(m_rsp[m].readdata == 32'(m == holder), "TOKEN value");
      end
      check(!s_sel, "TOKEN read reached the FPU");
      // every master tries to read a result
      @(negedge clk);
      for (int m = 0; m < N; m++) set(m, FPU_REG_RESULT, 1'b1, 1'b0);
      #2;
      check(s_sel, "holder's read did not reach the FPU");
      for (int m = 0; m < N; m++) begin
        check(m_rsp[m].waitrequest == (m != holder), "waitrequest only for non-holders");
        if (m == holder) check(m_rsp[m].readdata == {22'h2A5A5, 10'(FPU_REG_RESULT)}, "holder data");
      end
      // every master writes an operand: only the holder's write is counted by the FPU
      w0 = slave_writes;
      @(negedge clk);
      for (int m = 0; m < N; m++) set(m, FPU_REG_A, 1'b0, 1'b1);
      #2;
      check(s_req.writedata == 32'(holder), "FPU sees the holder's write data");
      @(negedge clk);
      check(slave_writes == w0 + 1, "exactly one write reached the FPU");
      // a non-holder informs: held, token stays
      idle_all();
      set((holder + 1 + round % (N - 1)) % N, FPU_REG_INFORM, 1'b0, 1'b1);
      #2;
      check(m_rsp[(holder + 1 + round % (N - 1)) % N].waitrequest, "non-holder INFORM not held");
      @(negedge clk);
      check(grant == N'(1) << holder, "token moved on a non-holder INFORM");
      // the holder informs: token moves on
      idle_all();
      set(holder, FPU_REG_INFORM, 1'b0, 1'b1);
      #2;
      check(!m_rsp[holder].waitrequest, "holder INFORM held");
      check(!s_sel, "INFORM reached the FPU");
      @(negedge clk);
      idle_all();
      holder = (holder + 1) % N;
      #1;
      check(grant == N'(1) << holder, "token did not move to the next master");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
