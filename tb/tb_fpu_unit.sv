// tb_fpu_unit: self-checking test of the bus-attached FPU, one instance per core type.
// For each unit: a single operation's result and its latency on the bus (readable LAT+2
// cycles after the go write); a burst of queued operations that fills the operand FIFO
// (the go write must be held with waitrequest) with every result read back in order;
// queued operations completing one per LAT cycles;
// the STATUS register; and A - B on the adder.
module tb_fpu_unit;
  import wrc_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned Q = 4;
  localparam fpu_op_e OPS [4] = '{FPU_ADD, FPU_MUL, FPU_DIV, FPU_SQRT};

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     sel [4];
  bus_req_t req [4];
  bus_rsp_t rsp [4];
  int checks = 0, failures = 0;
  int write_waits [4];
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar u = 0; u < 4; u++) begin : g_u
    fpu_unit #(.OP(OPS[u]), .IN_DEPTH(Q), .OUT_DEPTH(Q)) dut (
      .clk, .rst_n, .sel(sel[u]), .req(req[u]), .rsp(rsp[u]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // One bus access; returns read data and the number of cycles it took (1 = no wait).
  task automatic xfer(int u, logic [2:0] off, logic wr, logic [31:0] wd,
                      output logic [31:0] rd, output int cycles);
    @(negedge clk);
    sel[u] = 1'b1;
    req[u] = '{addr: {2'b00, 5'(u * 8) | 5'(off)}, read: !wr, write: wr, writedata: wd};
    cycles = 1;
    #4;
    while (rsp[u].waitrequest) begin
      @(negedge clk);
      #4;
      cycles++;
    end
    rd = rsp[u].readdata;
    @(posedge clk);
    #1;
    sel[u] = 1'b0;
    req[u] = BUS_REQ_IDLE;
  endtask

  function automatic fp32_t expect_of(int u, fp32_t x, fp32_t y, logic s);
    real rx, ry;
    rx = fp_to_real(x);
    ry = fp_to_real(y);
    case (u)
      0: return real_to_fp(s ? rx - ry : rx + ry);
      1: return real_to_fp(rx * ry);
      2: return real_to_fp(rx / ry);
      default: return real_to_fp($sqrt(ry));
    endcase
  endfunction

  function automatic fp32_t operand(int u);
    fp32_t v;
    v = rand_fp(110, 140);
    if (u == 3) v[31] = 1'b0;
    return v;
  endfunction

  initial begin
    logic [31:0] rd;
    int          cyc;
    fp32_t       xa [8], xb [8];
    logic        xs [8];
    for (int u = 0; u < 4; u++) begin
      sel[u] = 1'b0;
      req[u] = BUS_REQ_IDLE;
      write_waits[u] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 4; u++) begin
      // single operation and its latency
      xa[0] = operand(u);
      xb[0] = operand(u);
      xfer(u, FPU_REG_A, 1'b1, xa[0], rd, cyc);
      xfer(u, FPU_REG_B_GO, 1'b1, xb[0], rd, cyc);
      xfer(u, FPU_REG_RESULT, 1'b0, 0, rd, cyc);
      check(fp_same(rd, expect_of(u, xa[0], xb[0], 1'b0)), "single result");
      check(cyc == int'(fpu_latency(OPS[u])) + 2, $sformatf("unit %0d latency %0d", u, cyc));
      // burst of 8 operations queued without reading
      for (int i = 0; i < 8; i++) begin
        xa[i] = operand(u);
        xb[i] = operand(u);
        xs[i] = (u == 0) ? 1'($urandom) : 1'b0;
        xfer(u, FPU_REG_A, 1'b1, xa[i], rd, cyc);
        xfer(u, xs[i] ? FPU_REG_B_GOSUB : FPU_REG_B_GO, 1'b1, xb[i], rd, cyc);
        if (cyc > 1) write_waits[u]++;
      end
      xfer(u, FPU_REG_STATUS, 1'b0, 0, rd, cyc);
      check(rd[23:16] + rd[15:8] + rd[7:0] == 8, "STATUS accounts for all 8 operations");
      for (int i = 0; i < 8; i++) begin
        xfer(u, FPU_REG_RESULT, 1'b0, 0, rd, cyc);
        check(fp_same(rd, expect_of(u, xa[i], xb[i], xs[i])),
              $sformatf("unit %0d burst result %0d: %h", u, i, rd));
      end
      xfer(u, FPU_REG_STATUS, 1'b0, 0, rd, cyc);
      check(rd == 0, "STATUS empty after the burst");
      // throughput: three queued operations start II cycles apart
      begin
        longint t0;
        for (int i = 0; i < 3; i++) begin
          xa[i] = operand(u);
          xb[i] = operand(u);
          xfer(u, FPU_REG_A, 1'b1, xa[i], rd, cyc);
          xfer(u, FPU_REG_B_GO, 1'b1, xb[i], rd, cyc);
          if (i == 0) t0 = cycle;
        end
        for (int i = 0; i < 3; i++) begin
          xfer(u, FPU_REG_RESULT, 1'b0, 0, rd, cyc);
          check(fp_same(rd, expect_of(u, xa[i], xb[i], 1'b0)), "throughput result");
        end
        check(cycle - t0 == longint'(fpu_latency(OPS[u]) + 2 * fpu_interval(OPS[u]) + 2),
              $sformatf("unit %0d: three queued operations took %0d cycles", u, cycle - t0));
      end
      if (u >= 1) check(write_waits[u] > 0, "operand FIFO never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
