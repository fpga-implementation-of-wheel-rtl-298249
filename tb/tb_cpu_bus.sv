// tb_cpu_bus: self-checking test of one processor's bus port.
// Stand-in slaves sit behind the decoder: four FPU windows that answer with their index
// and can hold the bus, an outgoing and an incoming FIFO whose full/empty the test sets,
// and a word memory with one-cycle read latency. Checked: FPU window selection and data,
// FPU waitrequest passed back, FIFO push/pop and their holds, FIFO status, dual-port
// memory write and read (exactly one wait cycle), unmapped addresses.
module tb_cpu_bus;
  import wrc_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic     fpu_sel [4];
  bus_req_t fpu_req;
  bus_rsp_t fpu_rsp [4];
  logic     out_push, in_pop, out_full, in_empty;
  logic [31:0] out_wdata, in_rdata;
  logic     dm_en, dm_we;
  logic [8:0] dm_addr;
  logic [31:0] dm_wdata, dm_rdata;
  logic     fpu_hold [4];
  logic [31:0] mem [512];
  int checks = 0, failures = 0;
  int pushes = 0, pops = 0;

  cpu_bus dut (.clk, .rst_n, .req, .rsp, .fpu_sel, .fpu_req, .fpu_rsp, .out_push, .out_wdata,
               .out_full, .in_pop, .in_rdata, .in_empty, .dm_en, .dm_we, .dm_addr, .dm_wdata,
               .dm_rdata);

  always_comb begin
    for (int u = 0; u < 4; u++) begin
      fpu_rsp[u].readdata    = 32'h100 + 32'(u);
      fpu_rsp[u].waitrequest = fpu_hold[u];
    end
  end
  always_ff @(posedge clk) begin
    if (dm_en && dm_we)  mem[dm_addr] <= dm_wdata;
    if (dm_en && !dm_we) dm_rdata <= mem[dm_addr];
    if (out_push) pushes <= pushes + 1;
    if (in_pop)   pops <= pops + 1;
  end
  assign in_rdata = 32'hF1F0_0000 + 32'(pops);

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

  // One access, held while waitrequest is high (at most `limit` cycles, then abandoned).
  task automatic xfer(bus_addr_t a, logic wr, logic [31:0] wd, int limit,
                      output logic [31:0] rd, output int cycles);
    @(negedge clk);
    req = '{addr: a, read: !wr, write: wr, writedata: wd};
    cycles = 1;
    #4;
    while (rsp.waitrequest && cycles <= limit) begin
      @(negedge clk);
      #4;
      cycles++;
    end
    rd = rsp.readdata;
    @(posedge clk);
    #1;
    req = BUS_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] rd;
    int cyc, p0;
    req = BUS_REQ_IDLE;
    out_full = 1'b0;
    in_empty = 1'b0;
    for (int u = 0; u < 4; u++) fpu_hold[u] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // FPU windows
    for (int u = 0; u < 4; u++) begin
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        req = '{addr: bus_addr_t'(u * 8 + r), read: 1'b1, write: 1'b0, writedata: 0};
        #2;
        for (int v = 0; v < 4; v++) check(fpu_sel[v] == (v == u), "FPU window select");
        check(fpu_req.addr[2:0] == 3'(r), "FPU register offset");
        check(rsp.readdata == 32'h100 + 32'(u) && !rsp.waitrequest, "FPU read data");
      end
      fpu_hold[u] = 1'b1;
      #1;
      check(rsp.waitrequest, "FPU waitrequest not passed back");
      fpu_hold[u] = 1'b0;
    end
    @(negedge clk);
    req = BUS_REQ_IDLE;
    #1;
    for (int v = 0; v < 4; v++) check(!fpu_sel[v], "FPU selected while idle");
    // outgoing FIFO
    p0 = pushes;
    xfer(MAP_FIFO_OUT, 1'b1, 32'hCAFE, 4, rd, cyc);
    check(cyc == 1 && pushes == p0 + 1, "FIFO push");
    out_full = 1'b1;
    xfer(MAP_FIFO_STAT, 1'b0, 0, 4, rd, cyc);
    check(rd == 32'b10, "FIFO status, out full");
    // the FIFO gets room after three held cycles
    fork
      begin
        repeat (3) @(posedge clk);
        #2 out_full = 1'b0;
      end
      xfer(MAP_FIFO_OUT, 1'b1, 32'hBEEF, 100, rd, cyc);
    join
    check(cyc == 4 && pushes == p0 + 2, "push into a full FIFO not held until there is room");
    // incoming FIFO
    p0 = pops;
    xfer(MAP_FIFO_IN, 1'b0, 0, 4, rd, cyc);
    check(cyc == 1 && rd == 32'hF1F0_0000 + 32'(p0) && pops == p0 + 1, "FIFO pop");
    in_empty = 1'b1;
    xfer(MAP_FIFO_STAT, 1'b0, 0, 4, rd, cyc);
    check(rd == 32'b01, "FIFO status, in empty");
    fork
      begin
        repeat (3) @(posedge clk);
        #2 in_empty = 1'b0;
      end
      xfer(MAP_FIFO_IN, 1'b0, 0, 100, rd, cyc);
    join
    check(cyc == 4 && pops == p0 + 2, "pop from an empty FIFO not held until there is data");
    // dual-port memory
    for (int i = 0; i < 32; i++) begin
      xfer(MAP_DM_BASE + bus_addr_t'(i * 7), 1'b1, 32'h5000 + 32'(i), 4, rd, cyc);
      check(cyc == 1, "memory write held");
    end
    for (int i = 31; i >= 0; i--) begin
      xfer(MAP_DM_BASE + bus_addr_t'(i * 7), 1'b0, 0, 4, rd, cyc);
      check(cyc == 2, "memory read not exactly one wait cycle");
      check(rd == 32'h5000 + 32'(i), "memory read data");
    end
    // unmapped
    xfer(10'h100, 1'b0, 0, 4, rd, cyc);
    check(cyc == 1 && rd == 0, "unmapped read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
