// tb_fpu_share_timing: one adder used by one processor, and shared by three.
//
// Each processor loops: 28 cycles preparing operands, one access to the adder (write A,
// write B_GO, read the result), then 10 cycles using the result. With a processor of its
// own the adder sits idle most of the time. When three processors share one adder in
// rotation, each informs the next after its access, so their preparation overlaps the
// others' accesses and the adder delivers results about three times as often. The test
// runs both arrangements on the accelerator fabric (one and three Fastsim processors),
// checks every sum, measures the steady-state cycles per result, and requires the shared
// adder to deliver at least 2.5 times as many results per cycle as the dedicated one.
module tb_fpu_share_timing;
  import wrc_pkg::*;
  import tb_fp_pkg::*;

  localparam int PRE  = 28;
  localparam int POST = 10;
  localparam int OPS  = 40;     // results per processor

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  bus_req_t c0_req1, c0_req3;
  bus_rsp_t c0_rsp1, c0_rsp3;
  bus_req_t fs_req1 [1];
  bus_rsp_t fs_rsp1 [1];
  bus_req_t fs_req3 [3];
  bus_rsp_t fs_rsp3 [3];
  logic [0:0] grant1 [4];
  logic [2:0] grant3 [4];

  wrc_accel_top #(.N_FS(1)) dut1 (.clk, .rst_n, .cpu0_req(c0_req1), .cpu0_rsp(c0_rsp1),
                                  .fs_req(fs_req1), .fs_rsp(fs_rsp1), .fpu_grant(grant1));
  wrc_accel_top #(.N_FS(3)) dut3 (.clk, .rst_n, .cpu0_req(c0_req3), .cpu0_rsp(c0_rsp3),
                                  .fs_req(fs_req3), .fs_rsp(fs_rsp3), .fpu_grant(grant3));

  int checks = 0, failures = 0;

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
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // sys 1: the single-processor fabric, sys 3: the three-processor fabric
  task automatic xfer(int sys, int p, bus_addr_t a, logic wr, logic [31:0] wd,
                      output logic [31:0] rd);
    bus_req_t r;
    r = '{addr: a, read: !wr, write: wr, writedata: wd};
    @(negedge clk);
    if (sys == 1) fs_req1[p] = r; else fs_req3[p] = r;
    #4;
    while ((sys == 1) ? fs_rsp1[p].waitrequest : fs_rsp3[p].waitrequest) begin
      @(negedge clk);
      #4;
    end
    rd = (sys == 1) ? fs_rsp1[p].readdata : fs_rsp3[p].readdata;
    @(posedge clk);
    #1;
    if (sys == 1) fs_req1[p] = BUS_REQ_IDLE; else fs_req3[p] = BUS_REQ_IDLE;
  endtask

  longint t_result [2][$];

  task automatic processor(int sys, int p);
    logic [31:0] d;
    fp32_t x, y;
    for (int i = 0; i < OPS; i++) begin
      repeat (PRE) @(posedge clk);
      x = F(real'(i) + 0.25 * real'(p));
      y = F(1.5);
      xfer(sys, p, FPU_REG_A, 1'b1, x, d);
      xfer(sys, p, FPU_REG_B_GO, 1'b1, y, d);
      xfer(sys, p, FPU_REG_RESULT, 1'b0, 0, d);
      t_result[sys == 1 ? 0 : 1].push_back(cycle);
      check(d == F(real'(i) + 0.25 * real'(p) + 1.5), "sum");
      if (sys == 3) xfer(sys, p, FPU_REG_INFORM, 1'b1, 0, d);
      repeat (POST) @(posedge clk);
    end
  endtask

  function automatic fp32_t F(real r);
    return real_to_fp(r);
  endfunction

  // steady-state cycles per result: skip the first quarter of the results
  function automatic real period(int s);
    int n, k0;
    n  = t_result[s].size();
    k0 = n / 4;
    return real'(t_result[s][n-1] - t_result[s][k0]) / real'(n - 1 - k0);
  endfunction

  initial begin
    real p1, p3;
    c0_req1 = BUS_REQ_IDLE;
    c0_req3 = BUS_REQ_IDLE;
    fs_req1[0] = BUS_REQ_IDLE;
    for (int k = 0; k < 3; k++) fs_req3[k] = BUS_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      processor(1, 0);
      processor(3, 0);
      processor(3, 1);
      processor(3, 2);
    join
    p1 = period(0);
    p3 = period(1);
    $display("dedicated adder: one result per %0.1f cycles; shared by three: one per %0.1f cycles",
             p1, p3);
    check(t_result[0].size() == OPS && t_result[1].size() == 3 * OPS, "result counts");
    check(p1 >= real'(PRE + POST + LAT_ADD), "dedicated adder faster than its loop allows");
    check(p1 / p3 >= 2.5, "sharing did not bring the adder's rate up by 2.5 times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
