// wrc_accel_top: the on-chip fabric of the wheel-rail contact-law accelerator.
//
// The accelerator computes the contact forces of the four wheel-rail contact patches of a
// two-axle vehicle for each simulation step: Hertz theory gives each patch's contact
// ellipse, and Fastsim integrates the tangential traction over it. Fastsim is split by
// rows of the contact patch: the rows are independent, so they are computed in parallel by
// several processors and their forces summed at the end. The processors themselves are
// soft cores whose programs hold the algorithms; this module is everything around them:
//
//   * the Hertz side: CPU0 with a dedicated set of four FPUs (add/sub, multiply, divide,
//     square root) and port a of the dual-port memory;
//   * the Fastsim side: N_FS processors (CPU1..CPU5 by default) sharing one set of four FPUs.
//     Each shared FPU passes from processor to processor round a fixed ring (fpu_token_ring);
//   * the dual-port memory between CPU0 and CPU1, through which Hertz hands its results to
//     Fastsim, so the two parts work on different patches at the same time;
//   * a ring of FIFO memories: CPU k writes to FIFO k, which CPU k+1 reads; the last
//     Fastsim processor writes the FIFO that CPU1 reads.
//
// The processors, the program flash and its bridge, and the link to the host PC are not
// part of this module: each processor's bus master port is a port here (cpu0_* for CPU0,
// fs_*[k] for Fastsim processor k+1). The block structure, the FPU sets, the sharing of the
// Fastsim FPUs, the memory and the FIFO ring follow the document; the bus protocol, address
// map (see cpu_bus), memory and FIFO sizes are this design's choices.
//
// Timing: see cpu_bus, fpu_unit and fpu_token_ring. Everything runs on one clock `clk`
// with an active-low asynchronous reset `rst_n`.
module wrc_accel_top
  import wrc_pkg::*;
#(
  parameter int unsigned N_FS       = 5,    // Fastsim processors
  parameter int unsigned FIFO_DEPTH = 16,   // words in each inter-processor FIFO
  parameter int unsigned DM_WORDS   = 512,  // dual-port memory words
  parameter int unsigned FPU_QDEPTH = 4     // operand / result FIFO depth inside each FPU
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t cpu0_req,
  output bus_rsp_t cpu0_rsp,
  input  bus_req_t fs_req [N_FS],
  output bus_rsp_t fs_rsp [N_FS],
  output logic [N_FS-1:0] fpu_grant [4]     // which Fastsim processor holds each shared FPU
);

  localparam int unsigned DM_AW = $clog2(DM_WORDS);
  localparam fpu_op_e     OPS [4] = '{FPU_ADD, FPU_MUL, FPU_DIV, FPU_SQRT};

  // ------------------------------------------------------------------ dual-port memory
  logic              dma_en, dma_we, dmb_en, dmb_we;
  logic [DM_AW-1:0]  dma_addr, dmb_addr;
  logic [31:0]       dma_wdata, dma_rdata, dmb_wdata, dmb_rdata;

  dual_port_mem #(.WORDS(DM_WORDS)) u_dm (
    .clk,
    .a_en(dma_en), .a_we(dma_we), .a_addr(dma_addr), .a_wdata(dma_wdata), .a_rdata(dma_rdata),
    .b_en(dmb_en), .b_we(dmb_we), .b_addr(dmb_addr), .b_wdata(dmb_wdata), .b_rdata(dmb_rdata));

  // ------------------------------------------------------------------ Hertz side (CPU0)
  logic     h_fpu_sel [4];
  bus_req_t h_fpu_req;
  bus_rsp_t h_fpu_rsp [4];
  logic     h_out_push, h_in_pop;
  logic [31:0] h_out_wdata;

  cpu_bus #(.HAS_FIFO(1'b0), .HAS_DM(1'b1), .DM_AW(DM_AW)) u_bus0 (
    .clk, .rst_n, .req(cpu0_req), .rsp(cpu0_rsp),
    .fpu_sel(h_fpu_sel), .fpu_req(h_fpu_req), .fpu_rsp(h_fpu_rsp),
    .out_push(h_out_push), .out_wdata(h_out_wdata), .out_full(1'b1),
    .in_pop(h_in_pop), .in_rdata(32'd0), .in_empty(1'b1),
    .dm_en(dma_en), .dm_we(dma_we), .dm_addr(dma_addr), .dm_wdata(dma_wdata), .dm_rdata(dma_rdata));

  for (genvar u = 0; u < 4; u++) begin : g_hfpu
    fpu_unit #(.OP(OPS[u]), .IN_DEPTH(FPU_QDEPTH), .OUT_DEPTH(FPU_QDEPTH)) u_fpu (
      .clk, .rst_n, .sel(h_fpu_sel[u]), .req(h_fpu_req), .rsp(h_fpu_rsp[u]));
  end

  // ------------------------------------------------------------------ Fastsim side
  logic     f_fpu_sel [N_FS][4];
  bus_req_t f_fpu_req [N_FS];
  bus_rsp_t f_fpu_rsp [N_FS][4];

  logic        ff_push  [N_FS];
  logic [31:0] ff_wdata [N_FS];
  logic        ff_pop   [N_FS];
  logic [31:0] ff_rdata [N_FS];
  logic        ff_full  [N_FS];
  logic        ff_empty [N_FS];

  logic        fdm_en   [N_FS];
  logic        fdm_we   [N_FS];
  logic [DM_AW-1:0] fdm_addr [N_FS];
  logic [31:0] fdm_wdata [N_FS];

  for (genvar k = 0; k < N_FS; k++) begin : g_fs
    // FIFO k carries data from Fastsim processor k to processor k+1 (mod N_FS).
    localparam int unsigned PREV = (k == 0) ? N_FS - 1 : k - 1;
    logic [$clog2(FIFO_DEPTH+1)-1:0] ff_count;

    cpu_bus #(.HAS_FIFO(1'b1), .HAS_DM(k == 0), .DM_AW(DM_AW)) u_bus (
      .clk, .rst_n, .req(fs_req[k]), .rsp(fs_rsp[k]),
      .fpu_sel(f_fpu_sel[k]), .fpu_req(f_fpu_req[k]), .fpu_rsp(f_fpu_rsp[k]),
      .out_push(ff_push[k]), .out_wdata(ff_wdata[k]), .out_full(ff_full[k]),
      .in_pop(ff_pop[PREV]), .in_rdata(ff_rdata[PREV]), .in_empty(ff_empty[PREV]),
      .dm_en(fdm_en[k]), .dm_we(fdm_we[k]), .dm_addr(fdm_addr[k]), .dm_wdata(fdm_wdata[k]),
      .dm_rdata(dmb_rdata));

    sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fm (
      .clk, .rst_n, .push(ff_push[k]), .wdata(ff_wdata[k]), .pop(ff_pop[k]),
      .rdata(ff_rdata[k]), .full(ff_full[k]), .empty(ff_empty[k]), .count(ff_count));
  end

  // Only the first Fastsim processor reaches the dual-port memory.
  assign dmb_en    = fdm_en[0];
  assign dmb_we    = fdm_we[0];
  assign dmb_addr  = fdm_addr[0];
  assign dmb_wdata = fdm_wdata[0];

  for (genvar u = 0; u < 4; u++) begin : g_sfpu
    logic     m_sel [N_FS];
    bus_req_t m_req [N_FS];
    bus_rsp_t m_rsp [N_FS];
    logic     s_sel;
    bus_req_t s_req;
    bus_rsp_t s_rsp;

    for (genvar k = 0; k < N_FS; k++) begin : g_m
      assign m_sel[k]        = f_fpu_sel[k][u];
      assign m_req[k]        = f_fpu_req[k];
      assign f_fpu_rsp[k][u] = m_rsp[k];
    end

    fpu_token_ring #(.N(N_FS)) u_ring (
      .clk, .rst_n, .m_sel, .m_req, .m_rsp, .s_sel, .s_req, .s_rsp, .grant(fpu_grant[u]));

    fpu_unit #(.OP(OPS[u]), .IN_DEPTH(FPU_QDEPTH), .OUT_DEPTH(FPU_QDEPTH)) u_fpu (
      .clk, .rst_n, .sel(s_sel), .req(s_req), .rsp(s_rsp));
  end

endmodule
