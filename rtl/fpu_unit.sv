// fpu_unit: one bus-attached floating point unit with its operand and result FIFOs.
//
// The accelerator gives each processor group a set of four such units (adder/subtractor,
// multiplier, divider, square root); OP picks the core. A processor writes the first
// operand, then writes the second operand to a "go" register, which queues the pair in
// the operand FIFO; the unit starts the core whenever the core can take an operation, one
// is queued and the result FIFO will have room, and pushes each result into the result FIFO.
// A processor can therefore queue several operations back to back and collect the results
// later, and several units compute at the same time. The document gives the FIFO inside
// each FPU and the write-operands/read-result access; the register layout, FIFO depths and
// use of waitrequest are this design's choices.
//
// Registers (word offsets in the unit's 8-word window, see wrc_pkg):
//   0 A         write  first operand (ignored by the square root)
//   1 B_GO      write  second operand (the radicand for the square root); queue A op B
//   2 B_GOSUB   write  as B_GO, but the adder computes A - B
//   3 RESULT    read   oldest result, removed; waitrequest while there is none
//   4 STATUS    read   {8'b0, in the core [7:0], results waiting [7:0], queued [7:0]}
// Writing B_GO/B_GOSUB while the operand FIFO is full is held with waitrequest.
// Timing: a result is readable LAT+2 cycles after the B_GO write, LAT being the core's
// latency (7, 12, 35, 35 cycles for add, multiply, divide, square root); queued operations
// start every II cycles (3, 8, 31, 31).
module fpu_unit
  import wrc_pkg::*;
#(
  parameter fpu_op_e     OP        = FPU_ADD,
  parameter int unsigned IN_DEPTH  = 4,
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sel,
  input  bus_req_t req,
  output bus_rsp_t rsp
);

  typedef struct packed {
    logic  sub;
    fp32_t a;
    fp32_t b;
  } fpu_job_t;

  localparam int unsigned CW_IN  = $clog2(IN_DEPTH + 1);
  localparam int unsigned CW_OUT = $clog2(OUT_DEPTH + 1);

  fp32_t    op_a;
  fpu_job_t job_in, job;
  logic     in_push, in_pop, in_full, in_empty;
  logic [CW_IN-1:0] in_count;

  fp32_t    res_out, core_res;
  logic     out_push, out_pop, out_full, out_empty;
  logic [CW_OUT-1:0] out_count;

  logic     core_start, core_busy, core_done;
  logic [7:0] inflight;   // operations started in the core whose result is not out yet

  wire [2:0] off = req.addr[2:0];
  wire wr_go  = sel && req.write && (off == FPU_REG_B_GO || off == FPU_REG_B_GOSUB);
  wire rd_res = sel && req.read && off == FPU_REG_RESULT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) op_a <= '0;
    else if (sel && req.write && off == FPU_REG_A) op_a <= req.writedata;
  end

  assign job_in  = '{sub: (off == FPU_REG_B_GOSUB), a: op_a, b: req.writedata};
  assign in_push = wr_go && !in_full;
  assign out_pop = rd_res && !out_empty;

  sync_fifo #(.WIDTH($bits(fpu_job_t)), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n, .push(in_push), .wdata(job_in), .pop(in_pop), .rdata(job),
    .full(in_full), .empty(in_empty), .count(in_count));

  // Start the core only if its result is sure to find a free slot: every operation in
  // flight has a result slot reserved.
  assign core_start = !in_empty && !core_busy &&
                      (32'(out_count) + 32'(inflight) < OUT_DEPTH);
  assign in_pop     = core_start;
  assign out_push   = core_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       inflight <= '0;
    else if (core_start && !core_done) inflight <= inflight + 1'b1;
    else if (core_done && !core_start) inflight <= inflight - 1'b1;
  end

  generate
    case (OP)
      FPU_ADD: begin : g_core
        fp_add u_core (.clk, .rst_n, .start(core_start), .a(job.a), .b(job.b), .sub(job.sub),
                       .busy(core_busy), .done(core_done), .result(core_res));
      end
      FPU_MUL: begin : g_core
        fp_mul u_core (.clk, .rst_n, .start(core_start), .a(job.a), .b(job.b),
                       .busy(core_busy), .done(core_done), .result(core_res));
      end
      FPU_DIV: begin : g_core
        fp_div u_core (.clk, .rst_n, .start(core_start), .a(job.a), .b(job.b),
                       .busy(core_busy), .done(core_done), .result(core_res));
      end
      default: begin : g_core
        fp_sqrt u_core (.clk, .rst_n, .start(core_start), .a(job.b),
                        .busy(core_busy), .done(core_done), .result(core_res));
      end
    endcase
  endgenerate

  sync_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .push(out_push), .wdata(core_res), .pop(out_pop), .rdata(res_out),
    .full(out_full), .empty(out_empty), .count(out_count));

  always_comb begin
    rsp = '{readdata: '0, waitrequest: 1'b0};
    if (sel) begin
      if (wr_go && in_full) rsp.waitrequest = 1'b1;
      if (req.read) begin
        case (off)
          FPU_REG_RESULT: begin
            rsp.readdata    = res_out;
            rsp.waitrequest = out_empty;
          end
          FPU_REG_STATUS: rsp.readdata = {8'd0, inflight, 8'(out_count), 8'(in_count)};
          default:        rsp.readdata = '0;
        endcase
      end
    end
  end

  // A result is never pushed into a full result FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) !(out_push && out_full));

endmodule
