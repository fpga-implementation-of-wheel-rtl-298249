// cpu_bus: one processor's port onto the accelerator's memory-mapped bus.
//
// Every processor of the accelerator reaches its FPUs, its FIFO memories and (for the two
// processors that have one) the dual-port memory through one master port. This module
// decodes the word address (map in wrc_pkg), forwards the request to the selected slave
// and returns that slave's response:
//   0x000-0x01F  four FPU windows of 8 words: adder, multiplier, divider, square root
//   0x020        write: push a word into the outgoing FIFO (held while it is full)
//   0x021        read : pop a word from the incoming FIFO (held while it is empty)
//   0x022        read : {in FIFO not empty, out FIFO not full}
//   0x200-0x3FF  dual-port memory (reads take one wait cycle)
// Other addresses read as zero and ignore writes. The document shows only a shared bus
// joining processors, FPUs and memories; this address map, the decoder and the wait
// behaviour are this design's choices.
//
// Rules, checked by assertions: a request never reads and writes at once, and a held
// request stays unchanged until waitrequest falls.
//
// Timing: FPU and FIFO accesses complete in the cycle they are issued unless the slave
// asserts waitrequest; a dual-port memory read is held for exactly one cycle while the
// memory reads, a write completes at once. HAS_FIFO / HAS_DM = 0 leaves those slaves out
// (their inputs are then unused and their outputs idle).
module cpu_bus
  import wrc_pkg::*;
#(
  parameter bit          HAS_FIFO = 1'b1,
  parameter bit          HAS_DM   = 1'b1,
  parameter int unsigned DM_AW    = 9
) (
  input  logic     clk,
  input  logic     rst_n,
  // processor side
  input  bus_req_t req,
  output bus_rsp_t rsp,
  // four FPU windows
  output logic     fpu_sel [4],
  output bus_req_t fpu_req,
  input  bus_rsp_t fpu_rsp [4],
  // FIFO memories: outgoing (write side) and incoming (read side)
  output logic     out_push,
  output logic [31:0] out_wdata,
  input  logic     out_full,
  output logic     in_pop,
  input  logic [31:0] in_rdata,
  input  logic     in_empty,
  // dual-port memory port
  output logic     dm_en,
  output logic     dm_we,
  output logic [DM_AW-1:0] dm_addr,
  output logic [31:0] dm_wdata,
  input  logic [31:0] dm_rdata
);

  bus_sel_e   sel;
  logic       dm_rd_pending;
  wire        access = req.read || req.write;

  assign sel     = bus_decode(req.addr);
  assign fpu_req = req;

  always_comb begin
    for (int u = 0; u < 4; u++) fpu_sel[u] = access && (sel == SEL_FPU) && (req.addr[4:3] == 2'(u));
  end

  // FIFO memories
  assign out_wdata = req.writedata;
  assign out_push  = HAS_FIFO && req.write && req.addr == MAP_FIFO_OUT && !out_full;
  assign in_pop    = HAS_FIFO && req.read && req.addr == MAP_FIFO_IN && !in_empty;

  // Dual-port memory: a read is issued in its first cycle and answered in the second.
  assign dm_en    = HAS_DM && sel == SEL_DM && (req.write || (req.read && !dm_rd_pending));
  assign dm_we    = req.write;
  assign dm_addr  = req.addr[DM_AW-1:0];
  assign dm_wdata = req.writedata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dm_rd_pending <= 1'b0;
    else        dm_rd_pending <= HAS_DM && sel == SEL_DM && req.read && !dm_rd_pending;
  end

  always_comb begin
    rsp = '{readdata: '0, waitrequest: 1'b0};
    if (access) begin
      case (sel)
        SEL_FPU: rsp = fpu_rsp[req.addr[4:3]];
        SEL_FIFO: if (HAS_FIFO) begin
          if (req.addr == MAP_FIFO_OUT && req.write) rsp.waitrequest = out_full;
          if (req.addr == MAP_FIFO_IN && req.read) begin
            rsp.readdata    = in_rdata;
            rsp.waitrequest = in_empty;
          end
          if (req.addr == MAP_FIFO_STAT && req.read) rsp.readdata = {30'd0, !in_empty, !out_full};
        end
        SEL_DM: if (HAS_DM && req.read) begin
          rsp.readdata    = dm_rdata;
          rsp.waitrequest = !dm_rd_pending;
        end
        default: ;
      endcase
    end
  end

  // Bus rules for the processor: never read and write at once, and hold a request unchanged
  // while it is being held off with waitrequest.
  assert property (@(posedge clk) disable iff (!rst_n) !(req.read && req.write));
  assert property (@(posedge clk) disable iff (!rst_n) (access && rsp.waitrequest) |=> req == $past(req));

endmodule
