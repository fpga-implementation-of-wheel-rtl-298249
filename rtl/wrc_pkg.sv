// wrc_pkg: types and constants shared by the wheel-rail contact-law accelerator.
//
// The accelerator is a set of bus-attached single-precision floating point units (FPUs),
// a dual-port memory and a ring of FIFO memories, all reached by the processors over a
// simple word-addressed memory-mapped bus. This package holds:
//   * the IEEE-754 single-precision word type and its field helpers,
//   * the per-operation latencies of the FPU cores (the cycle counts listed for the
//     open-source FPU the design is built around: add/sub 7, multiply 12, divide 35,
//     square root 35) and the start-to-start intervals when operations follow each other
//     (3, 8, 31, 31),
//   * the bus request/response structs (an Avalon-MM-like master port with waitrequest),
//   * the word address map every processor sees.
package wrc_pkg;

  typedef logic [31:0] fp32_t;

  // Which arithmetic core an FPU slot holds.
  typedef enum logic [1:0] {
    FPU_ADD  = 2'd0,
    FPU_MUL  = 2'd1,
    FPU_DIV  = 2'd2,
    FPU_SQRT = 2'd3
  } fpu_op_e;

  // Cycles from the start pulse of a core to its done pulse.
  localparam int unsigned LAT_ADD  = 7;
  localparam int unsigned LAT_MUL  = 12;
  localparam int unsigned LAT_DIV  = 35;
  localparam int unsigned LAT_SQRT = 35;

  // Cycles between starts when operations follow each other (the "pipelined operation"
  // figures of the same FPU: add/sub 3, multiply 8, divide 31, square root 31).
  localparam int unsigned II_ADD  = 3;
  localparam int unsigned II_MUL  = 8;
  localparam int unsigned II_DIV  = 31;
  localparam int unsigned II_SQRT = 31;

  function automatic int unsigned fpu_interval(fpu_op_e op);
    case (op)
      FPU_ADD:  return II_ADD;
      FPU_MUL:  return II_MUL;
      FPU_DIV:  return II_DIV;
      default:  return II_SQRT;
    endcase
  endfunction

  function automatic int unsigned fpu_latency(fpu_op_e op);
    case (op)
      FPU_ADD:  return LAT_ADD;
      FPU_MUL:  return LAT_MUL;
      FPU_DIV:  return LAT_DIV;
      default:  return LAT_SQRT;
    endcase
  endfunction

  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  function automatic fp32_t fp_inf(logic s);
    return {s, 8'hFF, 23'd0};
  endfunction

  function automatic fp32_t fp_zero(logic s);
    return {s, 31'd0};
  endfunction

  // ---------------------------------------------------------------------------------------
  // Processor bus: word addresses, single-cycle request, slave holds the master with
  // waitrequest until the access completes; readdata is valid in the cycle waitrequest
  // is low.
  // ---------------------------------------------------------------------------------------
  localparam int unsigned BUS_AW = 10;
  typedef logic [BUS_AW-1:0] bus_addr_t;

  typedef struct packed {
    bus_addr_t   addr;
    logic        read;
    logic        write;
    logic [31:0] writedata;
  } bus_req_t;

  typedef struct packed {
    logic [31:0] readdata;
    logic        waitrequest;
  } bus_rsp_t;

  localparam bus_req_t BUS_REQ_IDLE = '{addr: '0, read: 1'b0, write: 1'b0, writedata: '0};
  localparam bus_rsp_t BUS_RSP_IDLE = '{readdata: '0, waitrequest: 1'b0};

  // Register offsets inside one FPU window (8 words).
  localparam logic [2:0] FPU_REG_A       = 3'd0; // write: first operand
  localparam logic [2:0] FPU_REG_B_GO    = 3'd1; // write: second operand, queue the operation
  localparam logic [2:0] FPU_REG_B_GOSUB = 3'd2; // write: second operand, queue a - b (adder)
  localparam logic [2:0] FPU_REG_RESULT  = 3'd3; // read: pop one result (waits while none)
  localparam logic [2:0] FPU_REG_STATUS  = 3'd4; // read: {.., results waiting, operands waiting}
  localparam logic [2:0] FPU_REG_INFORM  = 3'd5; // write: pass the FPU on (shared set only)
  localparam logic [2:0] FPU_REG_TOKEN   = 3'd6; // read: 1 when this processor holds the FPU

  // Word address map seen by every processor.
  //   0x000-0x007 adder, 0x008-0x00F multiplier, 0x010-0x017 divider, 0x018-0x01F square root
  //   0x020 FIFO out (write), 0x021 FIFO in (read), 0x022 FIFO status
  //   0x200-0x3FF dual-port memory window
  localparam bus_addr_t MAP_FPU_BASE   = 10'h000; // 4 windows of 8 words
  localparam bus_addr_t MAP_FIFO_OUT   = 10'h020;
  localparam bus_addr_t MAP_FIFO_IN    = 10'h021;
  localparam bus_addr_t MAP_FIFO_STAT  = 10'h022;
  localparam bus_addr_t MAP_DM_BASE    = 10'h200;

  // Which slave a bus address selects.
  typedef enum logic [2:0] {
    SEL_FPU  = 3'd0,
    SEL_FIFO = 3'd1,
    SEL_DM   = 3'd2,
    SEL_NONE = 3'd3
  } bus_sel_e;

  function automatic bus_sel_e bus_decode(bus_addr_t a);
    if (a[9])                   return SEL_DM;
    else if (a[9:5] == 5'd0)    return SEL_FPU;
    else if (a[9:2] == 8'h08)   return SEL_FIFO;
    else                        return SEL_NONE;
  endfunction

  // Round a normalised significand to nearest, ties to even, and pack it.
  //   mant : 24 bits with the hidden 1 at bit 23, exp : biased exponent of that value,
  //   g    : first bit below mant, st : OR of every bit below g.
  // A result above the largest normal becomes infinity; one below the smallest normal is
  // flushed to zero (subnormals are not produced).
  function automatic fp32_t fp_round_pack(logic s, int exp, logic [23:0] mant, logic g, logic st);
    logic [24:0] m;
    int          e;
    m = {1'b0, mant} + {24'd0, g & (st | mant[0])};
    e = exp;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255)     return fp_inf(s);
    else if (e <= 0)  return fp_zero(s);
    else              return {s, e[7:0], m[22:0]};
  endfunction

  function automatic logic fp_is_nan(fp32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic logic fp_is_inf(fp32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction

  // Zero, with subnormal inputs read as zero.
  function automatic logic fp_is_zero(fp32_t x);
    return x[30:23] == 8'h00;
  endfunction

endpackage
