// fp_add: IEEE-754 single-precision adder/subtractor with a fixed latency.
//
// The adder is one of the four floating point units the accelerator attaches to its
// processors. The document gives its function and its cycle counts (7 cycles per
// operation, 3 when operations follow each other); the datapath here is this design's
// own: the sum is formed by aligning the smaller operand (keeping guard/round/sticky
// bits), adding or subtracting the significands, renormalising and rounding to nearest-even.
// Subnormal inputs are read as zero and subnormal results are flushed to zero; NaN and
// infinity follow IEEE-754 (inf - inf gives a quiet NaN).
//
// Interface: `start` (one cycle) with `a`, `b` and `sub` (1: a - b). `busy` is high for the
// II-1 cycles after a start; `start` while busy is ignored, so a new operation can begin
// every II cycles. Each `done` pulses for one cycle exactly LAT cycles after its start
// cycle, with its `result` valid in that cycle only.
module fp_add
  import wrc_pkg::*;
#(
  parameter int unsigned LAT = LAT_ADD,
  parameter int unsigned II  = II_ADD
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output logic  busy,
  output logic  done,
  output fp32_t result
);

  // The result is formed from the operands as they arrive and then travels down a delay
  // line of LAT stages, so up to ceil(LAT/II) operations are in flight at once.
  fp32_t ra, rb;
  logic  rsub;
  fp32_t sum;
  logic  [LAT-1:0] stage_v;
  fp32_t stage_r [LAT];
  int unsigned gap;

  assign ra = a;
  assign rb = b;
  assign rsub = sub;

  assign busy   = (gap != 0);
  assign done   = stage_v[LAT-1];
  assign result = stage_r[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_v <= '0;
      gap     <= 0;
    end else begin
      stage_v <= {stage_v[LAT-2:0], start && !busy};
      if (start && !busy) gap <= II - 1;
      else if (gap != 0)  gap <= gap - 1;
    end
  end

  always_ff @(posedge clk) begin
    stage_r[0] <= sum;
    for (int i = 1; i < LAT; i++) stage_r[i] <= stage_r[i-1];
  end

  always_comb begin
    logic        sa, sb, sr;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [26:0] bigm, lit, shifted;
    logic [27:0] acc;
    logic        stk;
    int          d, er, lz;
    logic        a_big;

    sa  = ra[31];
    sb  = rb[31] ^ rsub;
    ea  = ra[30:23];
    eb  = rb[30:23];
    ma  = fp_is_zero(ra) ? 24'd0 : {1'b1, ra[22:0]};
    mb  = fp_is_zero(rb) ? 24'd0 : {1'b1, rb[22:0]};
    sum = '0;
    sr  = 1'b0;
    er  = 0;
    acc = '0;
    lz  = 0;
    a_big = {ea, ma} >= {eb, mb};
    bigm   = a_big ? {ma, 3'b000} : {mb, 3'b000};
    lit   = a_big ? {mb, 3'b000} : {ma, 3'b000};
    d     = a_big ? int'(ea) - int'(eb) : int'(eb) - int'(ea);
    er    = a_big ? int'(ea) : int'(eb);
    sr    = a_big ? sa : sb;
    // Align the smaller operand, collecting the bits shifted out into the sticky bit.
    if (d > 26) begin
      shifted = 27'd0;
      stk     = |lit;
    end else begin
      shifted = lit >> d;
      stk     = |(lit & ((27'd1 << d) - 27'd1));
    end
    shifted[0] = shifted[0] | stk;

    if (fp_is_nan(ra) || fp_is_nan(rb)) begin
      sum = FP_QNAN;
    end else if (fp_is_inf(ra) && fp_is_inf(rb)) begin
      sum = (sa == sb) ? fp_inf(sa) : FP_QNAN;
    end else if (fp_is_inf(ra)) begin
      sum = fp_inf(sa);
    end else if (fp_is_inf(rb)) begin
      sum = fp_inf(sb);
    end else if (ma == 0 && mb == 0) begin
      sum = fp_zero(sa & sb);
    end else begin
      if (sa == sb) acc = {1'b0, bigm} + {1'b0, shifted};
      else          acc = {1'b0, bigm} - {1'b0, shifted};
      if (acc == 0) begin
        sum = fp_zero(1'b0);
      end else begin
        if (acc[27]) begin
          acc = {1'b0, acc[27:2], acc[1] | acc[0]};
          er  = er + 1;
        end else begin
          // Renormalise after cancellation.
          for (int i = 26; i >= 0; i--) begin
            if (acc[i]) break;
            lz = lz + 1;
          end
          acc = acc << lz;
          er  = er - lz;
        end
        sum = fp_round_pack(sr, er, acc[26:3], acc[2], acc[1] | acc[0]);
      end
    end
  end

endmodule
