// fp_mul: IEEE-754 single-precision multiplier with a fixed latency.
//
// One of the four floating point units of the accelerator. The document gives its function
// and its cycle counts (12 cycles per operation, 8 when operations follow each other); the
// datapath is this design's own: the 24x24-bit significand product is normalised by at
// most one place and rounded to nearest-even, and the result is presented after LAT cycles.
// Subnormal inputs read as zero, subnormal results flush to zero; inf * 0 gives a quiet NaN.
//
// Interface and timing as fp_add: `start` with `a`, `b`; `busy` for II-1 cycles after a
// start; `done` pulses exactly LAT cycles after its start cycle with `result` valid then.
module fp_mul
  import wrc_pkg::*;
#(
  parameter int unsigned LAT = LAT_MUL,
  parameter int unsigned II  = II_MUL
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t result
);

  // The result is formed from the operands as they arrive and then travels down a delay
  // line of LAT stages, so up to ceil(LAT/II) operations are in flight at once.
  fp32_t ra, rb;

  fp32_t prod;
  logic  [LAT-1:0] stage_v;
  fp32_t stage_r [LAT];
  int unsigned gap;

  assign ra = a;
  assign rb = b;

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
    stage_r[0] <= prod;
    for (int i = 1; i < LAT; i++) stage_r[i] <= stage_r[i-1];
  end

  always_comb begin
    logic        s;
    logic [47:0] p;
    int          e;
    s = ra[31] ^ rb[31];
    p = {1'b1, ra[22:0]} * {1'b1, rb[22:0]};
    e = int'(ra[30:23]) + int'(rb[30:23]) - 127;
    if (fp_is_nan(ra) || fp_is_nan(rb))
      prod = FP_QNAN;
    else if ((fp_is_inf(ra) && fp_is_zero(rb)) || (fp_is_zero(ra) && fp_is_inf(rb)))
      prod = FP_QNAN;
    else if (fp_is_inf(ra) || fp_is_inf(rb))
      prod = fp_inf(s);
    else if (fp_is_zero(ra) || fp_is_zero(rb))
      prod = fp_zero(s);
    else if (p[47])
      prod = fp_round_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else
      prod = fp_round_pack(s, e, p[46:23], p[22], |p[21:0]);
  end

endmodule
