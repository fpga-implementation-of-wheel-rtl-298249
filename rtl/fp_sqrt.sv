// fp_sqrt: IEEE-754 single-precision square root, iterative, with a fixed latency.
//
// One of the four floating point units of the accelerator. The document gives its function
// and its cycle counts (35 cycles per operation, 31 when operations follow each other); the
// datapath is this design's own: the exponent is halved (the significand doubled first when
// the exponent is odd) and the significand root is found digit by digit, one result bit per cycle for 26 cycles
// (24 significant bits, a guard bit and one more bit that with the remainder forms the
// sticky bit). The rounded root is held and presented LAT cycles after the start cycle,
// while the engine is already free for the next operation after II cycles.
// sqrt(-x) = NaN for x > 0, sqrt(-0) = -0, sqrt(+inf) = +inf; subnormals read as zero.
//
// Interface and timing as fp_add with one operand: `start` with `a`; `busy` for II-1 cycles
// after a start; `done` pulses exactly LAT cycles after its start cycle with `result` valid
// then (LAT and II must both be at least 28).
module fp_sqrt
  import wrc_pkg::*;
#(
  parameter int unsigned LAT = LAT_SQRT,
  parameter int unsigned II  = II_SQRT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  output logic  busy,
  output logic  done,
  output fp32_t result
);

  localparam int unsigned RBITS = 26;

  fp32_t       ra;
  logic        running;  // the root bits are being formed
  int unsigned step;
  int unsigned gap;
  logic [51:0] rad;      // radicand, consumed two bits per step from the top
  logic [27:0] rem;
  logic [25:0] root;
  fp32_t       sq;
  fp32_t       fin;      // rounded root, waiting for its `done` cycle
  logic [LAT-1:0] stage_v;

  // Radicand: significand (doubled for an odd exponent) scaled by 2^27 so that the integer
  // root has 26 bits.
  wire        odd    = ~a[23];                       // biased exponent even <=> unbiased odd
  wire [51:0] rad0   = odd ? {1'b1, a[22:0], 28'd0} : {1'b0, 1'b1, a[22:0], 27'd0};
  wire [29:0] rem_in = {rem, rad[51:50]};
  wire [29:0] trial  = {2'b00, root, 2'b01};
  wire        ge     = rem_in >= trial;
  wire [29:0] rem_nx = ge ? rem_in - trial : rem_in;

  assign busy   = (gap != 0);
  assign done   = stage_v[LAT-1];
  assign result = fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra      <= '0;
      running <= 1'b0;
      step    <= 0;
      gap     <= 0;
      rad     <= '0;
      rem     <= '0;
      root    <= '0;
      fin     <= '0;
      stage_v <= '0;
    end else begin
      stage_v <= {stage_v[LAT-2:0], start && !busy};
      if (start && !busy) begin
        ra      <= a;
        rad     <= rad0;
        rem     <= '0;
        root    <= '0;
        step    <= 0;
        running <= 1'b1;
        gap     <= II - 1;
      end else begin
        if (gap != 0) gap <= gap - 1;
        if (running) begin
          if (step < RBITS) begin
            rem  <= rem_nx[27:0];
            root <= {root[24:0], ge};
            rad  <= rad << 2;
            step <= step + 1;
          end else begin
            fin     <= sq;
            running <= 1'b0;
          end
        end
      end
    end
  end

  // The engine must be free before the next start, and the held root must be read out
  // before the next operation overwrites it.
  initial begin
    assert (II >= RBITS + 2 && LAT >= RBITS + 2 && LAT <= II + RBITS + 1)
      else $fatal(1, "fp_sqrt: LAT/II do not fit the %0d-step engine", RBITS);
  end

  always_comb begin
    int e;
    // unbiased exponent, made even, halved, rebiased
    e = int'(ra[30:23]) - 127;
    if (e % 2 != 0) e = e - 1;
    e = e / 2 + 127;
    if (fp_is_nan(ra))
      sq = FP_QNAN;
    else if (fp_is_zero(ra))
      sq = fp_zero(ra[31]);
    else if (ra[31])
      sq = FP_QNAN;
    else if (fp_is_inf(ra))
      sq = fp_inf(1'b0);
    else
      sq = fp_round_pack(1'b0, e, root[25:2], root[1], root[0] | (rem != 0));
  end

endmodule
