// fp_div: IEEE-754 single-precision divider, iterative, with a fixed latency.
//
// One of the four floating point units of the accelerator. The document gives its function
// and its cycle counts (35 cycles per operation, 31 when operations follow each other); the
// datapath is this design's own: a restoring divider that retires one quotient bit per
// cycle. After `start` the significand of `a` is divided by that of `b` for 26 cycles,
// giving 26 quotient bits (one integer bit, 24 significant bits and a guard bit whatever
// the normalisation) plus a non-zero remainder as sticky bit; the rounded result is held and presented LAT cycles after the start
// cycle, while the engine is already free for the next operation after II cycles.
// Specials follow IEEE-754: x/0 = inf, 0/0 and inf/inf = NaN. Subnormals read as zero and
// subnormal results flush to zero.
//
// Interface and timing as fp_add: `start` with `a` (dividend), `b` (divisor); `busy` for
// II-1 cycles after a start; `done` pulses exactly LAT cycles after its start cycle with
// `result` valid then (LAT and II must both be at least 28).
module fp_div
  import wrc_pkg::*;
#(
  parameter int unsigned LAT = LAT_DIV,
  parameter int unsigned II  = II_DIV
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

  localparam int unsigned QBITS = 26;

  fp32_t       ra, rb;
  logic        running;  // the quotient bits are being formed
  int unsigned step;
  int unsigned gap;
  logic [25:0] rem;      // partial remainder, always below twice the divisor
  logic [25:0] quo;
  fp32_t       quot;
  fp32_t       fin;      // rounded result, waiting for its `done` cycle
  logic [LAT-1:0] stage_v;

  wire [25:0] divisor = {3'b001, rb[22:0]};
  wire        ge      = rem >= divisor;
  wire [25:0] rem_sub = ge ? rem - divisor : rem;

  assign busy   = (gap != 0);
  assign done   = stage_v[LAT-1];
  assign result = fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra      <= '0;
      rb      <= '0;
      running <= 1'b0;
      step    <= 0;
      gap     <= 0;
      rem     <= '0;
      quo     <= '0;
      fin     <= '0;
      stage_v <= '0;
    end else begin
      stage_v <= {stage_v[LAT-2:0], start && !busy};
      if (start && !busy) begin
        ra      <= a;
        rb      <= b;
        rem     <= {3'b001, a[22:0]};
        quo     <= '0;
        step    <= 0;
        running <= 1'b1;
        gap     <= II - 1;
      end else begin
        if (gap != 0) gap <= gap - 1;
        if (running) begin
          if (step < QBITS) begin
            quo  <= {quo[24:0], ge};
            rem  <= rem_sub << 1;
            step <= step + 1;
          end else begin
            fin     <= quot;
            running <= 1'b0;
          end
        end
      end
    end
  end

  // The engine must be free before the next start, and the held result must be read out
  // before the next operation overwrites it.
  initial begin
    assert (II >= QBITS + 2 && LAT >= QBITS + 2 && LAT <= II + QBITS + 1)
      else $fatal(1, "fp_div: LAT/II do not fit the %0d-step engine", QBITS);
  end

  always_comb begin
    logic s;
    int   e;
    s = ra[31] ^ rb[31];
    e = int'(ra[30:23]) - int'(rb[30:23]) + 127;
    if (fp_is_nan(ra) || fp_is_nan(rb))
      quot = FP_QNAN;
    else if ((fp_is_inf(ra) && fp_is_inf(rb)) || (fp_is_zero(ra) && fp_is_zero(rb)))
      quot = FP_QNAN;
    else if (fp_is_inf(ra) || fp_is_zero(rb))
      quot = fp_inf(s);
    else if (fp_is_zero(ra) || fp_is_inf(rb))
      quot = fp_zero(s);
    else if (quo[25])
      quot = fp_round_pack(s, e, quo[25:2], quo[1], quo[0] | (rem != 0));
    else
      quot = fp_round_pack(s, e - 1, quo[24:1], quo[0], rem != 0);
  end

endmodule
