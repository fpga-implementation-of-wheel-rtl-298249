// tb_wrc_accel_top: end-to-end run of the contact-law accelerator on four contact patches.
//
// Six processes stand in for the six processors and run the accelerator's programs on the
// bus ports of wrc_accel_top, at its default parameters:
//   CPU0 (Hertz): for each patch, contact semi-axes a = m*r and b = n*r with
//     r = (3N(1-nu^2) / (2E(A+B)))^(1/3) (cube root by Newton steps on its own FPUs), the
//     traction-bound factor K = 3*mu*N / (2*pi*a*b); writes a, b, creepages, flexibility
//     and K to the dual-port memory, then a ready flag, and goes on to the next patch.
//   CPU1..CPU5 (Fastsim): CPU1 waits for the flag, reads the patch, and sends it round the
//     FIFO ring; each processor integrates two of the ten rows (m0 = n0 = 10) of the
//     patch with the shared FPUs, taking every FPU in turn and informing the next
//     processor after each access. The row forces are summed along the ring (CPU1 starts
//     the sum, CPU5 returns it to CPU1) and CPU1 writes the patch force to the memory.
// Every FPU result is compared with the same operation done in the testbench in single
// precision, the patch forces with a double-precision Fastsim of the same patch, and each
// mechanism of the design (shared-FPU waits and hand-overs, FIFO ring traffic and waits,
// memory hand-over, Hertz working ahead of Fastsim, queued operations, slip and adhesion
// slices) must have happened at least once.
module tb_wrc_accel_top;
  import wrc_pkg::*;
  import tb_fp_pkg::*;

  localparam int NFS     = 5;
  localparam int M0      = 10;
  localparam int N0      = 10;
  localparam int PATCHES = 4;
  localparam int UADD = 0, UMUL = 1, UDIV = 2, USQRT = 3;
  // dual-port memory layout (word offsets in the memory window)
  localparam int SLOT      = 16;   // words per patch
  localparam int W_FLAG    = 7;    // patch ready flag (patch number + 1)
  localparam int W_TX      = 8;    // results
  localparam int W_TY      = 9;
  localparam int W_DONE    = 10;   // result ready flag

  logic     clk = 1'b0, rst_n = 1'b0;
  bus_req_t cpu0_req;
  bus_rsp_t cpu0_rsp;
  bus_req_t fs_req [NFS];
  bus_rsp_t fs_rsp [NFS];
  logic [NFS-1:0] fpu_grant [4];

  wrc_accel_top dut (.clk, .rst_n, .cpu0_req, .cpu0_rsp, .fs_req, .fs_rsp, .fpu_grant);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_token_wait = 0, n_inform = 0, n_fifo_push = 0, n_fifo_empty_wait = 0;
  int n_dm_handover = 0, n_hertz_ahead = 0, n_queued = 0, n_slip = 0, n_adhesion = 0;
  int patches_done = 0;
  int hertz_done = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // ------------------------------------------------------------------ bus access
  // p = 0: CPU0, p = 1..5: Fastsim processor p.
  task automatic drive(int p, bus_req_t r);
    if (p == 0) cpu0_req = r;
    else        fs_req[p-1] = r;
  endtask

  function automatic bus_rsp_t resp(int p);
    return (p == 0) ? cpu0_rsp : fs_rsp[p-1];
  endfunction

  task automatic xfer(int p, bus_addr_t a, logic wr, logic [31:0] wd, output logic [31:0] rd);
    bit token_wait_seen;
    bit empty_wait_seen;
    token_wait_seen = 0;
    empty_wait_seen = 0;
    @(negedge clk);
    drive(p, '{addr: a, read: !wr, write: wr, writedata: wd});
    #4;
    while (resp(p).waitrequest) begin
      if (p > 0 && a < 10'h020 && !fpu_grant[a[4:3]][p-1] && !token_wait_seen) begin
        token_wait_seen = 1;
        n_token_wait++;
      end
      if (a == MAP_FIFO_IN && !empty_wait_seen) begin
        empty_wait_seen = 1;
        n_fifo_empty_wait++;
      end
      @(negedge clk);
      #4;
    end
    rd = resp(p).readdata;
    @(posedge clk);
    #1;
    drive(p, BUS_REQ_IDLE);
  endtask

  task automatic wr(int p, bus_addr_t a, logic [31:0] d);
    logic [31:0] unused;
    xfer(p, a, 1'b1, d, unused);
  endtask

  task automatic rd(int p, bus_addr_t a, output logic [31:0] d);
    xfer(p, a, 1'b0, 0, d);
  endtask

  // ------------------------------------------------------------------ FPU operations
  function automatic fp32_t emulate(int u, fp32_t x, fp32_t y, logic s);
    real rx, ry;
    rx = fp_to_real(x);
    ry = fp_to_real(y);
    case (u)
      UADD:    return real_to_fp(s ? rx - ry : rx + ry);
      UMUL:    return real_to_fp(rx * ry);
      UDIV:    return real_to_fp(rx / ry);
      default: return real_to_fp($sqrt(ry));
    endcase
  endfunction

  // Issue one operation on unit u and collect its result. A Fastsim processor informs the
  // next one when it has read its result.
  task automatic issue(int p, int u, fp32_t x, fp32_t y, logic s);
    bus_addr_t base;
    base = bus_addr_t'(u * 8);
    if (u != USQRT) wr(p, base + FPU_REG_A, x);
    wr(p, base + (s ? FPU_REG_B_GOSUB : FPU_REG_B_GO), y);
  endtask

  task automatic collect(int p, int u, fp32_t x, fp32_t y, logic s, output fp32_t r);
    logic [31:0] d;
    rd(p, bus_addr_t'(u * 8) + FPU_REG_RESULT, d);
    r = d;
    check(fp_same(r, emulate(u, x, y, s)),
          $sformatf("cpu%0d unit %0d: %h op %h = %h, expected %h", p, u, x, y, r, emulate(u, x, y, s)));
    if (p > 0) begin
      wr(p, bus_addr_t'(u * 8) + FPU_REG_INFORM, 0);
      n_inform++;
    end
  endtask

  task automatic fop(int p, int u, fp32_t x, fp32_t y, logic s, output fp32_t r);
    issue(p, u, x, y, s);
    collect(p, u, x, y, s, r);
  endtask

  task automatic fadd(int p, fp32_t x, fp32_t y, output fp32_t r);  fop(p, UADD, x, y, 0, r); endtask
  task automatic fsub(int p, fp32_t x, fp32_t y, output fp32_t r);  fop(p, UADD, x, y, 1, r); endtask
  task automatic fmul(int p, fp32_t x, fp32_t y, output fp32_t r);  fop(p, UMUL, x, y, 0, r); endtask
  task automatic fdiv(int p, fp32_t x, fp32_t y, output fp32_t r);  fop(p, UDIV, x, y, 0, r); endtask
  task automatic fsqrt(int p, fp32_t y, output fp32_t r);           fop(p, USQRT, 0, y, 0, r); endtask

  function automatic fp32_t F(real r);
    return real_to_fp(r);
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real R(fp32_t x);
    return fp_to_real(x);
  endfunction

  // ------------------------------------------------------------------ patch inputs
  // Loads, curvature sums and creepages of the four patches (front left, front right,
  // rear left, rear right). With these the Hertz ellipse of the first is about 3.0 x 2.5 mm.
  real load_n  [PATCHES] = '{50000.0, 42000.0, 47000.0, 55000.0};
  real curv_ab [PATCHES] = '{20.8, 22.0, 19.5, 21.0};
  real xi      [PATCHES] = '{0.0010, -0.0008, 0.0012, 0.0006};
  real eta     [PATCHES] = '{-0.0015, 0.0011, 0.0004, -0.0009};
  real phi     [PATCHES] = '{0.8, -0.5, 1.2, 0.3};
  real flex    [PATCHES] = '{2.5e-14, 2.6e-14, 2.4e-14, 2.5e-14};
  localparam real E_MOD = 2.1e11, NU = 0.3, MU = 0.3, M_COEF = 1.2, N_COEF = 1.0;
  localparam real PI = 3.14159265358979;

  fp32_t got_tx [PATCHES], got_ty [PATCHES];
  fp32_t used_a [PATCHES], used_b [PATCHES], used_k [PATCHES];

  function automatic bus_addr_t dm(int p, int w);
    return MAP_DM_BASE + bus_addr_t'(p * SLOT + w);
  endfunction

  // ------------------------------------------------------------------ CPU0: Hertz
  task automatic cpu0_hertz();
    fp32_t c, num, den, r, r2, r3, t, d, a, b, k, ab;
    logic [31:0] flag;
    for (int pt = 0; pt < PATCHES; pt++) begin
      // c = 3 N (1 - nu^2) / (2 E (A + B))
      fmul(0, F(3.0 * (1.0 - NU * NU)), F(load_n[pt]), num);
      fmul(0, F(2.0 * E_MOD), F(curv_ab[pt]), den);
      fdiv(0, num, den, c);
      // cube root by Newton: r <- r - (r^3 - c) / (3 r^2)
      r = F(2.0e-3);
      for (int it = 0; it < 8; it++) begin
        fmul(0, r, r, r2);
        fmul(0, r2, r, r3);
        fsub(0, r3, c, t);
        fmul(0, F(3.0), r2, d);
        fdiv(0, t, d, t);
        fsub(0, r, t, r);
      end
      check(fabs(R(r) - $pow(R(c), 1.0 / 3.0)) < 1e-6 * R(r), "cube root accuracy");
      // a = m r and b = n r queued together on the multiplier
      issue(0, UMUL, F(M_COEF), r, 0);
      issue(0, UMUL, F(N_COEF), r, 0);
      n_queued++;
      collect(0, UMUL, F(M_COEF), r, 0, a);
      collect(0, UMUL, F(N_COEF), r, 0, b);
      // K = 3 mu N / (2 pi a b)
      fmul(0, a, b, ab);
      fmul(0, F(2.0 * PI), ab, den);
      fmul(0, F(3.0 * MU), F(load_n[pt]), num);
      fdiv(0, num, den, k);
      used_a[pt] = a;
      used_b[pt] = b;
      used_k[pt] = k;
      wr(0, dm(pt, 0), a);
      wr(0, dm(pt, 1), b);
      wr(0, dm(pt, 2), F(xi[pt]));
      wr(0, dm(pt, 3), F(eta[pt]));
      wr(0, dm(pt, 4), F(phi[pt]));
      wr(0, dm(pt, 5), F(flex[pt]));
      wr(0, dm(pt, 6), k);
      wr(0, dm(pt, W_DONE), 0);
      wr(0, dm(pt, W_FLAG), 32'(pt + 1));
      hertz_done = pt + 1;
      if (pt > patches_done) n_hertz_ahead++;
      if (pt == 0) $display("patch 0: a = %g m, b = %g m", R(a), R(b));
    end
    // collect the contact forces
    for (int pt = 0; pt < PATCHES; pt++) begin
      flag = 0;
      while (flag != 1) rd(0, dm(pt, W_DONE), flag);
      rd(0, dm(pt, W_TX), got_tx[pt]);
      rd(0, dm(pt, W_TY), got_ty[pt]);
    end
  endtask

  // ------------------------------------------------------------------ Fastsim rows
  // One row j of the patch: m0 slices from the leading edge, traction carried from slice
  // to slice, clipped to the traction bound; returns the row force.
  task automatic fastsim_row(int p, int j, fp32_t a, fp32_t b, fp32_t gx0, fp32_t gy0,
                             fp32_t ph, fp32_t fl, fp32_t k, output fp32_t tx, output fp32_t ty);
    fp32_t dy, y, t, q, bb, aa, ay, dx, dxl, dxdy, x, xc, hdx;
    fp32_t gx, gy, px, py, hx, hy, mag, tb, s, sx, sy, u1, u2;
    fmul(p, b, F(2.0 / N0), dy);
    fmul(p, dy, F(real'(j) + 0.5), t);
    fsub(p, b, t, y);                       // row centre
    fmul(p, y, y, t);
    fmul(p, b, b, bb);
    fdiv(p, t, bb, q);                      // y^2 / b^2
    fsub(p, F(1.0), q, t);
    fsqrt(p, t, t);
    fmul(p, a, t, ay);                      // a(y)
    fmul(p, ay, F(2.0 / M0), dx);
    fdiv(p, dx, fl, dxl);                   // dx / L
    fmul(p, dx, dy, dxdy);
    fmul(p, a, a, aa);
    fmul(p, dx, F(0.5), hdx);
    fsub(p, ay, dx, x);                     // x = a(y) - dx
    px = 0; py = 0; tx = 0; ty = 0;
    for (int i = 0; i < M0; i++) begin
      fadd(p, x, hdx, xc);                  // slice centre
      // creepage with spin at the slice centre
      fmul(p, ph, y, t);
      fsub(p, gx0, t, gx);
      fmul(p, ph, xc, t);
      fadd(p, gy0, t, gy);
      // p_H = p' - dx gamma / L
      fmul(p, dxl, gx, t);
      fsub(p, px, t, hx);
      fmul(p, dxl, gy, t);
      fsub(p, py, t, hy);
      // |p_H|
      fmul(p, hx, hx, u1);
      fmul(p, hy, hy, u2);
      fadd(p, u1, u2, t);
      fsqrt(p, t, mag);
      // traction bound K sqrt(1 - x^2/a^2 - y^2/b^2)
      fmul(p, xc, xc, t);
      fdiv(p, t, aa, t);
      fsub(p, F(1.0), t, t);
      fsub(p, t, q, t);
      fsqrt(p, t, t);
      fmul(p, k, t, tb);
      // the clipped traction is always formed; the comparison picks one
      fdiv(p, tb, mag, s);
      fmul(p, s, hx, sx);
      fmul(p, s, hy, sy);
      if (R(mag) > R(tb)) begin
        px = sx; py = sy;
        n_slip++;
      end else begin
        px = hx; py = hy;
        n_adhesion++;
      end
      // T = T + dx dy p
      fmul(p, dxdy, px, t);
      fadd(p, tx, t, tx);
      fmul(p, dxdy, py, t);
      fadd(p, ty, t, ty);
      fsub(p, x, dx, x);
    end
  endtask

  // Double-precision Fastsim of a whole patch, the same discretisation.
  task automatic fastsim_double(fp32_t fa, fp32_t fb, fp32_t fgx, fp32_t fgy, fp32_t fph,
                                fp32_t ffl, fp32_t fk, output real tx, output real ty);
    real a, b, dy, y, ay, dx, x, xc, px, py, hx, hy, mag, tb, gx, gy;
    a = R(fa); b = R(fb);
    tx = 0; ty = 0;
    dy = 2.0 * b / N0;
    for (int j = 0; j < N0; j++) begin
      y  = b - (j + 0.5) * dy;
      ay = a * $sqrt(1.0 - y * y / (b * b));
      dx = 2.0 * ay / M0;
      x  = ay - dx;
      px = 0; py = 0;
      for (int i = 0; i < M0; i++) begin
        xc  = x + dx / 2.0;
        gx  = R(fgx) - R(fph) * y;
        gy  = R(fgy) + R(fph) * xc;
        hx  = px - dx * gx / R(ffl);
        hy  = py - dx * gy / R(ffl);
        mag = $sqrt(hx * hx + hy * hy);
        tb  = R(fk) * $sqrt(1.0 - xc * xc / (a * a) - y * y / (b * b));
        if (mag > tb) begin px = tb / mag * hx; py = tb / mag * hy; end
        else begin px = hx; py = hy; end
        tx += dx * dy * px;
        ty += dx * dy * py;
        x  -= dx;
      end
    end
  endtask

  // ------------------------------------------------------------------ CPU1..CPU5: Fastsim
  task automatic cpu_fastsim(int p);
    logic [31:0] w [7];
    logic [31:0] flag, v;
    fp32_t tx, ty, rx, ry, sx, sy, inx, iny;
    for (int pt = 0; pt < PATCHES; pt++) begin
      if (p == 1) begin
        flag = 0;
        while (flag != 32'(pt + 1)) rd(p, dm(pt, W_FLAG), flag);
        n_dm_handover++;
        for (int i = 0; i < 7; i++) rd(p, dm(pt, i), w[i]);
      end else begin
        for (int i = 0; i < 7; i++) rd(p, MAP_FIFO_IN, w[i]);
      end
      if (p < NFS) for (int i = 0; i < 7; i++) begin
        wr(p, MAP_FIFO_OUT, w[i]);
        n_fifo_push++;
      end
      sx = 0; sy = 0;
      for (int j = p - 1; j < N0; j += NFS) begin
        fastsim_row(p, j, w[0], w[1], w[2], w[3], w[4], w[5], w[6], rx, ry);
        fadd(p, sx, rx, sx);
        fadd(p, sy, ry, sy);
      end
      // running sum round the ring: x first, then y
      if (p == 1) begin inx = 0; end else rd(p, MAP_FIFO_IN, inx);
      fadd(p, inx, sx, tx);
      wr(p, MAP_FIFO_OUT, tx);
      n_fifo_push++;
      if (p == 1) begin iny = 0; end else rd(p, MAP_FIFO_IN, iny);
      fadd(p, iny, sy, ty);
      wr(p, MAP_FIFO_OUT, ty);
      n_fifo_push++;
      if (p == 1) begin
        rd(p, MAP_FIFO_IN, v);
        wr(p, dm(pt, W_TX), v);
        rd(p, MAP_FIFO_IN, v);
        wr(p, dm(pt, W_TY), v);
        wr(p, dm(pt, W_DONE), 1);
        patches_done = pt + 1;
      end
    end
  endtask

  initial begin
    longint t0;
    real     rx, ry, mag;
    cpu0_req = BUS_REQ_IDLE;
    for (int k = 0; k < NFS; k++) fs_req[k] = BUS_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    fork
      cpu0_hertz();
      cpu_fastsim(1);
      cpu_fastsim(2);
      cpu_fastsim(3);
      cpu_fastsim(4);
      cpu_fastsim(5);
    join
    $display("four patches in %0d cycles", cycle - t0);
    for (int pt = 0; pt < PATCHES; pt++) begin
      fastsim_double(used_a[pt], used_b[pt], F(xi[pt]), F(eta[pt]), F(phi[pt]), F(flex[pt]),
                     used_k[pt], rx, ry);
      mag = $sqrt(rx * rx + ry * ry);
      $display("patch %0d: T = (%g, %g) N, double-precision reference (%g, %g) N",
               pt, R(got_tx[pt]), R(got_ty[pt]), rx, ry);
      check(fabs(R(got_tx[pt]) - rx) < 1e-3 * mag, "patch force x against double precision");
      check(fabs(R(got_ty[pt]) - ry) < 1e-3 * mag, "patch force y against double precision");
    end
    $display("token waits %0d, informs %0d, FIFO pushes %0d, FIFO empty waits %0d",
             n_token_wait, n_inform, n_fifo_push, n_fifo_empty_wait);
    $display("memory hand-overs %0d, Hertz ahead of Fastsim %0d, queued pairs %0d",
             n_dm_handover, n_hertz_ahead, n_queued);
    $display("slip slices %0d, adhesion slices %0d", n_slip, n_adhesion);
    check(n_token_wait > 0, "no processor ever waited for a shared FPU");
    check(n_inform > 0, "no FPU was handed on");
    check(n_fifo_push > 0, "no FIFO traffic");
    check(n_fifo_empty_wait > 0, "no processor ever waited on an empty FIFO");
    check(n_dm_handover == PATCHES, "memory hand-overs");
    check(n_hertz_ahead > 0, "Hertz never worked ahead of Fastsim");
    check(n_queued > 0, "no queued operations");
    check(n_slip > 0, "no slip slice");
    check(n_adhesion > 0, "no adhesion slice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
