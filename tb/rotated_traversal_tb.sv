// Testbench for rotated_traversal: runs several set-ups (identity, a rotation
// with mixed-sign coefficients, anisotropic scaling, mirror) on a small image
// and compares every address, padding flag, index and last flag against a
// direct evaluation of x = round(X0 + i*b_i + j*b_j + k*b_k). It also checks
// that one voxel is produced per clock with no gaps.
module rotated_traversal_tb;
  import corr3d_pkg::*;
  localparam int IMG = 10;
  localparam int AW  = $clog2(IMG * IMG * IMG);

  logic clk = 0, rst_n = 0, start = 0;
  rot_params_t params;
  logic busy, ov, ol, op;
  logic [AW-1:0] oa;
  tcoord_t oc;
  int checks = 0, failures = 0;

  rotated_traversal #(.IMG(IMG)) dut (.clk, .rst_n, .start, .params, .busy,
    .out_valid(ov), .out_last(ol), .out_pad(op), .out_addr(oa), .out_coord(oc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input longint a);   // round to nearest, FRAC bits
    return int'((a + (64'sd1 <<< (FRAC - 1))) >>> FRAC);
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic coef_t fx(input real r);
    return coef_t'($rtoi(r * (1 << FRAC) + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  task automatic run(input rot_params_t pr);
    int n, total, first_cycle, cyc;
    longint x, y, z;
    int xi, yi, zi;
    bit pad;
    total = pr.ni * pr.nj * pr.nk;
    @(negedge clk);
    params = pr;
    start = 1;
    @(negedge clk);
    start = 0;
    params = '0;                   // must have been captured
    n = 0; cyc = 0; first_cycle = -1;
    while (n < total && cyc < total + 50) begin
      @(posedge clk); #1; cyc++;
      if (ov) begin
        if (first_cycle < 0) first_cycle = cyc;
        begin
          int ii, jj, kk;
          ii = n / (pr.nj * pr.nk);
          jj = (n / pr.nk) % pr.nj;
          kk = n % pr.nk;
          x = longint'(pr.x0) + ii * longint'(pr.bix) + jj * longint'(pr.bjx) + kk * longint'(pr.bkx);
          y = longint'(pr.y0) + ii * longint'(pr.biy) + jj * longint'(pr.bjy) + kk * longint'(pr.bky);
          z = longint'(pr.z0) + ii * longint'(pr.biz) + jj * longint'(pr.bjz) + kk * longint'(pr.bkz);
          xi = rnd(x); yi = rnd(y); zi = rnd(z);
          pad = xi < pr.xmin || xi > pr.xmax || yi < pr.ymin || yi > pr.ymax ||
                zi < pr.zmin || zi > pr.zmax || xi < 0 || yi < 0 || zi < 0 ||
                xi >= IMG || yi >= IMG || zi >= IMG;
          check("i", oc.i, ii); check("j", oc.j, jj); check("k", oc.k, kk);
          check("pad", op, pad);
          if (!pad) check("addr", oa, xi + IMG * yi + IMG * IMG * zi);
          check("last", ol, n == total - 1);
        end
        n++;
      end
    end
    check("count", n, total);
    // one voxel per clock: the last arrives total-1 clocks after the first
    check("rate", cyc - first_cycle, total - 1);
    // the first voxel appears two clocks after the clock that samples start
    check("latency", first_cycle, 2);
    @(posedge clk); #1;
    check("idle", ov, 0);
    check("not busy", busy, 0);
  endtask

  rot_params_t pr;
  real c, s;
  initial begin
    params = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // identity, offset so that traversal pads at the end of each axis
    pr = '0;
    pr.bix = fx(0); pr.biy = fx(0); pr.biz = fx(1);
    pr.bjx = fx(0); pr.bjy = fx(1); pr.bjz = fx(0);
    pr.bkx = fx(1); pr.bky = fx(0); pr.bkz = fx(0);
    pr.xmin = 0; pr.xmax = 7; pr.ymin = 0; pr.ymax = 7; pr.zmin = 0; pr.zmax = 7;
    pr.ni = 11; pr.nj = 11; pr.nk = 11;
    run(pr);
    // 30 degrees about z, 20 degrees about x, with an offset
    c = $cos(0.5236); s = $sin(0.5236);
    pr.bkx = fx(c);   pr.bky = fx(s);  pr.bkz = fx(0);
    pr.bjx = fx(-s*$cos(0.349)); pr.bjy = fx(c*$cos(0.349)); pr.bjz = fx($sin(0.349));
    pr.bix = fx(s*$sin(0.349));  pr.biy = fx(-c*$sin(0.349)); pr.biz = fx($cos(0.349));
    pr.x0 = acc_t'(2 <<< FRAC) + acc_t'(1234); pr.y0 = -acc_t'(3 <<< FRAC); pr.z0 = acc_t'(1 <<< FRAC);
    pr.xmin = 1; pr.xmax = 8; pr.ymin = 0; pr.ymax = 9; pr.zmin = 0; pr.zmax = 6;
    pr.ni = 9; pr.nj = 13; pr.nk = 14;
    run(pr);
    // anisotropic grid (z steps 0.25) and mirror in x
    pr = '0;
    pr.bkx = fx(-1); pr.bjy = fx(1); pr.biz = fx(0.25);
    pr.x0 = acc_t'(9 <<< FRAC);
    pr.xmin = 0; pr.xmax = 9; pr.ymin = 2; pr.ymax = 9; pr.zmin = 0; pr.zmax = 9;
    pr.ni = 20; pr.nj = 5; pr.nk = 12;
    run(pr);
    // leapfrog style: k-step of length two
    pr = '0;
    pr.bkx = fx(2); pr.bjy = fx(1); pr.biz = fx(1); pr.x0 = acc_t'(1 <<< FRAC);
    pr.xmin = 0; pr.xmax = 9; pr.ymin = 0; pr.ymax = 9; pr.zmin = 0; pr.zmax = 9;
    pr.ni = 3; pr.nj = 4; pr.nk = 5;
    run(pr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
