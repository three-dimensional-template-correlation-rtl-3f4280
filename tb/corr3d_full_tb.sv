// Full-size testbench for corr3d_top with every parameter at its default:
// 12x12x12 template (1728 processing elements), 50x50x50 image, 10-bit sums,
// traversal boxes up to 98 voxels a side, 8x8x8 sub-blocks. It loads a
// random image with the template planted twice, loads the template and a
// score table, and runs one complete unrotated correlation over a
// 61x61x61 box (image plus template - 1 of padding per axis), checking every
// score against direct summation and the start-to-done clock count. A second
// run does a three-axis rotation about the image centre over the largest
// traversal box (98^3, so every delay line is at its full length; every 16th
// score is checked) while all 13^3 sub-block records of the first run are
// read back and checked; a third, minimal run swaps the banks once more.
module corr3d_full_tb;
  import corr3d_pkg::*;
  localparam int  T = TMPL_DIM, IMGD = IMG_DIM, TMX = TRAV_MAX, SB = SB_SHIFT, SUMB = SUM_W;
  localparam bit  VR = 1'b0;
  localparam int  CWV = 8;
  localparam int  VWD = VOXEL_W + (VR ? 3 * CWV : 0);
  localparam int  NSB = (TMX + (1 << SB) - 1) >> SB;
  localparam int  NREC = NSB * NSB * NSB;
  localparam int  RAW = $clog2(NREC);
  localparam int  AW = $clog2(IMGD * IMGD * IMGD);
  localparam int  SMAX = (1 << (SUMB - 1)) - 1, SMIN = -(1 << (SUMB - 1));

  logic clk = 0, rst_n = 0;
  logic img_wr_en = 0;
  logic [AW-1:0] img_wr_addr = '0;
  logic [VWD-1:0] img_wr_data = '0, pad_value = '0, tdata = '0;
  logic tload = 0, start = 0, pk_clear = 0;
  logic [15:0][SCORE_W-1:0] ftab;
  logic signed [2:0][2:0][17:0] vrot_matrix;
  rot_params_t params;
  logic busy, done, res_valid, res_window, pk_rd_full, pk_collect_bank;
  logic signed [SUMB-1:0] res_score, pk_rd_score;
  tcoord_t res_coord, pk_rd_tag;
  logic [RAW-1:0] pk_rd_addr = '0;
  logic ev_pad, ev_sat, ev_peak_empty, ev_peak_better, ev_peak_kept;

  corr3d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pad = 0, n_sat = 0, n_empty = 0, n_better = 0, n_outside = 0, n_rot = 0, n_swap = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_pad    += int'(ev_pad);
    n_sat    += int'(ev_sat);
    n_empty  += int'(ev_peak_empty);
    n_better += int'(ev_peak_better);
  end

  task automatic chk(input string w, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", w, got, exp);
    end
  endtask

  // ---------------- reference model ----------------
  logic [VWD-1:0] img [IMGD * IMGD * IMGD];
  int tmpl [T * T * T];
  logic [VWD-1:0] tvox [T * T * T];

  function automatic int sxt(input longint v, input int w);
    longint m;
    m = v & ((64'sd1 <<< w) - 1);
    return int'((m >= (64'sd1 <<< (w - 1))) ? m - (64'sd1 <<< w) : m);
  endfunction

  function automatic logic [VWD-1:0] rotate_vox(input logic [VWD-1:0] v);
    logic [VWD-1:0] o;
    o = v;
    if (VR)
      for (int r = 0; r < 3; r++) begin
        longint s;
        s = 0;
        for (int c = 0; c < 3; c++)
          s += longint'($signed(vrot_matrix[r][c])) * sxt(v[VOXEL_W + c*CWV +: CWV], CWV);
        s = (s + (1 <<< 15)) >>> 16;
        if (s > (1 <<< (CWV-1)) - 1) s = (1 <<< (CWV-1)) - 1;
        if (s < -(1 <<< (CWV-1))) s = -(1 <<< (CWV-1));
        o[VOXEL_W + r*CWV +: CWV] = CWV'(s);
      end
    return o;
  endfunction

  function automatic int fterm(input logic [VWD-1:0] a, input logic [VWD-1:0] b);
    int f;
    f = sxt(ftab[{a[1:0], b[1:0]}], SCORE_W);
    if (VR) begin
      longint dot;
      dot = 0;
      for (int c = 0; c < 3; c++)
        dot += sxt(a[VOXEL_W + c*CWV +: CWV], CWV) * sxt(b[VOXEL_W + c*CWV +: CWV], CWV);
      f -= int'(dot >>> 4);
    end
    return f;
  endfunction

  function automatic int rnd(input longint a);
    return int'((a + (64'sd1 <<< (FRAC - 1))) >>> FRAC);
  endfunction

  // expected results of one run
  logic [VWD-1:0] stream [];
  int exp_score [];
  bit exp_win [];
  bit pk_full [2][NREC];
  int pk_score [2][NREC];
  int pk_tag [2][NREC];

  // Only every score_stride-th score is modelled (and the peak model is only
  // valid with a stride of 1); this keeps the reference cheap on large boxes.
  int score_stride = 1;

  task automatic build(input rot_params_t pr, input int bank);
    int total, dmax, nj_i, nk_i;
    nj_i = pr.nj; nk_i = pr.nk;
    total = pr.ni * pr.nj * pr.nk;
    dmax = (T - 1) * (nj_i * nk_i + nk_i + 1);
    stream = new[total];
    exp_score = new[total];
    exp_win = new[total];
    for (int q = 0; q < total; q++) begin
      int ii, jj, kk, x, y, z;
      ii = q / (nj_i * nk_i); jj = (q / nk_i) % nj_i; kk = q % nk_i;
      x = rnd(longint'(pr.x0) + ii * longint'(pr.bix) + jj * longint'(pr.bjx) + kk * longint'(pr.bkx));
      y = rnd(longint'(pr.y0) + ii * longint'(pr.biy) + jj * longint'(pr.bjy) + kk * longint'(pr.bky));
      z = rnd(longint'(pr.z0) + ii * longint'(pr.biz) + jj * longint'(pr.bjz) + kk * longint'(pr.bkz));
      if (x < pr.xmin || x > pr.xmax || y < pr.ymin || y > pr.ymax || z < pr.zmin || z > pr.zmax ||
          x < 0 || y < 0 || z < 0 || x >= IMGD || y >= IMGD || z >= IMGD)
        stream[q] = pad_value;
      else
        stream[q] = img[x + IMGD * y + IMGD * IMGD * z];
      stream[q] = rotate_vox(stream[q]);
    end
    for (int r = 0; r < NREC; r++) pk_full[bank][r] = 0;
    for (int q = 0; q < total; q++) begin
      exp_win[q] = (q >= dmax);
      exp_score[q] = 0;
      if (exp_win[q] && q % score_stride == 0) begin
        int s, blk;
        s = 0;
        for (int n = 0; n < T * T * T; n++) begin
          int di, dj, dk, e;
          di = n / (T * T); dj = (n / T) % T; dk = n % T;
          e = s + fterm(stream[q - dmax + (di * nj_i + dj) * nk_i + dk], tvox[n]);
          s = (e > SMAX) ? SMAX : (e < SMIN) ? SMIN : e;
        end
        exp_score[q] = s;
        blk = ((q / (nj_i * nk_i)) >> SB) * NSB * NSB + (((q / nk_i) % nj_i) >> SB) * NSB
              + ((q % nk_i) >> SB);
        if (!pk_full[bank][blk] || s > pk_score[bank][blk]) begin
          pk_full[bank][blk] = 1;
          pk_score[bank][blk] = s;
          pk_tag[bank][blk] = q;
        end
      end
    end
  endtask

  int last_latency = -1;

  // Run one rotation; in parallel, check the other bank (previous run).
  task automatic run(input rot_params_t pr, input bit check_prev);
    int total, q, cyc, first, lastc, bank_prev, bank_now;
    total = pr.ni * pr.nj * pr.nk;
    @(negedge clk);
    bank_prev = pk_collect_bank;
    bank_now = 1 - bank_prev;
    build(pr, bank_now);
    params = pr; start = 1;
    @(negedge clk);
    start = 0;
    n_swap += int'(pk_collect_bank != bank_prev);
    chk("busy", busy, 1);
    fork
      begin : monitor
        q = 0; cyc = 0; first = -1; lastc = -1;
        while (!done && cyc < total + 100) begin
          @(posedge clk); #1; cyc++;
          if (res_valid) begin
            if (first < 0) first = cyc;
            lastc = cyc;
            if (q < total) begin
              chk("coord", res_coord, {7'(q / (pr.nj * pr.nk)), 7'((q / pr.nk) % pr.nj), 7'(q % pr.nk)});
              chk("window", res_window, exp_win[q]);
              if (exp_win[q]) begin
                if (q % score_stride == 0) chk("score", res_score, exp_score[q]);
              end else n_outside++;
            end
            q++;
          end
        end
        chk("scores", q, total);
        chk("one per clock", lastc - first + 1, total);
        if (last_latency >= 0) chk("latency", cyc - total, last_latency);
        last_latency = cyc - total;
      end
      begin : host
        if (check_prev) begin
          for (int r = 0; r < NREC; r++) begin
            @(negedge clk);
            pk_rd_addr = RAW'(r);
            @(posedge clk); #1;
            chk("pk full", pk_rd_full, pk_full[bank_prev][r]);
            if (pk_full[bank_prev][r]) begin
              chk("pk score", pk_rd_score, pk_score[bank_prev][r]);
              chk("pk tag", pk_rd_tag, {7'(pk_tag[bank_prev][r] / (prev_nj * prev_nk)),
                  7'((pk_tag[bank_prev][r] / prev_nk) % prev_nj), 7'(pk_tag[bank_prev][r] % prev_nk)});
            end
          end
          @(negedge clk);
          pk_clear = 1;
          @(negedge clk);
          pk_clear = 0;
          pk_rd_addr = '0;
          @(posedge clk); #1;
          chk("pk cleared", pk_rd_full, 0);
        end
      end
    join
    prev_nj = pr.nj; prev_nk = pr.nk;
    @(negedge clk);
    chk("idle", busy, 0);
  endtask
  int prev_nj, prev_nk;

  function automatic coef_t fx(input real r);
    return coef_t'($rtoi(r * (1 << FRAC) + (r >= 0 ? 0.5 : -0.5)));
  endfunction
  function automatic acc_t fa(input real r);
    return acc_t'($rtoi(r * (1 << FRAC) + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  rot_params_t pr;
  real m [3][3];
  initial begin
    real ca, sa, cb, sb, cg, sg, ctr, bc;
    params = '0;
    for (int t = 0; t < 16; t++) ftab[t] = SCORE_W'($urandom_range(15));
    // score +1 only where image and template voxels are both class 3, so the
    // background stays well inside the 10-bit range and the planted copies
    // of the template saturate
    for (int t = 0; t < 16; t++) ftab[t] = (t == 15) ? 4'd1 : 4'd0;
    // voxel rotation matrix: 90 degrees about z
    vrot_matrix = '0;
    vrot_matrix[0][1] = -18'sd65536; vrot_matrix[1][0] = 18'sd65536; vrot_matrix[2][2] = 18'sd65536;
    pad_value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // image: a random background with the template planted twice
    for (int n = 0; n < T * T * T; n++) begin
      tvox[n] = VWD'({$urandom, $urandom});
      if (n % 4 == 0) tvox[n][1:0] = 2'b11;
    end
    for (int a = 0; a < IMGD * IMGD * IMGD; a++) img[a] = VWD'({$urandom, $urandom});
    for (int n = 0; n < T * T * T; n++) begin
      int di, dj, dk;
      di = n / (T * T); dj = (n / T) % T; dk = n % T;
      // the array's di runs along traversal i, which the identity run maps to z
      img[(2 + dk) + IMGD * (3 + dj) + IMGD * IMGD * (4 + di)] = tvox[n];
      img[(30 + dk) + IMGD * (20 + dj) + IMGD * IMGD * (33 + di)] = tvox[n];
    end
    for (int a = 0; a < IMGD * IMGD * IMGD; a++) begin
      @(negedge clk);
      img_wr_en = 1; img_wr_addr = AW'(a); img_wr_data = img[a];
    end
    @(negedge clk);
    img_wr_en = 0;
    for (int n = 0; n < T * T * T; n++) begin
      @(negedge clk);
      tload = 1; tdata = tvox[n];
    end
    @(negedge clk);
    tload = 0;

    // 1: identity, box IMGD + T - 1 per axis, k -> x, j -> y, i -> z
    pr = '0;
    pr.bkx = fx(1); pr.bjy = fx(1); pr.biz = fx(1);
    pr.xmin = 0; pr.xmax = IMGD - 1; pr.ymin = 0; pr.ymax = IMGD - 1; pr.zmin = 0; pr.zmax = IMGD - 1;
    pr.ni = IMGD + T - 1; pr.nj = IMGD + T - 1; pr.nk = IMGD + T - 1;
    run(pr, 0);
    begin
      int nvox, nclk;
      nvox = int'(pr.ni) * int'(pr.nj) * int'(pr.nk);
      nclk = nvox + last_latency;
      $display("full correlation of %0d voxels took %0d clocks (%0d us at 95 MHz)",
               nvox, nclk, nclk / 95);
      chk("run clocks", nclk, nvox + 5);
    end
    // 2: three-axis rotation about the image centre over the largest box
    // (angles 0.5, 0.3 and 0.9 rad about z, y and x)
    ca = 0.8775825619; sa = 0.4794255386; cb = 0.9553364891; sb = 0.2955202067;
    cg = 0.6216099683; sg = 0.7833269096;
    m[0][0] = ca*cb; m[0][1] = ca*sb*sg - sa*cg; m[0][2] = ca*sb*cg + sa*sg;
    m[1][0] = sa*cb; m[1][1] = sa*sb*sg + ca*cg; m[1][2] = sa*sb*cg - ca*sg;
    m[2][0] = -sb;   m[2][1] = cb*sg;            m[2][2] = cb*cg;
    pr.bkx = fx(m[0][0]); pr.bky = fx(m[1][0]); pr.bkz = fx(m[2][0]);
    pr.bjx = fx(m[0][1]); pr.bjy = fx(m[1][1]); pr.bjz = fx(m[2][1]);
    pr.bix = fx(m[0][2]); pr.biy = fx(m[1][2]); pr.biz = fx(m[2][2]);
    ctr = (IMGD - 1) / 2.0; bc = (TMX - 1) / 2.0;
    pr.x0 = fa(ctr - bc * (m[0][0] + m[0][1] + m[0][2]));
    pr.y0 = fa(ctr - bc * (m[1][0] + m[1][1] + m[1][2]));
    pr.z0 = fa(ctr - bc * (m[2][0] + m[2][1] + m[2][2]));
    pr.ni = TMX; pr.nj = TMX; pr.nk = TMX;
    n_rot++;
    score_stride = 16;
    run(pr, 1);
    score_stride = 1;
    // 3: short run to swap the banks
    pr = '0;
    pr.bkx = fx(1); pr.bjy = fx(1); pr.biz = fx(1);
    pr.xmin = 0; pr.xmax = IMGD - 1; pr.ymin = 0; pr.ymax = IMGD - 1; pr.zmin = 0; pr.zmax = IMGD - 1;
    pr.ni = T; pr.nj = T; pr.nk = T;
    run(pr, 0);        // the rotated run's records were not modelled

    $display("padding voxels %0d, saturating clocks %0d, records filled %0d, records improved %0d,",
             n_pad, n_sat, n_empty, n_better);
    $display("scores outside window %0d, rotated runs %0d, bank swaps %0d",
             n_outside, n_rot, n_swap);
    checks++; if (n_pad == 0)     begin failures++; $display("FAIL no padding"); end
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_empty == 0)   begin failures++; $display("FAIL no record filled"); end
    checks++; if (n_better == 0)  begin failures++; $display("FAIL no record improved"); end
    checks++; if (n_outside == 0) begin failures++; $display("FAIL no score outside window"); end
    checks++; if (n_swap != 3)    begin failures++; $display("FAIL bank swaps %0d", n_swap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
