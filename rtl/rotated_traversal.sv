// rotated_traversal: address generator that reads a 3D image in rotated
// order instead of building a rotated copy of the image.
//
// The traversal indices (i, j, k) run in raster order over the padded
// bounding box of the rotated image, k fastest. For each index the image
// coordinate is
//     (x, y, z) = i*b_i + j*b_j + k*b_k + X0
// where b_i, b_j, b_k are the columns of the 3x3 transformation matrix.
// No multiplier is used: the position is kept in three running sums per
// axis (current voxel, start of row, start of plane) and each step adds one
// matrix column, all three axes in parallel (strength reduction). The same
// matrix can express rotation, anisotropic grid rescaling, isotropic scaling,
// mirroring or shear; all are just coefficient values.
//
// Coordinates are signed fixed point (FRAC fraction bits) and are rounded to
// the nearest voxel. A voxel is padding when the rounded coordinate lies
// outside the six inclusive range limits or outside the image memory; the
// address of a padding voxel is 0 and must be ignored.
//
// Interface: 'start' (one cycle, while not busy) captures a rot_params_t
// (9 coefficients, 3 offsets, 6 range limits, which is the rotation set-up
// described for this pipeline, plus the traversal extents ni/nj/nk, which
// are this design's addition). The host may change 'params' while a
// traversal runs. One index is issued per clock; out_* appear two clocks
// after the index is formed. out_last marks the final voxel. No stall: the
// consumer accepts one voxel per clock.
module rotated_traversal
  import corr3d_pkg::*;
#(
  parameter int unsigned IMG = corr3d_pkg::IMG_DIM,   // image memory is IMG^3
  localparam int unsigned AW = $clog2(IMG * IMG * IMG)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  rot_params_t params,
  output logic        busy,
  output logic        out_valid,
  output logic        out_last,
  output logic        out_pad,
  output logic [AW-1:0] out_addr,
  output tcoord_t     out_coord
);

  rot_params_t p;
  logic  running;
  tidx_t i, j, k;
  acc_t  px, py, pz;     // current voxel
  acc_t  rx, ry, rz;     // start of current row (k = 0)
  acc_t  qx, qy, qz;     // start of current plane (j = 0, k = 0)

  wire last_k = (k == p.nk - tidx_t'(1));
  wire last_j = (j == p.nj - tidx_t'(1));
  wire last_i = (i == p.ni - tidx_t'(1));

  // ---------------- index walk with strength-reduced coordinates ----------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      p <= '0;
      {i, j, k} <= '0;
      {px, py, pz, rx, ry, rz, qx, qy, qz} <= '0;
    end else if (start && !running) begin
      running <= 1'b1;
      p <= params;
      {i, j, k} <= '0;
      {px, py, pz} <= {params.x0, params.y0, params.z0};
      {rx, ry, rz} <= {params.x0, params.y0, params.z0};
      {qx, qy, qz} <= {params.x0, params.y0, params.z0};
    end else if (running) begin
      if (!last_k) begin
        k  <= k + tidx_t'(1);
        px <= px + acc_t'(p.bkx);
        py <= py + acc_t'(p.bky);
        pz <= pz + acc_t'(p.bkz);
      end else if (!last_j) begin
        k  <= '0;
        j  <= j + tidx_t'(1);
        rx <= rx + acc_t'(p.bjx);  px <= rx + acc_t'(p.bjx);
        ry <= ry + acc_t'(p.bjy);  py <= ry + acc_t'(p.bjy);
        rz <= rz + acc_t'(p.bjz);  pz <= rz + acc_t'(p.bjz);
      end else if (!last_i) begin
        k  <= '0;
        j  <= '0;
        i  <= i + tidx_t'(1);
        qx <= qx + acc_t'(p.bix);  rx <= qx + acc_t'(p.bix);  px <= qx + acc_t'(p.bix);
        qy <= qy + acc_t'(p.biy);  ry <= qy + acc_t'(p.biy);  py <= qy + acc_t'(p.biy);
        qz <= qz + acc_t'(p.biz);  rz <= qz + acc_t'(p.biz);  pz <= qz + acc_t'(p.biz);
      end else begin
        running <= 1'b0;
      end
    end
  end

  // ---------------- stage 1: round to nearest voxel ------------------------
  function automatic icoord_t round_fx(input acc_t a);
    acc_t r;
    r = (a + acc_t'(1 << (FRAC - 1))) >>> FRAC;
    return r[INT_W-1:0];
  endfunction

  logic    s1_valid, s1_last;
  icoord_t s1_x, s1_y, s1_z;
  tcoord_t s1_coord;
  icoord_t s1_xmin, s1_xmax, s1_ymin, s1_ymax, s1_zmin, s1_zmax;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
    end else begin
      s1_valid <= running;
      s1_last  <= running && last_i && last_j && last_k;
    end
  end

  always_ff @(posedge clk) begin
    s1_x <= round_fx(px);
    s1_y <= round_fx(py);
    s1_z <= round_fx(pz);
    s1_coord <= '{i: i, j: j, k: k};
    {s1_xmin, s1_xmax, s1_ymin, s1_ymax, s1_zmin, s1_zmax} <=
        {p.xmin, p.xmax, p.ymin, p.ymax, p.zmin, p.zmax};
  end

  // ---------------- stage 2: padding test and linear address ---------------
  localparam icoord_t IMG_MAX = icoord_t'(IMG - 1);

  logic pad_c;
  always_comb begin
    pad_c = (s1_x < s1_xmin) || (s1_x > s1_xmax) ||
            (s1_y < s1_ymin) || (s1_y > s1_ymax) ||
            (s1_z < s1_zmin) || (s1_z > s1_zmax) ||
            (s1_x < 0) || (s1_x > IMG_MAX) ||
            (s1_y < 0) || (s1_y > IMG_MAX) ||
            (s1_z < 0) || (s1_z > IMG_MAX);
  end

  logic [AW-1:0] addr_c;
  always_comb begin
    // Constant multipliers (IMG and IMG^2) reduce to shifts and adds.
    addr_c = AW'(s1_x[INT_W-2:0]) + AW'(IMG) * AW'(s1_y[INT_W-2:0]) +
             AW'(IMG * IMG) * AW'(s1_z[INT_W-2:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_pad   <= 1'b0;
      out_addr  <= '0;
      out_coord <= '0;
    end else begin
      out_valid <= s1_valid;
      out_last  <= s1_last;
      out_pad   <= pad_c;
      out_addr  <= pad_c ? '0 : addr_c;
      out_coord <= s1_coord;
    end
  end

  assign busy = running;

  // Traversal extents must be at least one voxel.
  assert property (@(posedge clk) disable iff (!rst_n)
      (start && !running) |-> (params.ni != 0 && params.nj != 0 && params.nk != 0));

endmodule
