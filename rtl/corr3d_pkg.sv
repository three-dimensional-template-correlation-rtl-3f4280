// corr3d_pkg: shared sizes and types of the 3D template
// correlation pipeline (rotated traversal -> image memory -> optional voxel
// rotation -> systolic correlation array -> peak filter).
//
// The defaults are those of the implemented accelerator: 2-bit voxels,
// 10-bit saturating sums, templates up to 12x12x12 and images up to
// 50x50x50 voxels. Everything else here (fixed-point formats, coordinate
// widths, score-table entry width, sub-block size as a shift) is this
// design's own choice and is explained beside each item.
package corr3d_pkg;

  // ---- Image and template sizes (from the implemented accelerator) ----
  parameter int unsigned IMG_DIM   = 50;   // image memory is IMG_DIM^3 voxels
  parameter int unsigned TMPL_DIM  = 12;   // template is TMPL_DIM^3 voxels, one per PE
  parameter int unsigned VOXEL_W   = 2;    // bits per voxel
  parameter int unsigned SUM_W     = 10;   // saturating correlation sums

  // ---- Traversal (design choice) ----
  // A 50^3 image rotated arbitrarily fits a box of ceil(50*sqrt(3)) = 87
  // voxels a side; with TMPL_DIM-1 = 11 voxels of padding that is 98.
  parameter int unsigned TRAV_MAX  = 98;   // largest traversal extent per axis
  parameter int unsigned CW        = 7;    // traversal index width, 0..127
  // Coordinates are signed fixed point with FRAC fraction bits. With at most
  // 3*97 accumulation steps the coefficient quantisation error stays below
  // 3*97*2^-13 < 1/16 voxel, well inside the +/-1/2 voxel budget.
  parameter int unsigned FRAC      = 12;
  parameter int unsigned COEF_W    = 16;   // Q3.12 matrix coefficients (|b| < 8)
  parameter int unsigned ACC_W     = 24;   // Q11.12 coordinate accumulators
  parameter int unsigned INT_W     = ACC_W - FRAC;  // integer coordinate width

  // ---- Scoring (design choice) ----
  // F(a,b) for 2-bit voxels is a host-loaded table of 16 signed entries.
  parameter int unsigned SCORE_W   = 4;

  // ---- Peak filter ----
  parameter int unsigned SB_SHIFT  = 3;    // sub-block edge 2^3 = 8 voxels, as in the original filter

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [INT_W-1:0]  icoord_t;
  typedef logic        [CW-1:0]     tidx_t;

  // One rotation's set-up: nine matrix coefficients, three offsets and six
  // range limits (the eighteen rotation parameters), plus the traversal
  // extents of the padded bounding box.
  typedef struct packed {
    coef_t   bix, biy, biz;    // column for index i
    coef_t   bjx, bjy, bjz;    // column for index j
    coef_t   bkx, bky, bkz;    // column for index k (fastest index)
    acc_t    x0, y0, z0;       // offset X0, fixed point
    icoord_t xmin, xmax, ymin, ymax, zmin, zmax;  // inclusive image range
    tidx_t   ni, nj, nk;       // traversal extents (indices run 0..n-1)
  } rot_params_t;

  // Position of a voxel in the traversal (i slowest, k fastest).
  typedef struct packed {
    tidx_t i, j, k;
  } tcoord_t;

endpackage
