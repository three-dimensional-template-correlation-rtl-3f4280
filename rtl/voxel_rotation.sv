// voxel_rotation: rotates the oriented (vector) contents of voxels.
//
// When the image is traversed in rotated order, voxels that carry vectors
// (surface normals, bond directions, polarisation axes) must also have those
// vectors turned through the same rotation. Voxel contents have no regular
// sequence, so strength reduction does not apply and each vector is
// multiplied by the 3x3 matrix M with nine multipliers:
//     v'_r = sum_c M[r][c] * v_c,   r, c in {x, y, z}.
// Each of the NVEC vectors of a voxel has its own nine multipliers. Scalar
// fields are not rotated but are delayed by the same two clocks so the tuple
// stays together.
//
// Voxel layout (LSB first): SCALAR_W scalar bits, then NVEC vectors, each
// x, y, z of COMP_W signed bits. Coefficients are signed fixed point with
// CFRAC fraction bits (18 bits wide to match FPGA block multipliers). Results
// are rounded to nearest and saturated to COMP_W bits.
//
// Timing: stage 1 registers the products, stage 2 the rounded sums; out_valid
// and out_voxel follow in_valid and in_voxel by two clocks, one voxel per
// clock, no stall. 'matrix' must be stable while voxels flow.
//
// From the design: nine multipliers per vector, scalar delay to match the
// latency. Fixed-point formats, rounding and saturation are this design's.
module voxel_rotation #(
  parameter int unsigned NVEC     = 1,
  parameter int unsigned COMP_W   = 8,
  parameter int unsigned SCALAR_W = corr3d_pkg::VOXEL_W,
  parameter int unsigned MCOEF_W  = 18,
  parameter int unsigned CFRAC    = 16,
  localparam int unsigned VW      = SCALAR_W + 3 * COMP_W * NVEC,
  localparam int unsigned PW      = COMP_W + MCOEF_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic signed [2:0][2:0][MCOEF_W-1:0]    matrix,   // [row][col]
  input  logic                                   in_valid,
  input  logic [VW-1:0]                          in_voxel,
  output logic                                   out_valid,
  output logic [VW-1:0]                          out_voxel
);

  localparam logic signed [PW+1:0] CMAX = (PW+2)'((1 << (COMP_W - 1)) - 1);
  localparam logic signed [PW+1:0] CMIN = -(PW+2)'(1 << (COMP_W - 1));

  logic [1:0] v_q;
  logic [SCALAR_W-1:0] sc_q1;
  logic signed [PW-1:0] prod [NVEC][3][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[0], in_valid};
  end

  // Stage 1: products.
  always_ff @(posedge clk) begin
    sc_q1 <= in_voxel[SCALAR_W-1:0];
    for (int v = 0; v < NVEC; v++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          prod[v][r][c] <= PW'(signed'(matrix[r][c])) *
              PW'(signed'(in_voxel[SCALAR_W + (3*v + c)*COMP_W +: COMP_W]));
  end

  // Stage 2: sums, round, saturate.
  always_ff @(posedge clk) begin
    out_voxel[SCALAR_W-1:0] <= sc_q1;
    for (int v = 0; v < NVEC; v++)
      for (int r = 0; r < 3; r++) begin
        logic signed [PW+1:0] s;
        s = (PW+2)'(prod[v][r][0]) + (PW+2)'(prod[v][r][1]) + (PW+2)'(prod[v][r][2]);
        s = (s + (PW+2)'(1 << (CFRAC - 1))) >>> CFRAC;
        if (s > CMAX)      s = CMAX;
        else if (s < CMIN) s = CMIN;
        out_voxel[SCALAR_W + (3*v + r)*COMP_W +: COMP_W] <= s[COMP_W-1:0];
      end
  end

  assign out_valid = v_q[1];

endmodule
