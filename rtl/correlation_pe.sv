// correlation_pe: one processing element of the systolic correlation array.
//
// The element stores one template voxel b. Every enabled clock it receives
// the image voxel a (broadcast to all elements) and the partial sum from the
// previous element, and registers
//     sum_out = sat(sum_in + F(a, b))
// so the chain of elements accumulates one correlation score per clock.
// F is a general scoring function, not only a product. Here the class part of
// the voxel (CLS_W bits) indexes a host-loaded table of 2^(2*CLS_W) signed
// entries, so any function of two 2-bit voxels can be programmed, including
// |s - t| and collision penalties. When the voxel also carries a vector
// (VEC_CW > 0, used with voxel rotation) the opposition of the two vectors,
// -(a.b) >>> OPP_SHIFT, is added to the table score.
// The sum saturates at the limits of a SUM_W-bit signed number and 'sat'
// flags a clock where that happened.
//
// Template load: while 'load' is high, b takes b_in and the old b appears on
// b_out, so the elements form a shift register. A voxel layout is
// {vector x, y, z (VEC_CW bits each, signed), class (CLS_W bits)}.
//
// From the design: one template voxel per element, general (possibly
// nonlinear) scoring, 2-bit voxels and 10-bit saturating sums. The table
// form of F, signed sums and the vector opposition term are this design's
// choices.
module correlation_pe #(
  parameter int unsigned CLS_W     = corr3d_pkg::VOXEL_W,
  parameter int unsigned VEC_CW    = 0,
  parameter int unsigned SUM_W     = corr3d_pkg::SUM_W,
  parameter int unsigned SCORE_W   = corr3d_pkg::SCORE_W,
  parameter int unsigned OPP_SHIFT = 4,
  localparam int unsigned VW       = CLS_W + 3 * VEC_CW,
  localparam int unsigned NTAB     = 1 << (2 * CLS_W)
) (
  input  logic                              clk,
  input  logic                              en,
  input  logic                              load,
  input  logic [VW-1:0]                     b_in,
  output logic [VW-1:0]                     b_out,
  input  logic [VW-1:0]                     a,
  input  logic [NTAB-1:0][SCORE_W-1:0]      ftab,
  input  logic signed [SUM_W-1:0]           sum_in,
  output logic signed [SUM_W-1:0]           sum_out,
  output logic                              sat
);

  logic [VW-1:0] b;

  always_ff @(posedge clk) begin
    if (load)
      b <= b_in;
  end
  assign b_out = b;

  // Score term F(a, b), 32-bit signed: table entry plus, with vectors, the
  // opposition of the two vectors.
  logic signed [31:0] tab_term, opp_term, term;
  assign tab_term = 32'(signed'(ftab[{a[CLS_W-1:0], b[CLS_W-1:0]}]));

  if (VEC_CW > 0) begin : g_vec
    logic signed [31:0] dot;
    always_comb begin
      dot = 0;
      for (int c = 0; c < 3; c++)
        dot += 32'(signed'(a[CLS_W + c*VEC_CW +: VEC_CW])) *
               32'(signed'(b[CLS_W + c*VEC_CW +: VEC_CW]));
    end
    assign opp_term = -(dot >>> OPP_SHIFT);
  end else begin : g_novec
    assign opp_term = '0;
  end

  assign term = tab_term + opp_term;

  localparam logic signed [31:0] SMAX = (32'sd1 <<< (SUM_W - 1)) - 32'sd1;
  localparam logic signed [31:0] SMIN = -(32'sd1 <<< (SUM_W - 1));

  logic signed [31:0] wide;
  logic signed [SUM_W-1:0] next;
  logic over;
  always_comb begin
    wide = 32'(sum_in) + term;
    over = (wide > SMAX) || (wide < SMIN);
    if (wide > SMAX)      next = SMAX[SUM_W-1:0];
    else if (wide < SMIN) next = SMIN[SUM_W-1:0];
    else                  next = wide[SUM_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      sum_out <= next;
      sat     <= over;
    end else begin
      sat     <= 1'b0;
    end
  end

endmodule
