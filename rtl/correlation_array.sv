// correlation_array: systolic array for direct 3D correlation.
//
// The template (T x T x T voxels) is held one voxel per processing element.
// The image arrives as a stream in traversal order (i, j, k; k fastest) of a
// box with extents ni x nj x nk, one voxel per enabled clock, and is broadcast
// to every element. The elements form one long chain, ordered by template
// offset d = (di*nj + dj)*nk + dk. Partial sums move down the chain: one clock
// between neighbours in a template row, a delay line of nk - T clocks after
// each template row and one of nj*nk - (T-1)*nk - T clocks after each
// template plane (plus the element's own register in both cases). The score
// leaving the last element in the clock after voxel q arrives is therefore
//     S(q) = sum over (di,dj,dk) of F(A[q - D + d], B[di][dj][dk]),
//     D = (T-1)*(nj*nk + nk + 1),
// the correlation of the template with the window whose last voxel is q,
// accumulated with saturation in chain order. Windows wrap around rows and
// planes of the stream; the traversal's padding (at least T-1 voxels at the
// end of each row and plane) makes the wrapped part read padding, which is
// the same as a zero-padded full correlation. Scores for q < D use partial
// sums from before the stream and are flagged invalid by the caller.
//
// Interface: 'clear' (at the start of a traversal) samples nj/nk and rewinds
// the delay lines; nj and nk must be at least T. 'in_valid' advances the whole
// array by one voxel (a clock without it stalls everything). out_valid/score
// follow in_valid by one clock. Template load: T^3 clocks of 'tload' with
// 'tdata', in template raster order (di, dj, dk; dk fastest). 'sat_any' is set
// in a clock when some element saturated.
//
// From the design: the template held in the elements, one voxel in and one
// score out per clock, the essentially linear chain, general scoring F.
// The delay-line arrangement, load order and wrap-around handling are this
// design's realisation of that array.
module correlation_array #(
  parameter int unsigned T        = corr3d_pkg::TMPL_DIM,
  parameter int unsigned CLS_W    = corr3d_pkg::VOXEL_W,
  parameter int unsigned VEC_CW   = 0,
  parameter int unsigned SUM_W    = corr3d_pkg::SUM_W,
  parameter int unsigned SCORE_W  = corr3d_pkg::SCORE_W,
  parameter int unsigned TRAV_MAX = corr3d_pkg::TRAV_MAX,
  localparam int unsigned VW      = CLS_W + 3 * VEC_CW,
  localparam int unsigned NTAB    = 1 << (2 * CLS_W),
  localparam int unsigned N       = T * T * T,
  localparam int unsigned MAXR    = TRAV_MAX - T,
  localparam int unsigned MAXP    = TRAV_MAX * TRAV_MAX - (T - 1) * TRAV_MAX - T,
  localparam int unsigned LRW     = $clog2(MAXR + 1),
  localparam int unsigned LPW     = $clog2(MAXP + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  corr3d_pkg::tidx_t                        nj,
  input  corr3d_pkg::tidx_t                        nk,
  input  logic                         in_valid,
  input  logic [VW-1:0]                a,
  input  logic                         tload,
  input  logic [VW-1:0]                tdata,
  input  logic [NTAB-1:0][SCORE_W-1:0] ftab,
  output logic                         out_valid,
  output logic signed [SUM_W-1:0]      score,
  output logic                         sat_any
);

  // ---- delay lengths for this traversal ----
  logic [LRW-1:0] len_row;
  logic [LPW-1:0] len_plane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_row   <= '0;
      len_plane <= '0;
    end else if (clear) begin
      len_row   <= LRW'(int'(nk) - int'(T));
      len_plane <= LPW'(int'(nj) * int'(nk) - int'(T - 1) * int'(nk) - int'(T));
    end
  end

  // ---- the chain ----
  logic [VW-1:0]              bchain [N+1];
  logic signed [SUM_W-1:0]    sum_o  [N];
  logic [N-1:0]               sat_v;

  assign bchain[N] = tdata;

  for (genvar n = 0; n < N; n++) begin : g_pe
    localparam int unsigned DK = n % T;
    localparam int unsigned DJ = (n / T) % T;
    logic signed [SUM_W-1:0] sin;

    if (n == 0) begin : g_first
      assign sin = '0;
    end else if (DK != 0) begin : g_next
      assign sin = sum_o[n-1];
    end else if (DJ != 0) begin : g_row
      sum_delay_line #(.W(SUM_W), .MAXLEN(MAXR)) u_dly (
        .clk, .en(in_valid), .clear, .len(len_row),
        .din(sum_o[n-1]), .dout(sin));
    end else begin : g_plane
      sum_delay_line #(.W(SUM_W), .MAXLEN(MAXP)) u_dly (
        .clk, .en(in_valid), .clear, .len(len_plane),
        .din(sum_o[n-1]), .dout(sin));
    end

    correlation_pe #(
      .CLS_W(CLS_W), .VEC_CW(VEC_CW), .SUM_W(SUM_W), .SCORE_W(SCORE_W)
    ) u_pe (
      .clk, .en(in_valid), .load(tload),
      .b_in(bchain[n+1]), .b_out(bchain[n]),
      .a, .ftab, .sum_in(sin), .sum_out(sum_o[n]), .sat(sat_v[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  assign score   = sum_o[N-1];
  assign sat_any = |sat_v;

  assert property (@(posedge clk) disable iff (!rst_n)
      clear |-> (int'(nj) >= int'(T) && int'(nk) >= int'(T) &&
                 int'(nk) <= int'(TRAV_MAX) && int'(nj) <= int'(TRAV_MAX)));

endmodule
