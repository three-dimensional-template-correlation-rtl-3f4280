// corr3d_top: 3D template correlation pipeline.
//
// Finds a small 3D template (T^3 voxels) in a 3D voxel image (IMG^3 voxels)
// for one three-axis rotation per run:
//
//   rotated_traversal -> image_memory -> [voxel_rotation] -> correlation_array
//        -> sub-block number and tag -> peak_filter -> host
//
// Rather than rotating the template (which would mean reloading the array)
// the image is read in rotated order; the template stays in the array and the
// image stays in its memory between rotations. The traversal produces one
// address (or a padding flag) per clock, the memory returns one voxel per
// clock, the optional voxel rotation turns vector voxel contents through the
// same rotation, the array emits one correlation score per clock, and the
// peak filter keeps one maximum per 8x8x8 sub-block of the result grid.
//
// Host side (the board's host interface is outside this design, its signals
// are plain ports here):
//   * img_wr_*  write image voxels (address x + IMG*y + IMG^2*z);
//   * tload/tdata shift the template into the array, T^3 voxels in raster
//     order (di, dj, dk; dk fastest);
//   * ftab is the score table F(a,b) indexed {a, b} (class bits);
//   * params is one rotation's set-up; start (while !busy) launches it, done
//     pulses once its last score is in the peak filter;
//   * start also swaps the peak filter banks, so after done and the next start
//     (or before it, for the previous rotation) the host reads the other bank
//     with pk_rd_addr and empties it with pk_clear.
// Raw scores are also brought out (res_*), with the traversal position of the
// window's last voxel; res_window is low for the first D = (T-1)(nj*nk+nk+1)
// scores of a run, whose windows start before the stream does. Only scores
// with res_window high reach the peak filter. Event outputs (ev_*) pulse when
// a padding voxel is read, a sum saturates, or the filter fills, improves or
// keeps a record.
//
// The first score appears 4 clocks after the clock that samples start (6 with
// voxel rotation), then one per clock with no stalls; done pulses 2 clocks
// after the last score, so a run of n voxels takes n + 5 clocks (n + 7).
//
// From the design: the five-stage pipeline, rotated traversal with padding,
// template held in the array, sub-block numbers from result indices divided
// by 8, double-buffered maxima. The host handshake (start/busy/done, bank
// swap on start), the result coordinate convention and the event outputs are
// this design's choices. VOXEL_ROTATION = 0 (the default) leaves the optional
// voxel rotation stage out, as in the accelerator with 2-bit voxels.
module corr3d_top
  import corr3d_pkg::*;
#(
  parameter int unsigned T_DIM          = corr3d_pkg::TMPL_DIM,
  parameter int unsigned IMG            = corr3d_pkg::IMG_DIM,
  parameter int unsigned TMAX           = corr3d_pkg::TRAV_MAX,
  parameter int unsigned SBS            = corr3d_pkg::SB_SHIFT,
  parameter bit          VOXEL_ROTATION = 1'b0,
  parameter int unsigned COMP_W         = 8,
  parameter int unsigned SUM_BITS       = corr3d_pkg::SUM_W,
  localparam int unsigned VEC_CW        = VOXEL_ROTATION ? COMP_W : 0,
  localparam int unsigned VW            = VOXEL_W + 3 * VEC_CW,
  localparam int unsigned NTAB          = 1 << (2 * VOXEL_W),
  localparam int unsigned AW            = $clog2(IMG * IMG * IMG),
  localparam int unsigned NSB           = (TMAX + (1 << SBS) - 1) >> SBS,
  localparam int unsigned RAW           = $clog2(NSB * NSB * NSB)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // image load
  input  logic                         img_wr_en,
  input  logic [AW-1:0]                img_wr_addr,
  input  logic [VW-1:0]                img_wr_data,
  input  logic [VW-1:0]                pad_value,
  // template and scoring
  input  logic                         tload,
  input  logic [VW-1:0]                tdata,
  input  logic [NTAB-1:0][SCORE_W-1:0] ftab,
  input  logic signed [2:0][2:0][17:0] vrot_matrix,   // unused if VOXEL_ROTATION = 0
  // run control
  input  rot_params_t                  params,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // raw score stream
  output logic                         res_valid,
  output logic                         res_window,
  output logic signed [SUM_BITS-1:0]   res_score,
  output tcoord_t                      res_coord,
  // peak filter host port
  input  logic                         pk_clear,
  input  logic [RAW-1:0]               pk_rd_addr,
  output logic                         pk_rd_full,
  output logic signed [SUM_BITS-1:0]   pk_rd_score,
  output tcoord_t                      pk_rd_tag,
  output logic                         pk_collect_bank,
  // events
  output logic                         ev_pad,
  output logic                         ev_sat,
  output logic                         ev_peak_empty,
  output logic                         ev_peak_better,
  output logic                         ev_peak_kept
);

  typedef struct packed {
    tcoord_t c;
    logic    last;
  } side_t;

  logic go;
  assign go = start && !busy;

  // ---------------- rotated traversal ----------------
  logic          tr_valid, tr_last, tr_pad;
  logic [AW-1:0] tr_addr;
  tcoord_t       tr_coord;

  rotated_traversal #(.IMG(IMG)) u_trav (
    .clk, .rst_n, .start(go), .params, .busy(),
    .out_valid(tr_valid), .out_last(tr_last), .out_pad(tr_pad),
    .out_addr(tr_addr), .out_coord(tr_coord));

  // ---------------- image memory ----------------
  logic          m_valid;
  logic [VW-1:0] m_data;
  side_t         m_side;

  image_memory #(.IMG(IMG), .WIDTH(VW)) u_mem (
    .clk, .rst_n,
    .wr_en(img_wr_en), .wr_addr(img_wr_addr), .wr_data(img_wr_data),
    .rd_en(tr_valid), .rd_pad(tr_pad), .rd_addr(tr_addr), .pad_value,
    .rd_valid(m_valid), .rd_data(m_data));

  always_ff @(posedge clk) m_side <= '{c: tr_coord, last: tr_last};

  assign ev_pad = tr_valid && tr_pad;

  // ---------------- optional voxel rotation ----------------
  logic          v_valid;
  logic [VW-1:0] v_data;
  side_t         v_side;

  if (VOXEL_ROTATION) begin : g_vrot
    side_t side_d;
    voxel_rotation #(.NVEC(1), .COMP_W(COMP_W), .SCALAR_W(VOXEL_W)) u_vrot (
      .clk, .rst_n, .matrix(vrot_matrix),
      .in_valid(m_valid), .in_voxel(m_data),
      .out_valid(v_valid), .out_voxel(v_data));
    always_ff @(posedge clk) begin
      side_d <= m_side;
      v_side <= side_d;
    end
  end else begin : g_no_vrot
    assign v_valid = m_valid;
    assign v_data  = m_data;
    assign v_side  = m_side;
  end

  // ---------------- correlation array ----------------
  logic  a_valid;
  side_t a_side;
  logic  a_sat;

  correlation_array #(
    .T(T_DIM), .CLS_W(VOXEL_W), .VEC_CW(VEC_CW), .SUM_W(SUM_BITS),
    .SCORE_W(SCORE_W), .TRAV_MAX(TMAX)
  ) u_array (
    .clk, .rst_n, .clear(go), .nj(params.nj), .nk(params.nk),
    .in_valid(v_valid), .a(v_data), .tload, .tdata, .ftab,
    .out_valid(a_valid), .score(res_score), .sat_any(a_sat));

  always_ff @(posedge clk) a_side <= v_side;

  assign ev_sat = a_sat;

  // Window check: stream position of (i,j,k) at least that of (T-1,T-1,T-1).
  localparam tidx_t TM1 = tidx_t'(T_DIM - 1);
  logic in_window;
  always_comb begin
    in_window = (a_side.c.i > TM1) ||
                (a_side.c.i == TM1 && a_side.c.j > TM1) ||
                (a_side.c.i == TM1 && a_side.c.j == TM1 && a_side.c.k >= TM1);
  end

  assign res_valid  = a_valid;
  assign res_window = a_valid && in_window;
  assign res_coord  = a_side.c;

  // ---------------- peak filter ----------------
  // Sub-block number from the result indices divided by 2^SBS.
  logic [RAW-1:0] block;
  always_comb begin
    int unsigned bi, bj, bk;
    bi = int'(a_side.c.i) >> SBS;
    bj = int'(a_side.c.j) >> SBS;
    bk = int'(a_side.c.k) >> SBS;
    block = RAW'((bi * NSB + bj) * NSB + bk);
  end

  peak_filter #(.NSB(NSB), .SUM_W(SUM_BITS), .TAG_W($bits(tcoord_t))) u_peak (
    .clk, .rst_n,
    .in_valid(res_window), .in_score(res_score), .in_block(block), .in_tag(a_side.c),
    .upd_empty(ev_peak_empty), .upd_better(ev_peak_better), .kept(ev_peak_kept),
    .swap(go), .clear_read(pk_clear), .collect_bank(pk_collect_bank),
    .rd_addr(pk_rd_addr), .rd_full(pk_rd_full), .rd_score(pk_rd_score),
    .rd_tag(pk_rd_tag));

  // ---------------- run control ----------------
  logic [1:0] fin;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      fin  <= '0;
    end else begin
      fin <= {fin[0], a_valid && a_side.last};
      if (go)
        busy <= 1'b1;
      else if (fin[0])
        busy <= 1'b0;     // falls together with the done pulse
    end
  end
  assign done = fin[1];

  // The template may not be reloaded while a run is in flight.
  assert property (@(posedge clk) disable iff (!rst_n) tload |-> !busy);

endmodule
