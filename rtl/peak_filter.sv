// peak_filter: data-reduction filter that keeps, for every sub-block of the
// correlation result grid, the best score and where it occurred.
//
// A full 3D correlation result is far too large to send to the host for each
// rotation, and a plain threshold reports one broad peak many times while
// missing lower but distinct peaks. Instead the result grid is cut into
// sub-blocks and one maximum is kept per sub-block, so several separate
// matches are still reported. For each enabled input (score, sub-block
// number, tag) the record of that sub-block is replaced when it is empty
// (cleared) or when the new score is strictly greater than the stored one;
// the tag, which encodes the exact position of the score, is stored with it.
//
// The record RAM is double buffered: one bank collects while the host reads
// and then clears the other, so uploading one rotation's maxima overlaps the
// next rotation. 'swap' exchanges the banks; 'clear_read' empties every record
// of the bank the host reads. Inputs are registered, then the record is read,
// compared and written back in one clock, so back-to-back scores to the same
// sub-block need no forwarding. Host read data follows rd_addr by one clock.
// 'upd_empty' / 'upd_better' / 'kept' report per input what happened.
//
// From the design: the per-sub-block maximum with tag, the replace rule and
// the double-buffered RAM. The single-clock read-modify-write, the flag-vector
// clear and the swap/clear handshake are this design's choices.
module peak_filter #(
  parameter int unsigned NSB   = 13,                  // sub-blocks per axis
  parameter int unsigned SUM_W = corr3d_pkg::SUM_W,
  parameter int unsigned TAG_W = 3 * corr3d_pkg::CW,
  localparam int unsigned NREC = NSB * NSB * NSB,
  localparam int unsigned RAW  = $clog2(NREC)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // collection side
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] in_score,
  input  logic [RAW-1:0]          in_block,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    upd_empty,
  output logic                    upd_better,
  output logic                    kept,
  // bank control
  input  logic                    swap,
  input  logic                    clear_read,
  output logic                    collect_bank,
  // host read side (bank !collect_bank)
  input  logic [RAW-1:0]          rd_addr,
  output logic                    rd_full,
  output logic signed [SUM_W-1:0] rd_score,
  output logic [TAG_W-1:0]        rd_tag
);

  logic signed [SUM_W-1:0] score_mem [2][NREC];
  logic [TAG_W-1:0]        tag_mem   [2][NREC];
  logic [NREC-1:0]         full      [2];

  // ---- input register ----
  logic                    v_q;
  logic signed [SUM_W-1:0] s_q;
  logic [RAW-1:0]          b_q;
  logic [TAG_W-1:0]        t_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end
  always_ff @(posedge clk) begin
    s_q <= in_score;
    b_q <= in_block;
    t_q <= in_tag;
  end

  // ---- compare against the record ----
  logic was_full, better, write;
  always_comb begin
    was_full = full[collect_bank][b_q];
    better   = s_q > score_mem[collect_bank][b_q];
    write    = v_q && (!was_full || better);
  end

  always_ff @(posedge clk) begin
    if (write) begin
      score_mem[collect_bank][b_q] <= s_q;
      tag_mem[collect_bank][b_q]   <= t_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full[0]      <= '0;
      full[1]      <= '0;
      collect_bank <= 1'b0;
    end else begin
      if (write)
        full[collect_bank][b_q] <= 1'b1;
      if (clear_read)
        full[!collect_bank] <= '0;
      if (swap)
        collect_bank <= !collect_bank;
    end
  end

  assign upd_empty  = v_q && !was_full;
  assign upd_better = v_q && was_full && better;
  assign kept       = v_q && was_full && !better;

  // ---- host read port ----
  always_ff @(posedge clk) begin
    rd_full  <= full[!collect_bank][rd_addr];
    rd_score <= score_mem[!collect_bank][rd_addr];
    rd_tag   <= tag_mem[!collect_bank][rd_addr];
  end

  assert property (@(posedge clk) disable iff (!rst_n)
      in_valid |-> (int'(in_block) < int'(NREC)));
  // Swapping while a score is still being written would split it across banks.
  assert property (@(posedge clk) disable iff (!rst_n) swap |-> !v_q);

endmodule
