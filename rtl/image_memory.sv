// image_memory: linear voxel RAM holding the 3D image that is searched.
//
// One word per voxel, address x + IMG*y + IMG^2*z. The host writes it through
// a simple write port; the pipeline reads it through a synchronous read port
// with one clock of latency, one voxel per clock. When the read request is
// marked as padding, the memory is not consulted and the host-set padding
// value is returned instead, so the traversal's padding voxels enter the
// correlation array as ordinary voxels.
//
// The IMG^3 size with 2-bit words follows the implemented accelerator (images
// up to 50^3, held in on-chip RAM). The write port, the padding multiplexer and
// the one-cycle latency are this design's choices.
module image_memory #(
  parameter int unsigned IMG   = corr3d_pkg::IMG_DIM,
  parameter int unsigned WIDTH = corr3d_pkg::VOXEL_W,
  localparam int unsigned DEPTH = IMG * IMG * IMG,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host write port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // pipeline read port
  input  logic             rd_en,
  input  logic             rd_pad,
  input  logic [AW-1:0]    rd_addr,
  input  logic [WIDTH-1:0] pad_value,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] q;
  logic             pad_q;
  logic [WIDTH-1:0] padv_q;

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    q      <= mem[rd_addr];
    padv_q <= pad_value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      pad_q    <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      pad_q    <= rd_pad;
    end
  end

  assign rd_data = pad_q ? padv_q : q;

  assert property (@(posedge clk) disable iff (!rst_n)
      wr_en |-> (int'(wr_addr) < int'(DEPTH)));

endmodule
