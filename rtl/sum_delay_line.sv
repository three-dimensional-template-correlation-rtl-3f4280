// sum_delay_line: delay of a programmable number of enabled clocks for the
// partial sums of the correlation array.
//
// The correlation array is a single chain of processing elements. Between the
// end of one template row and the start of the next, and between template
// planes, the partial sums must wait until the image stream reaches the
// matching voxel of the next row or plane. That wait depends on the traversal
// extents of the current rotation, so its length 'len' is set at run time
// (0 .. MAXLEN). It is a circular buffer of MAXLEN words: the word read is the
// one written 'len' enabled clocks ago; len = 0 passes the input straight
// through. 'len' must not exceed MAXLEN (the array checks its box extents). 'clear' rewinds the pointer (at the start of a traversal). The
// buffer is not initialised: its first 'len' outputs after 'clear' are
// meaningless and the array discards the scores they feed.
//
// The circular-buffer structure is this design's choice; the need for the
// delays follows from feeding a 3D array one voxel per clock.
module sum_delay_line #(
  parameter int unsigned W      = corr3d_pkg::SUM_W,
  parameter int unsigned MAXLEN = 16,
  localparam int unsigned LW    = $clog2(MAXLEN + 1)
) (
  input  logic         clk,
  input  logic         en,
  input  logic         clear,
  input  logic [LW-1:0] len,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0]  buffer [MAXLEN];
  logic [LW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (clear)
      ptr <= '0;
    else if (en && len != '0) begin
      buffer[ptr[$clog2(MAXLEN)-1:0]] <= din;
      ptr <= (ptr == len - LW'(1)) ? '0 : ptr + LW'(1);
    end
  end

  assign dout = (len == '0) ? din : buffer[ptr[$clog2(MAXLEN)-1:0]];

endmodule
