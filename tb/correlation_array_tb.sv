// Testbench for correlation_array: a 3x3x3 template, random 2-bit image
// streams for two different traversal boxes (so the delay lines are
// re-programmed), random gaps in the input, and a narrow 7-bit sum so that
// saturation occurs. Every score with a complete window is compared with a
// direct summation over the template, done in chain order with the same
// saturation. Also checks one score per input voxel and a one-clock latency.
module correlation_array_tb;
  import corr3d_pkg::tidx_t;
  localparam int T = 3, SUM_W = 7, SCORE_W = 4, TMAX = 10, N = T * T * T;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, tload = 0;
  tidx_t nj = '0, nk = '0;
  logic [1:0] a = '0, tdata = '0;
  logic [15:0][SCORE_W-1:0] ftab;
  logic out_valid, sat_any;
  logic signed [SUM_W-1:0] score;
  int checks = 0, failures = 0, nsat = 0;

  correlation_array #(.T(T), .SUM_W(SUM_W), .SCORE_W(SCORE_W), .TRAV_MAX(TMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", w, got, exp);
    end
  endtask

  function automatic int sx(input logic [SCORE_W-1:0] v);
    return v[SCORE_W-1] ? int'(v) - (1 << SCORE_W) : int'(v);
  endfunction

  int tmpl [N];
  int img [];
  always @(posedge clk) if (sat_any) nsat++;

  task automatic run(input int ni, input int nj_i, input int nk_i);
    int total, d_max, q, outs;
    total = ni * nj_i * nk_i;
    d_max = (T - 1) * (nj_i * nk_i + nk_i + 1);
    img = new[total];
    foreach (img[n]) img[n] = $urandom_range(3);
    @(negedge clk);
    nj = tidx_t'(nj_i); nk = tidx_t'(nk_i); clear = 1;
    @(negedge clk);
    clear = 0;
    q = 0; outs = 0;
    while (q < total) begin
      in_valid = ($urandom_range(4) != 0);
      a = 2'(img[q]);
      @(posedge clk); #1;
      if (in_valid) begin
        chk("out_valid", out_valid, 1);
        outs++;
        if (q >= d_max) begin
          int s;
          s = 0;
          for (int di = 0; di < T; di++)
            for (int dj = 0; dj < T; dj++)
              for (int dk = 0; dk < T; dk++) begin
                int d, e;
                d = (di * nj_i + dj) * nk_i + dk;
                e = s + sx(ftab[img[q - d_max + d] * 4 + tmpl[(di * T + dj) * T + dk]]);
                s = (e > 63) ? 63 : (e < -64) ? -64 : e;
              end
          chk("score", score, s);
        end
        q++;
      end else begin
        chk("no out", out_valid, 0);
      end
      @(negedge clk);
    end
    in_valid = 0;
    chk("outputs", outs, total);
  endtask

  initial begin
    for (int t = 0; t < 16; t++) ftab[t] = SCORE_W'($urandom_range(15));
    ftab[15] = 4'd7; ftab[0] = 4'd7;   // strong positive entries to reach saturation
    ftab[5] = 4'b1000;                  // and a strong negative one
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load the template, PE 0 first
    for (int n = 0; n < N; n++) tmpl[n] = $urandom_range(3);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      tload = 1; tdata = 2'(tmpl[n]);
    end
    @(negedge clk);
    tload = 0;
    run(6, 5, 7);
    run(5, 10, 10);
    run(4, 3, 3);
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("saturating clocks: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
