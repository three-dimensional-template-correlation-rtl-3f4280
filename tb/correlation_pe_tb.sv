// Testbench for correlation_pe: loads template voxels through the shift
// port, programs random score tables and checks sum_out = sat(sum_in + F(a,b))
// for random operands, including sums driven into both saturation limits, the
// 'sat' flag and holding when not enabled. A second element with vectors
// checks the opposition term -(a.b) >>> 4.
module correlation_pe_tb;
  localparam int CLS_W = 2, SUM_W = 10, SCORE_W = 4, VC = 6;
  localparam int NTAB = 16;
  logic clk = 0, en = 0, load = 0;
  logic [CLS_W-1:0] b_in = '0, b_out, a = '0;
  logic [CLS_W+3*VC-1:0] vb_in = '0, vb_out, va = '0;
  logic [NTAB-1:0][SCORE_W-1:0] ftab;
  logic signed [SUM_W-1:0] sum_in = '0, sum_out, vsum_out;
  logic sat, vsat;
  int checks = 0, failures = 0;

  correlation_pe #(.CLS_W(CLS_W), .SUM_W(SUM_W), .SCORE_W(SCORE_W)) dut (
    .clk, .en, .load, .b_in, .b_out, .a, .ftab, .sum_in, .sum_out, .sat);
  correlation_pe #(.CLS_W(CLS_W), .VEC_CW(VC), .SUM_W(SUM_W), .SCORE_W(SCORE_W)) dutv (
    .clk, .en, .load, .b_in(vb_in), .b_out(vb_out), .a(va), .ftab, .sum_in,
    .sum_out(vsum_out), .sat(vsat));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic int sx(input logic [31:0] v, input int w);  // sign-extend
    return (v[w-1]) ? int'(v) - (1 << w) : int'(v);
  endfunction

  initial begin
    int sums [] = '{0, 511, -512, 505, -508, 100};
    for (int n = 0; n < 2000; n++) begin
      int bv, av, si, f, e, dot, fv, ev;
      @(negedge clk);
      // load a new template voxel
      load = 1; b_in = CLS_W'($urandom); vb_in = (CLS_W+3*VC)'({$urandom, $urandom});
      en = 0;
      @(negedge clk);
      load = 0;
      chk("b_out", b_out, b_in);
      bv = b_in;
      for (int t = 0; t < NTAB; t++) ftab[t] = SCORE_W'($urandom);
      a = CLS_W'($urandom); av = a;
      va = (CLS_W+3*VC)'({$urandom, $urandom});
      si = (n < sums.size()) ? sums[n] : (($urandom_range(3) == 0) ?
           sums[$urandom_range(5)] : $urandom_range(1023) - 512);
      sum_in = SUM_W'(si);
      en = 1;
      @(posedge clk); #1;
      f = sx(ftab[av * 4 + bv], SCORE_W);
      e = si + f;
      chk("sat", sat, e > 511 || e < -512);
      e = (e > 511) ? 511 : (e < -512) ? -512 : e;
      chk("sum", sum_out, e);
      dot = 0;
      for (int c = 0; c < 3; c++)
        dot += sx(va[CLS_W + c*VC +: VC], VC) * sx(vb_in[CLS_W + c*VC +: VC], VC);
      fv = sx(ftab[va[1:0] * 4 + vb_in[1:0]], SCORE_W) - (dot >>> 4);
      ev = si + fv;
      ev = (ev > 511) ? 511 : (ev < -512) ? -512 : ev;
      chk("vsum", vsum_out, ev);
      // no enable: hold
      @(negedge clk);
      en = 0; sum_in = '0;
      @(posedge clk); #1;
      chk("hold", sum_out, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
