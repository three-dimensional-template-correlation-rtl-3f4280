// Testbench for voxel_rotation: streams random voxels with two vectors and a
// scalar through a random fixed-point matrix (one voxel per clock, with gaps)
// and checks each output, two clocks later, against the rounded and saturated
// matrix-vector product computed here; the scalar must come through unchanged.
module voxel_rotation_tb;
  localparam int NV = 2, CW = 8, SW = 2, MW = 18, CF = 16;
  localparam int VW = SW + 3 * CW * NV;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [2:0][2:0][MW-1:0] matrix;
  logic [VW-1:0] in_voxel = '0, out_voxel;
  int checks = 0, failures = 0;

  voxel_rotation #(.NVEC(NV), .COMP_W(CW), .SCALAR_W(SW), .MCOEF_W(MW), .CFRAC(CF))
    dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [VW-1:0] expq [$];
  function automatic logic [VW-1:0] model(input logic [VW-1:0] v);
    logic [VW-1:0] o;
    o = v;
    for (int n = 0; n < NV; n++)
      for (int r = 0; r < 3; r++) begin
        longint s;
        s = 0;
        for (int c = 0; c < 3; c++)
          s += longint'($signed(matrix[r][c])) *
               longint'($signed(v[SW + (3*n + c)*CW +: CW]));
        s = (s + (1 <<< (CF - 1))) >>> CF;
        if (s > 127) s = 127;
        if (s < -128) s = -128;
        o[SW + (3*n + r)*CW +: CW] = CW'(s);
      end
    return o;
  endfunction

  int nsat = 0;
  initial begin
    real ang;
    // a rotation about z by 0.7 rad, then a scaled matrix that saturates
    ang = 0.7;
    matrix = '0;
    matrix[0][0] = MW'($rtoi($cos(ang) * 65536.0));
    matrix[0][1] = MW'(-$rtoi($sin(ang) * 65536.0));
    matrix[1][0] = MW'($rtoi($sin(ang) * 65536.0));
    matrix[1][1] = MW'($rtoi($cos(ang) * 65536.0));
    matrix[2][2] = MW'(65536);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      if (n == 600)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            matrix[r][c] = MW'($urandom_range(2 * 131071) - 131071);
      if (n == 600 || n == 601) begin in_valid = 0; continue; end  // let the change settle
      in_valid = ($urandom_range(4) != 0);
      in_voxel = VW'({$urandom, $urandom});
      if (in_valid) expq.push_back(model(in_voxel));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d voxels missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the model is evaluated at input time; the matrix only changes after a
  // two-clock gap, so it matches the matrix used by the pipeline
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0 || out_voxel != expq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL out %h exp %h", out_voxel, expq[0]);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end
endmodule
