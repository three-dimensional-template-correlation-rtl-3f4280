// Testbench for image_memory: fills a small memory with random voxels, then
// reads random addresses one per clock, some flagged as padding, and checks
// data, padding substitution and the one-clock read latency against a copy
// kept by the testbench.
module image_memory_tb;
  localparam int IMG = 6, W = 2, DEPTH = IMG * IMG * IMG, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, rd_pad = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, pad_value = '0, rd_data;
  logic rd_valid;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  image_memory #(.IMG(IMG), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_q;
  logic exp_v;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = W'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      bit p;
      a = $urandom_range(DEPTH - 1);
      p = ($urandom_range(3) == 0);
      rd_en = 1; rd_addr = AW'(a); rd_pad = p; pad_value = W'($urandom);
      exp_q = p ? pad_value : model[a];
      @(posedge clk); #1;
      checks++;
      if (!rd_valid || rd_data != exp_q) begin
        failures++;
        $display("FAIL read %0d pad %0d got %0d exp %0d", a, p, rd_data, exp_q);
      end
      @(negedge clk);
    end
    rd_en = 0;
    @(posedge clk); #1;
    checks++;
    if (rd_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
