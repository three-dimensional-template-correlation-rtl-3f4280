// Testbench for peak_filter: sends random bursts of (score, sub-block, tag)
// into the collecting bank, swaps banks, reads every record of the finished
// bank through the host port and compares with a model that keeps the first
// highest score per sub-block. Clearing, the empty/better/kept events and
// collection into one bank while the other is read are all exercised.
module peak_filter_tb;
  localparam int NSB = 3, NREC = 27, SUM_W = 10, TAG_W = 12, RAW = $clog2(NREC);
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, swap = 0, clear_read = 0;
  logic signed [SUM_W-1:0] in_score = '0, rd_score;
  logic [RAW-1:0] in_block = '0, rd_addr = '0;
  logic [TAG_W-1:0] in_tag = '0, rd_tag;
  logic upd_empty, upd_better, kept, collect_bank, rd_full;
  int checks = 0, failures = 0;
  int n_empty = 0, n_better = 0, n_kept = 0;

  peak_filter #(.NSB(NSB), .SUM_W(SUM_W), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_empty  += int'(upd_empty);
    n_better += int'(upd_better);
    n_kept   += int'(kept);
  end

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", w, got, exp);
    end
  endtask

  bit m_full [NREC];
  int m_score [NREC];
  int m_tag [NREC];
  int e_empty = 0, e_better = 0, e_kept = 0;

  task automatic collect(input int n, input int lo, input int hi);
    for (int r = 0; r < NREC; r++) m_full[r] = 0;
    for (int t = 0; t < n; t++) begin
      int b, s, g;
      @(negedge clk);
      in_valid = ($urandom_range(5) != 0);
      b = $urandom_range(NREC - 1);
      s = $urandom_range(hi - lo) + lo;
      g = $urandom_range(4095);
      in_block = RAW'(b); in_score = SUM_W'(s); in_tag = TAG_W'(g);
      if (in_valid) begin
        if (!m_full[b]) e_empty++;
        else if (s > m_score[b]) e_better++;
        else e_kept++;
        if (!m_full[b] || s > m_score[b]) begin
          m_full[b] = 1; m_score[b] = s; m_tag[b] = g;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
  endtask

  task automatic read_all();
    for (int r = 0; r < NREC; r++) begin
      @(negedge clk);
      rd_addr = RAW'(r);
      @(posedge clk); #1;
      chk("full", rd_full, m_full[r]);
      if (m_full[r]) begin
        chk("score", rd_score, m_score[r]);
        chk("tag", rd_tag, m_tag[r]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int bank;
      bank = collect_bank;
      collect(round == 0 ? 10 : 300, -512 + 100 * round, 200 + 50 * round);
      @(negedge clk);
      swap = 1;
      @(negedge clk);
      swap = 0;
      chk("bank", collect_bank, 1 - bank);
      read_all();
      @(negedge clk);
      clear_read = 1;
      @(negedge clk);
      clear_read = 0;
      for (int r = 0; r < NREC; r++) m_full[r] = 0;
      read_all();          // all empty now
    end
    chk("events empty", n_empty, e_empty);
    chk("events better", n_better, e_better);
    chk("events kept", n_kept, e_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
