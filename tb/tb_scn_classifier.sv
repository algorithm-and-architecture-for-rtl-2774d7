// tb_scn_classifier: self-checking test of the clustered-neural-network
// classifier at its defaults (16 entries, 3-bit reduced tag in 3 clusters of
// 1 bit, 4 sub-blocks). The reference model says PII neuron j fires exactly
// when entry j was trained with a tag whose 3 low bits equal the query's, and
// sub-block s is enabled when any of its 4 neurons fires. Checked: the preset
// training (each table word enables the two sub-blocks holding the entries
// that share its low 3 bits), retraining that overwrites an entry, queries
// with no trained match, and that outputs drop to zero without a query.
module tb_scn_classifier;
  localparam int M = 16, W = 8, S = 4, RPS = M / S, Q = 3;
  logic clk = 1'b0, rst_n = 1'b0, train_en = 1'b0, query_en = 1'b0;
  logic [3:0] train_addr = '0;
  logic [W-1:0] train_tag = '0, query_tag = '0;
  logic [S-1:0] sb_en;
  logic [M-1:0] pii;
  int checks = 0, failures = 0;
  logic [W-1:0] trained [M];
  logic [M-1:0] tvalid;
  logic [M-1:0] exp_pii;
  logic [S-1:0] exp_sb;
  int ambiguous = 0;

  scn_classifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic query(logic [W-1:0] tag);
    @(negedge clk);
    query_en = 1'b1; query_tag = tag;
    exp_pii = '0; exp_sb = '0;
    for (int j = 0; j < M; j++) begin
      exp_pii[j] = tvalid[j] && (trained[j][Q-1:0] == tag[Q-1:0]);
      if (exp_pii[j]) exp_sb[j / RPS] = 1'b1;
    end
    @(negedge clk);
    query_en = 1'b0;
    checks++;
    if (pii !== exp_pii || sb_en !== exp_sb) begin
      failures++;
      $display("FAIL query %b: pii %b sb %b expected %b %b", tag, pii, sb_en, exp_pii, exp_sb);
    end
    if ($countones(sb_en) > 1) ambiguous++;
  endtask

  task automatic train(int j, logic [W-1:0] tag);
    @(negedge clk);
    train_en = 1'b1; train_addr = 4'(j); train_tag = tag;
    @(negedge clk);
    train_en = 1'b0;
    trained[j] = tag; tvalid[j] = 1'b1;
  endtask

  initial begin
    for (int j = 0; j < M; j++) trained[j] = {4'(j), ~4'(j)};
    tvalid = '1;
    #12 rst_n = 1'b1;
    for (int j = 0; j < M; j++) query(trained[j]);
    // 11000011: entries 4 and 12 share the low bits 011 -> sub-blocks 1 and 3.
    query(8'b1100_0011);
    checks++;
    if (sb_en !== 4'b1010 || pii !== 16'h1010) begin
      failures++;
      $display("FAIL example query: sb %b pii %b", sb_en, pii);
    end
    @(negedge clk);
    checks++;
    if (sb_en !== 4'b0000) begin failures++; $display("FAIL idle sb_en %b", sb_en); end
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 2) == 0) train($urandom_range(0, M - 1), W'($urandom));
      query(W'($urandom));
    end
    checks++;
    if (ambiguous == 0) begin failures++; $display("FAIL no ambiguous query seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
