// tb_scn_cam_workloads: runs the SCN-CAM on the workloads the design is meant
// for and checks both the answers and how many sub-blocks each search enables.
//
//  1. 4 x 4 example array (instance `u_small`: ENTRIES=4, WIDTH=4, Q=2, KAPPA=1,
//     NSB=2, no preset). Rows 1010, 0111, 1100, 1010 are written; searching
//     1100 must return address 2 only; 1010 is a double match (rows 0 and 3).
//  2. Uniform reduced tags (instance `u_full`, default 16 x 8, preset table).
//     All 256 search words are applied back to back. Each of the 8 reduced
//     tags has exactly two owners, in different sub-blocks, so every search
//     must enable exactly 2 of the 4 sub-blocks (2 candidate entries per
//     search on average), and exactly the 16 stored words must hit.
//  3. Non-uniform reduced tags (same instance). All 16 entries are rewritten
//     with tags sharing the low bits 000. A search for a stored word now
//     enables all 4 sub-blocks (more compares, more energy), yet every answer
//     must still be correct.
module tb_scn_cam_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- 4 x 4 instance ----
  logic       s_wr_en = 1'b0, s_srch_en = 1'b0;
  logic [1:0] s_wr_addr = '0;
  logic [3:0] s_wr_data = '0, s_srch_tag = '0, s_ml;
  logic       s_ml_valid, s_res_valid, s_hit, s_multi;
  logic [1:0] s_sb_en, s_addr;

  scn_cam #(.ENTRIES(4), .WIDTH(4), .Q(2), .KAPPA(1), .NSB(2), .PRESET(1'b0)) u_small (
    .clk(clk), .rst_n(rst_n), .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_data(s_wr_data),
    .srch_en(s_srch_en), .srch_tag(s_srch_tag), .ml(s_ml), .ml_valid(s_ml_valid),
    .sb_en(s_sb_en), .res_valid(s_res_valid), .hit(s_hit), .multi(s_multi),
    .match_addr(s_addr));

  // ---- default 16 x 8 instance ----
  logic       wr_en = 1'b0, srch_en = 1'b0;
  logic [3:0] wr_addr = '0, addr;
  logic [7:0] wr_data = '0, srch_tag = '0;
  logic [15:0] ml;
  logic       ml_valid, res_valid, hit, multi;
  logic [3:0] sb_en;

  scn_cam u_full (.*, .match_addr(addr));

  // Monitor of the 16 x 8 instance: results arrive 3 cycles after issue.
  logic [7:0] issued [$];
  logic [7:0] mem [16];
  int n_res = 0, n_hits = 0, sb_total = 0, sb_searches = 0;

  always @(negedge clk) begin
    if (rst_n && ml_valid) begin
      sb_total += $countones(sb_en);
      sb_searches++;
    end
    if (rst_n && res_valid) begin
      logic [7:0] t;
      int lo;
      t = issued.pop_front();
      lo = -1;
      for (int j = 15; j >= 0; j--) if (mem[j] == t) lo = j;
      check(hit == (lo >= 0) && (lo < 0 || addr == 4'(lo)),
            $sformatf("tag %b: hit %b addr %0d, expected entry %0d", t, hit, addr, lo));
      n_res++;
      if (hit) n_hits++;
    end
  end

  task automatic full_search(logic [7:0] t);
    srch_en = 1'b1; srch_tag = t; issued.push_back(t);
    @(negedge clk);
    srch_en = 1'b0;
  endtask

  task automatic drain();
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < 16; j++) mem[j] = {4'(j), ~4'(j)};
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. 4 x 4 example.
    for (int k = 0; k < 4; k++) begin
      s_wr_en = 1'b1; s_wr_addr = 2'(k);
      s_wr_data = (k == 0) ? 4'b1010 : (k == 1) ? 4'b0111 : (k == 2) ? 4'b1100 : 4'b1010;
      @(negedge clk);
    end
    s_wr_en = 1'b0;
    s_srch_en = 1'b1; s_srch_tag = 4'b1100;
    @(negedge clk);
    s_srch_tag = 4'b1010;
    @(negedge clk);
    s_srch_en = 1'b0;
    check(s_ml_valid && s_ml == 4'b0100, $sformatf("4x4: search 1100 ML %b, expected ML2 only", s_ml));
    @(negedge clk);
    check(s_res_valid && s_hit && !s_multi && s_addr == 2'd2, "4x4: search 1100 -> address 2");
    check(s_ml_valid && s_ml == 4'b1001, $sformatf("4x4: search 1010 ML %b, expected ML0 and ML3", s_ml));
    @(negedge clk);
    check(s_res_valid && s_hit && s_multi && s_addr == 2'd0, "4x4: search 1010 -> double match, address 0");

    // 2. Uniform reduced tags, preset table, all 256 words back to back.
    for (int v = 0; v < 256; v++) full_search(8'(v));
    drain();
    check(n_res == 256 && n_hits == 16, $sformatf("uniform: %0d results, %0d hits", n_res, n_hits));
    check(sb_searches == 256 && sb_total == 2 * 256,
          $sformatf("uniform: %0d sub-blocks enabled over %0d searches, expected 2 each",
                    sb_total, sb_searches));
    $display("uniform: average sub-blocks enabled per search = %0d/%0d", sb_total, sb_searches);

    // 3. Non-uniform reduced tags: every entry ends in 000.
    for (int j = 0; j < 16; j++) begin
      wr_en = 1'b1; wr_addr = 4'(j); wr_data = {4'(j), 4'b1000};
      mem[j] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    n_res = 0; n_hits = 0; sb_total = 0; sb_searches = 0;
    for (int j = 0; j < 16; j++) full_search(mem[j]);
    for (int j = 0; j < 16; j++) full_search({4'(j), 4'b0000});  // same reduced tag, not stored
    drain();
    check(n_res == 32 && n_hits == 16, $sformatf("non-uniform: %0d results, %0d hits", n_res, n_hits));
    check(sb_total == 4 * 32, $sformatf("non-uniform: %0d sub-blocks enabled, expected all 4 each", sb_total));
    $display("non-uniform: average sub-blocks enabled per search = %0d/%0d", sb_total, sb_searches);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
