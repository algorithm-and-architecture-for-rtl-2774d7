// tb_scn_cam: end-to-end test of the SCN-CAM at its default size (16 x 8,
// 4 sub-blocks, 3-bit reduced tag), starting from the preset 16 x 8 table.
//
// A reference model holds the stored words. For every search it predicts the
// sub-block enables (sub-blocks holding an entry whose low 3 bits equal the
// search word's), the sensed match lines, and hit / multi / lowest matching
// address. The monitor checks the match lines two cycles and the result three
// cycles after the search was issued, so latency and one-search-per-cycle
// throughput are checked too. It counts how often each mechanism occurs and
// fails if one never did: a hit, a miss rejected by the classifier (no
// sub-block enabled), a miss found only by the compare, an ambiguous
// classification (more than one sub-block enabled), a multiple match, a write
// that retrains the classifier, and back-to-back searches.
module tb_scn_cam;
  localparam int M = 16, W = 8, S = 4, RPS = M / S, Q = 3, LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, srch_en = 1'b0;
  logic [3:0] wr_addr = '0;
  logic [W-1:0] wr_data = '0, srch_tag = '0;
  logic [M-1:0] ml;
  logic ml_valid, res_valid, hit, multi;
  logic [S-1:0] sb_en;
  logic [3:0] match_addr;

  scn_cam dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int           issue;
    logic [W-1:0] tag;
    logic [M-1:0] ml;
    logic [S-1:0] sb;
    logic         hit;
    logic         multi;
    logic [3:0]   addr;
  } exp_t;

  exp_t pend[$];
  exp_t mlq[$];
  logic [W-1:0] mem [M];
  int cycle = 0;
  int checks = 0, failures = 0;
  int n_hit = 0, n_cls_miss = 0, n_cmp_miss = 0, n_ambig = 0, n_multi = 0;
  int n_write = 0, n_b2b = 0, n_sb_off = 0;
  int last_search = -10;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t predict(logic [W-1:0] tag);
    exp_t e;
    e.issue = cycle; e.tag = tag; e.ml = '0; e.sb = '0;
    e.hit = 1'b0; e.multi = 1'b0; e.addr = '0;
    for (int j = 0; j < M; j++)
      if (mem[j][Q-1:0] == tag[Q-1:0]) e.sb[j / RPS] = 1'b1;
    for (int j = 0; j < M; j++)
      if (e.sb[j / RPS] && mem[j] == tag) e.ml[j] = 1'b1;
    for (int j = M - 1; j >= 0; j--)
      if (e.ml[j]) begin e.multi = e.hit; e.hit = 1'b1; e.addr = 4'(j); end
    return e;
  endfunction

  // Drive one cycle: at most one of write or search.
  task automatic step(bit do_search, logic [W-1:0] tag, bit do_write, int addr,
                      logic [W-1:0] data);
    exp_t e;
    srch_en = do_search; srch_tag = tag;
    wr_en = do_write; wr_addr = 4'(addr); wr_data = data;
    if (do_search) begin
      e = predict(tag);
      pend.push_back(e);
      mlq.push_back(e);
      if (last_search == cycle - 1) n_b2b++;
      last_search = cycle;
    end
    if (do_write) begin
      mem[addr] = data;
      n_write++;
    end
    @(negedge clk);
    srch_en = 1'b0; wr_en = 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Monitor, at each falling edge (all registers settled).
  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (ml_valid) begin
        exp_t e;
        if (mlq.size() == 0) check(0, "unexpected ml_valid");
        else begin
          e = mlq.pop_front();
          check(cycle - e.issue == LAT - 1, $sformatf("ml latency %0d", cycle - e.issue));
          check(ml == e.ml, $sformatf("tag %b ml %b expected %b", e.tag, ml, e.ml));
          check(sb_en == e.sb, $sformatf("tag %b sb_en %b expected %b", e.tag, sb_en, e.sb));
        end
      end
      if (res_valid) begin
        exp_t e;
        if (pend.size() == 0) check(0, "unexpected res_valid");
        else begin
          e = pend.pop_front();
          check(cycle - e.issue == LAT, $sformatf("result latency %0d", cycle - e.issue));
          check(hit == e.hit && multi == e.multi && (!e.hit || match_addr == e.addr),
                $sformatf("tag %b hit %b multi %b addr %0d expected %b %b %0d", e.tag, hit,
                          multi, match_addr, e.hit, e.multi, e.addr));
          if (e.hit) n_hit++;
          if (e.multi) n_multi++;
          if (e.sb == '0) n_cls_miss++;
          if (e.sb != '0 && !e.hit) n_cmp_miss++;
          if ($countones(e.sb) > 1) n_ambig++;
          n_sb_off += S - $countones(e.sb);
        end
      end
    end
  end

  initial begin
    for (int j = 0; j < M; j++) mem[j] = {4'(j), ~4'(j)};
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Example of the 16 x 8 array: 11000011 is stored at entry 12.
    step(1, 8'b1100_0011, 0, 0, '0);
    step(0, '0, 0, 0, '0);
    check(ml_valid && ml == 16'h1000, "example search 11000011 -> only ML12 high");
    step(0, '0, 0, 0, '0);
    check(res_valid && hit && !multi && match_addr == 4'd12, "example search 11000011 -> address 12");
    // Every table entry, back to back.
    for (int j = 0; j < M; j++) step(1, mem[j], 0, 0, '0);
    // All 8 reduced tags are in use in the table; rewriting both owners of
    // reduced tag 111 (entries 0 and 8) frees it.
    step(0, '0, 1, 0, 8'b0101_0000);
    step(0, '0, 1, 8, 8'b0110_0000);
    step(1, 8'b1010_1111, 0, 0, '0);   // reduced tag 111 now unused: classifier miss
    step(1, 8'b0101_0000, 0, 0, '0);   // hit at the rewritten entry 0
    step(0, '0, 1, 5, 8'b0101_0000);   // duplicate of entry 0: multiple match
    step(1, 8'b0101_0000, 0, 0, '0);
    step(1, 8'b1111_1011, 0, 0, '0);   // reduced tag shared, word not stored
    repeat (LAT) step(0, '0, 0, 0, '0);
    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 2) step(0, '0, 1, $urandom_range(0, M - 1), W'($urandom));
      else if (r < 6) step(1, mem[$urandom_range(0, M - 1)], 0, 0, '0);
      else if (r < 9) step(1, W'($urandom), 0, 0, '0);
      else step(0, '0, 0, 0, '0);
    end
    repeat (LAT + 1) step(0, '0, 0, 0, '0);
    check(pend.size() == 0 && mlq.size() == 0, "all searches answered");
    $display("mechanisms: hit=%0d classifier_miss=%0d compare_miss=%0d ambiguous=%0d multi=%0d write=%0d back_to_back=%0d subblocks_left_idle=%0d",
             n_hit, n_cls_miss, n_cmp_miss, n_ambig, n_multi, n_write, n_b2b, n_sb_off);
    check(n_hit > 0, "hit seen");
    check(n_cls_miss > 0, "classifier miss seen");
    check(n_cmp_miss > 0, "compare miss seen");
    check(n_ambig > 0, "ambiguous classification seen");
    check(n_multi > 0, "multiple match seen");
    check(n_write > 0, "write seen");
    check(n_b2b > 0, "back-to-back searches seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
