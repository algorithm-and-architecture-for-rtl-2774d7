// tb_cam_array: self-checking test of the 16 x 8 CAM array at its defaults.
// After reset the array must hold the 16 x 8 table (entry i = {i, ~i}): each
// entry's word, searched with all sub-blocks enabled, raises only its own
// match line, and the example search 11000011 raises ML12. Random searches
// with random sub-block enables and random writes are then checked against a
// reference model; disabled sub-blocks must keep their match lines low.
module tb_cam_array;
  localparam int M = 16, W = 8, S = 4, RPS = M / S;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [3:0] wr_addr = '0;
  logic [W-1:0] wr_data = '0, sl = '0, sl_n = '0;
  logic [S-1:0] sb_en = '0;
  logic [M-1:0] ml;
  int checks = 0, failures = 0;
  logic [W-1:0] mem [M];
  logic [M-1:0] exp_ml;

  cam_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search(logic [W-1:0] key, logic [S-1:0] en);
    @(negedge clk);
    sl = key; sl_n = ~key; sb_en = en;
    exp_ml = '0;
    for (int j = 0; j < M; j++) exp_ml[j] = en[j / RPS] && (mem[j] == key);
    @(negedge clk);
    sl = '0; sl_n = '0; sb_en = '0;
    checks++;
    if (ml !== exp_ml) begin
      failures++;
      $display("FAIL search %b en=%b: ml %b expected %b", key, en, ml, exp_ml);
    end
  endtask

  initial begin
    for (int j = 0; j < M; j++) mem[j] = {4'(j), ~4'(j)};
    #12 rst_n = 1'b1;
    search(8'b1100_0011, '1);
    checks++;
    if (ml !== 16'h1000) begin
      failures++;
      $display("FAIL example: 11000011 gave ML %b", ml);
    end
    for (int j = 0; j < M; j++) search(mem[j], '1);
    for (int j = 0; j < M; j++) search(mem[j], S'($urandom));
    for (int i = 0; i < 600; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = 4'($urandom); wr_data = W'($urandom_range(0, 15));
        mem[wr_addr] = wr_data;
        @(negedge clk);
        wr_en = 1'b0;
      end
      search(W'($urandom_range(0, 15)), S'($urandom));
      search(mem[$urandom_range(0, M - 1)], S'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
