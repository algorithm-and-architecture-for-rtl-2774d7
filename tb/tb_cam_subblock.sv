// tb_cam_subblock: self-checking test of one compare-enabled CAM sub-block.
// A 4 x 4 sub-block is loaded with the 4 x 4 example array (rows 1010, 0111,
// 1100, 1010; the leftmost bit is column 0, here the MSB). Searching 1100 must
// raise ML2 only, one cycle later. Then random searches and writes are checked
// against a reference model, including searches with the compare-enable low,
// which must leave every match line low, and rows never written, which never match.
module tb_cam_subblock;
  localparam int R = 4, W = 4;
  logic clk = 1'b0, rst_n = 1'b0, cmp_en = 1'b0;
  logic [R-1:0] we = '0, ml_q;
  logic [W-1:0] wr_data = '0, sl = '0, sl_n = '0;
  int checks = 0, failures = 0;
  logic [W-1:0] mem [R];
  logic [R-1:0] vld;
  logic [R-1:0] exp_ml;

  cam_subblock #(.ROWS(R), .WIDTH(W), .BASE(0), .ENTRIES(R), .PRESET(1'b0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int r, logic [W-1:0] v);
    @(negedge clk);
    we = '0; we[r] = 1'b1; wr_data = v;
    @(negedge clk);
    we = '0;
    mem[r] = v; vld[r] = 1'b1;
  endtask

  task automatic search(logic [W-1:0] key, logic en);
    @(negedge clk);
    sl = key; sl_n = ~key; cmp_en = en;
    exp_ml = '0;
    for (int r = 0; r < R; r++) exp_ml[r] = en && vld[r] && (mem[r] == key);
    @(negedge clk);
    sl = '0; sl_n = '0; cmp_en = 1'b0;
    checks++;
    if (ml_q !== exp_ml) begin
      failures++;
      $display("FAIL search %b en=%b: ml %b expected %b", key, en, ml_q, exp_ml);
    end
  endtask

  initial begin
    vld = '0;
    for (int r = 0; r < R; r++) mem[r] = '0;
    #12 rst_n = 1'b1;
    search(4'b0000, 1'b1);            // nothing valid yet
    write_row(0, 4'b1010);
    write_row(1, 4'b0111);
    search(4'b0111, 1'b1);            // row 3 still unwritten
    write_row(2, 4'b1100);
    write_row(3, 4'b1010);
    search(4'b1100, 1'b1);
    checks++;
    if (ml_q !== 4'b0100) begin
      failures++;
      $display("FAIL example: search 1100 gave %b", ml_q);
    end
    search(4'b1100, 1'b0);
    search(4'b1010, 1'b1);            // two equal rows
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 3) == 0) write_row($urandom_range(0, R - 1), W'($urandom));
      search(W'($urandom), ($urandom_range(0, 3) != 0));
      search(mem[$urandom_range(0, R - 1)], ($urandom_range(0, 3) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
