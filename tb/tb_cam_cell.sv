// tb_cam_cell: self-checking test of one binary CAM cell.
// Writes 0 and 1, checks the stored bit and the mismatch output for all four
// search-line states (idle, search 0, search 1, both high), and checks the
// reset value and that the bit holds while `we` is low.
module tb_cam_cell;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, d = 1'b0, sl = 1'b0, sl_n = 1'b0;
  logic q, mismatch;
  int checks = 0, failures = 0;

  cam_cell #(.INIT(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    check(q, 1'b1, "reset value");
    for (int v = 0; v < 2; v++) begin
      @(negedge clk); we = 1'b1; d = v[0];
      @(negedge clk); we = 1'b0; d = ~v[0];
      check(q, v[0], "stored bit");
      @(negedge clk);
      check(q, v[0], "hold with we low");
      for (int s = 0; s < 4; s++) begin
        sl = s[0]; sl_n = s[1];
        #1;
        // Mismatch: stored 1 searched with 0 (SL' high) or stored 0 searched with 1 (SL high).
        check(mismatch, (v[0] && s[1]) || (!v[0] && s[0]), "mismatch");
      end
      sl = 1'b0; sl_n = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
