// tb_search_data_register: self-checking test of the search data register.
// Applies random words with random enables and checks, one cycle later, the
// held word, the valid flag and both search lines of every column (both low
// when no search is held).
module tb_search_data_register;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, word, sl, sl_n;
  logic valid;
  int checks = 0, failures = 0;
  logic [W-1:0] held;
  logic exp_valid;

  search_data_register #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    held = '0;
    #12 rst_n = 1'b1;
    check(W'(valid), '0, "valid after reset");
    check(sl | sl_n, '0, "idle search lines after reset");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      d  = W'($urandom);
      exp_valid = en;
      if (en) held = d;
      @(negedge clk);
      en = 1'b0;
      check(W'(valid), W'(exp_valid), "valid");
      check(word, held, "word");
      check(sl,   exp_valid ? held  : '0, "SL");
      check(sl_n, exp_valid ? ~held : '0, "SL'");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
