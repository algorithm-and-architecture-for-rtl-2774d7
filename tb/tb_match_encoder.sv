// tb_match_encoder: self-checking test of the match-line encoder.
// Drives single, multiple, no and random match-line patterns and checks the
// registered hit, multi and lowest-index address one cycle later, and that the
// result is cleared when `ml_valid` is low.
module tb_match_encoder;
  localparam int M = 16;
  logic clk = 1'b0, rst_n = 1'b0, ml_valid = 1'b0;
  logic [M-1:0] ml = '0;
  logic res_valid, hit, multi;
  logic [3:0] match_addr;
  int checks = 0, failures = 0;

  match_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [M-1:0] v, logic vin);
    int n, lo;
    @(negedge clk);
    ml = v; ml_valid = vin;
    n = 0; lo = 0;
    for (int i = M - 1; i >= 0; i--) if (v[i]) begin n++; lo = i; end
    @(negedge clk);
    ml_valid = 1'b0;
    checks++;
    if (res_valid !== vin || hit !== (vin && n > 0) || multi !== (vin && n > 1) ||
        (vin && n > 0 && match_addr !== 4'(lo))) begin
      failures++;
      $display("FAIL ml %b v=%b: valid %b hit %b multi %b addr %0d", v, vin, res_valid, hit,
               multi, match_addr);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < M; i++) apply(M'(1) << i, 1'b1);
    apply('0, 1'b1);
    apply(16'h1010, 1'b1);
    apply(16'h1000, 1'b0);
    for (int i = 0; i < 500; i++) apply(M'($urandom), 1'($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
