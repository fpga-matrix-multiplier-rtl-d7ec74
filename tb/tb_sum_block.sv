// tb_sum_block: the one-stage column summation at the 13-bit word size.
//
// Random products, bounded so that each column sum stays below 128 (the
// range of a 7-bit integer part), are applied every cycle; one clock later
// c[j] must equal the sum over k of prod[k][j]. The largest products the
// design can see (16 x 5 and its neighbours) are included.
module tb_sum_block;
  import mm_pkg::*;

  localparam int F = 6;
  localparam int W = INT_W + F;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [N-1:0][N-1:0][W-1:0] prod;
  logic in_valid, out_valid;
  logic [1:0] in_idx, out_idx;
  logic [N-1:0][W-1:0] c;

  always #5 clk = ~clk;

  sum_block #(.FRAC_W(F)) u_dut (.clk(clk), .rst(rst), .prod(prod), .in_valid(in_valid),
                                 .in_idx(in_idx), .c(c), .out_valid(out_valid),
                                 .out_idx(out_idx));

  task automatic check(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp_v);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prod = '0;
    in_valid = 1'b0;
    in_idx = '0;
    repeat (2) @(negedge clk);
    check(int'(c[0]), 0, "output in reset");
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < N; k++)
        for (int j = 0; j < N; j++)
          prod[k][j] = W'(n == 0 ? (k == 1 ? 80 * 64 : 15 * 64) : $urandom_range(2047));
      in_valid = 1'($urandom);
      in_idx = 2'($urandom);
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        int s;
        s = 0;
        for (int k = 0; k < N; k++) s += int'(prod[k][j]);
        check(int'(c[j]), s, "column sum");
      end
      check(int'(out_valid), int'(in_valid), "valid");
      check(int'(out_idx), int'(in_idx), "index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
