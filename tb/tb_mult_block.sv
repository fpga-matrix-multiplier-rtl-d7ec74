// tb_mult_block: the sixteen-product stage at the 13-bit word size.
//
// A random row of A (1..16), a valid bit and a row index are applied every
// cycle; one clock later every product prod[k][j] must equal
// A_k * trunc(B_kj * 64), and valid and index must come out delayed by one.
module tb_mult_block;
  import mm_pkg::*;
  import tb_ref_pkg::*;

  localparam int F = 6;
  localparam int W = INT_W + F;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [N-1:0][A_W-1:0] row;
  logic in_valid, out_valid;
  logic [1:0] in_idx, out_idx;
  logic [N-1:0][N-1:0][W-1:0] prod;

  always #5 clk = ~clk;

  mult_block #(.FRAC_W(F)) u_dut (.clk(clk), .rst(rst), .row(row), .in_valid(in_valid),
                                  .in_idx(in_idx), .prod(prod), .out_valid(out_valid),
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
    row = '0;
    in_valid = 1'b0;
    in_idx = '0;
    repeat (2) @(negedge clk);
    check(int'(out_valid), 0, "valid in reset");
    check(int'(prod[2][1]), 0, "product in reset");
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < N; k++) row[k] = A_W'(n < 16 ? 16 - n % 16 : 1 + $urandom_range(15));
      if (n < 4) row[n] = 5'd16;  // all-16 corner rows
      in_valid = 1'($urandom);
      in_idx = 2'($urandom);
      @(negedge clk);
      for (int k = 0; k < N; k++)
        for (int j = 0; j < N; j++)
          check(int'(prod[k][j]), int'(row[k]) * bq(k, j, F), "product");
      check(int'(out_valid), int'(in_valid), "valid");
      check(int'(out_idx), int'(in_idx), "index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
