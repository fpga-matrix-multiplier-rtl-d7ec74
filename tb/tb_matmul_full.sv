// tb_matmul_full: the multiplier exactly as built, every parameter at its
// default (13-bit words, A = 16 down to 1 in the RAM).
//
// After reset the design is followed for two complete matrices. Every row
// must equal the 64 x C values listed for the 13-bit design (an integer
// count of 1/64), rows must arrive in order every 2 cycles and a whole
// matrix every 8 cycles, and the first row 6 edges after reset release.
module tb_matmul_full;
  import mm_pkg::*;

  localparam int EXPECT [4][4] = '{
    '{3024, 6984, 4046, 5488},
    '{2192, 5000, 3002, 3952},
    '{1360, 3016, 1958, 2416},
    '{528, 1032, 914, 880}
  };

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [N-1:0][12:0] c_row;
  logic row_valid;
  logic [1:0] row_idx;

  always #5 clk = ~clk;

  matmul_top u_dut (.clk(clk), .rst(rst), .c_row(c_row), .row_valid(row_valid),
                    .row_idx(row_idx));

  task automatic check(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp_v);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges, rows, last_edge, last0;
    edges = 0;
    rows = 0;
    last_edge = 0;
    last0 = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (rows < 8 && edges < 100) begin
      @(negedge clk);
      edges++;
      if (row_valid) begin
        if (rows == 0) check(edges, 6, "edges from reset release to the first row");
        else check(edges - last_edge, 2, "cycles between rows");
        if (rows == 4) check(edges - last0, 8, "cycles per matrix");
        if (rows == 0) last0 = edges;
        check(int'(row_idx), rows % 4, "row index");
        for (int j = 0; j < 4; j++)
          check(int'(c_row[j]), EXPECT[rows % 4][j], $sformatf("C[%0d][%0d] x 64", rows % 4, j));
        last_edge = edges;
        rows++;
      end
    end
    check(rows, 8, "rows received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
