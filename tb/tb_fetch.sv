// tb_fetch: the fetch routine against a model of a one-cycle-latency RAM.
//
// The RAM model holds a random matrix A. The test checks that every row the
// fetch presents is the right row of A in the right order, that rows arrive
// exactly every 2 cycles and the first one 4 clock edges after reset is
// released, that R1..R4 hold steady between rows, that the walk wraps from
// the last row back to the first, and that a second reset restarts at row 0.
module tb_fetch;
  import mm_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic [A_W-1:0] dout_a, dout_b;
  logic [N-1:0][A_W-1:0] row, last_row;
  logic row_valid;
  logic [1:0] row_idx;
  int amat [DEPTH];

  always #5 clk = ~clk;

  // RAM model: synchronous read, one cycle of latency
  always_ff @(posedge clk) begin
    dout_a <= A_W'(amat[addr_a]);
    dout_b <= A_W'(amat[addr_b]);
  end

  fetch u_dut (.clk(clk), .rst(rst), .addr_a(addr_a), .addr_b(addr_b),
               .dout_a(dout_a), .dout_b(dout_b), .row(row),
               .row_valid(row_valid), .row_idx(row_idx));

  task automatic check(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp_v);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run from reset release for a number of rows; check order and timing.
  task automatic run(input int nrows);
    int edges;
    int last_edge;
    int seen;
    edges = 0;
    seen = 0;
    last_edge = 0;
    @(negedge clk);
    rst = 1'b0;
    while (seen < nrows) begin
      @(negedge clk);
      edges++;
      if (row_valid) begin
        if (seen == 0) check(edges, 4, "edges to first row");
        else check(edges - last_edge, 2, "cycles between rows");
        check(int'(row_idx), seen % 4, "row index");
        for (int k = 0; k < N; k++)
          check(int'(row[k]), amat[(seen % 4) * 4 + k], "row element");
        last_edge = edges;
        last_row = row;
        seen++;
      end else if (seen > 0) begin
        checks++;
        if (row != last_row) begin
          failures++;
          $display("%t row changed without row_valid", $time);
        end
      end
      if (edges > 4 * nrows + 10) begin
        failures++;
        $display("rows stopped arriving");
        break;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) amat[i] = 1 + int'($urandom_range(15));
    repeat (3) @(posedge clk);
    run(20);  // five matrices: the walk wraps four times
    rst = 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < DEPTH; i++) amat[i] = 1 + int'($urandom_range(15));
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
