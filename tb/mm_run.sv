// mm_run: drives one matmul_top from reset and checks what it produces.
//
// Releases reset, then follows the output for NMAT complete matrices. Every
// row is compared with the reference of tb_ref_pkg (B truncated to FRAC_W
// fractional bits); the first row must appear 6 edges after reset release,
// rows must follow every 2 cycles and a whole matrix every 8. At the end the
// mean relative error of the last matrix against the exact product (the
// measure of the design description's Eq. 3) is reported in units of
// 1e-4 percent. Mechanism counters look inside the design: start-up cycles in
// which the fetch discards the RAM output, X1/X2 and X3/X4 stores, wraps of
// the RAM address, and cycles in which three different rows are in flight.
module mm_run
  import mm_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned               FRAC_W = 6,
  parameter logic [DEPTH-1:0][A_W-1:0] INIT   = A_DEFAULT,
  parameter int                        NMAT   = 3
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   err_e4,      // mean relative error x 1e4, in percent
  output int   n_discard,   // start-up cycles with the RAM output ignored
  output int   n_x12,       // stores into X1/X2
  output int   n_x34,       // stores into X3/X4
  output int   n_wrap,      // RAM address wrapped to 0
  output int   n_overlap,   // cycles with three rows in the pipeline
  output int   n_rows       // rows checked
);

  localparam int W = INT_W + FRAC_W;

  logic rst;
  logic [N-1:0][W-1:0] c_row;
  logic row_valid;
  logic [1:0] row_idx;
  int cmat [4][4];

  matmul_top #(.FRAC_W(FRAC_W), .INIT(INIT)) u_dut (
    .clk(clk), .rst(rst), .c_row(c_row), .row_valid(row_valid), .row_idx(row_idx));

  task automatic check(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%t F=%0d %s: got %0d expected %0d", $time, FRAC_W, what, got, exp_v);
    end
  endtask

  // mechanism counters, sampled while the design runs
  logic [ADDR_W-1:0] last_addr;
  always @(negedge clk) begin
    if (!rst && !done) begin
      if (!u_dut.u_fetch.en) n_discard++;
      if (u_dut.u_fetch.en && u_dut.u_fetch.count) n_x12++;
      if (u_dut.u_fetch.en && !u_dut.u_fetch.count) n_x34++;
      if (u_dut.addr_a == 0 && last_addr == ADDR_W'(DEPTH - 2)) n_wrap++;
      // output shows row r, fetch registers hold r+1, X1..X4 collect r+2
      if (n_rows > 0 && u_dut.u_fetch.row_idx == row_idx + 2'd1
          && u_dut.u_fetch.row_cnt == row_idx + 2'd2)
        n_overlap++;
    end
    last_addr = u_dut.addr_a;
  end

  initial begin
    int a [4];
    int edges, last_edge, last0;
    real err, ce, cf;
    rst = 1'b1;
    done = 1'b0;
    checks = 0;
    failures = 0;
    err_e4 = 0;
    n_discard = 0;
    n_x12 = 0;
    n_x34 = 0;
    n_wrap = 0;
    n_overlap = 0;
    n_rows = 0;
    edges = 0;
    last_edge = 0;
    last0 = 0;
    wait (start);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (n_rows < 4 * NMAT && edges < 8 * NMAT + 20) begin
      @(negedge clk);
      edges++;
      if (row_valid) begin
        if (n_rows == 0) check(edges, 6, "edges from reset release to the first row");
        else check(edges - last_edge, 2, "cycles between rows");
        if (n_rows % 4 == 0 && n_rows > 0) check(edges - last0, 8, "cycles per matrix");
        if (n_rows % 4 == 0) last0 = edges;
        check(int'(row_idx), n_rows % 4, "row index");
        for (int k = 0; k < 4; k++) a[k] = int'(INIT[(n_rows % 4) * 4 + k]);
        for (int j = 0; j < 4; j++) begin
          check(int'(c_row[j]), cq(a, j, FRAC_W), "element of C");
          cmat[n_rows % 4][j] = int'(c_row[j]);
        end
        last_edge = edges;
        n_rows++;
      end
    end
    check(n_rows, 4 * NMAT, "rows received");
    // Eq. 3: mean over the 16 elements of |C_fixed - C_exact| / C_exact
    err = 0.0;
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) a[k] = int'(INIT[i * 4 + k]);
      for (int j = 0; j < 4; j++) begin
        ce = cexact(a, j);
        cf = real'(cmat[i][j]) / real'(1 << FRAC_W);
        err += (ce > cf ? ce - cf : cf - ce) / ce;
      end
    end
    err_e4 = int'(err / 16.0 * 100.0 * 1.0e4);
    rst = 1'b1;
    done = 1'b1;
  end

endmodule
