// tb_matmul_top: end-to-end test of the matrix multiplier.
//
// Four multipliers run side by side: the main configuration (13-bit words,
// A = 16 down to 1), the same word size with a random A, an A of all 16s
// (the largest results the 7 integer bits must hold) and an 11-bit version
// (4 fractional bits) with another random A. Each is checked row by row
// against the reference, for rate and latency, by mm_run. The main instance
// is also compared with the 64 x C values listed for the 13-bit design, and
// every mechanism of the design (start-up discard of the RAM output, X1/X2
// and X3/X4 stores, address wrap, overlapping rows in the pipeline) must have
// occurred.
module tb_matmul_top;
  import mm_pkg::*;

  // random matrix with elements 1..16 from a fixed linear congruential seed
  function automatic logic [DEPTH-1:0][A_W-1:0] rand_a(input int unsigned seed);
    logic [DEPTH-1:0][A_W-1:0] m;
    int unsigned x = seed;
    for (int i = 0; i < DEPTH; i++) begin
      x = x * 1103515245 + 12345;
      m[i] = A_W'((x >> 16) % 16 + 1);
    end
    return m;
  endfunction

  function automatic logic [DEPTH-1:0][A_W-1:0] all16();
    logic [DEPTH-1:0][A_W-1:0] m;
    for (int i = 0; i < DEPTH; i++) m[i] = A_W'(16);
    return m;
  endfunction

  localparam int NR = 4;
  // 64 x C for A = 16..1 with the 13-bit constants
  localparam int FIG [4][4] = '{
    '{3024, 6984, 4046, 5488},
    '{2192, 5000, 3002, 3952},
    '{1360, 3016, 1958, 2416},
    '{528, 1032, 914, 880}
  };

  logic clk = 1'b0;
  logic start = 1'b0;
  logic done [NR];
  int ck [NR], fl [NR], err [NR], disc [NR], x12 [NR], x34 [NR], wrap [NR], ovl [NR], rows [NR];
  int checks = 0;
  int failures = 0;
  int fig_checks = 0;

  always #5 clk = ~clk;

  mm_run #(.FRAC_W(6), .NMAT(4)) u_main (
    .clk(clk), .start(start), .done(done[0]), .checks(ck[0]), .failures(fl[0]),
    .err_e4(err[0]), .n_discard(disc[0]), .n_x12(x12[0]), .n_x34(x34[0]),
    .n_wrap(wrap[0]), .n_overlap(ovl[0]), .n_rows(rows[0]));
  mm_run #(.FRAC_W(6), .INIT(rand_a(7)), .NMAT(3)) u_rand (
    .clk(clk), .start(start), .done(done[1]), .checks(ck[1]), .failures(fl[1]),
    .err_e4(err[1]), .n_discard(disc[1]), .n_x12(x12[1]), .n_x34(x34[1]),
    .n_wrap(wrap[1]), .n_overlap(ovl[1]), .n_rows(rows[1]));
  mm_run #(.FRAC_W(6), .INIT(all16()), .NMAT(2)) u_max (
    .clk(clk), .start(start), .done(done[2]), .checks(ck[2]), .failures(fl[2]),
    .err_e4(err[2]), .n_discard(disc[2]), .n_x12(x12[2]), .n_x34(x34[2]),
    .n_wrap(wrap[2]), .n_overlap(ovl[2]), .n_rows(rows[2]));
  mm_run #(.FRAC_W(4), .INIT(rand_a(99)), .NMAT(3)) u_f4 (
    .clk(clk), .start(start), .done(done[3]), .checks(ck[3]), .failures(fl[3]),
    .err_e4(err[3]), .n_discard(disc[3]), .n_x12(x12[3]), .n_x34(x34[3]),
    .n_wrap(wrap[3]), .n_overlap(ovl[3]), .n_rows(rows[3]));

  // compare the main instance's rows with the listed 64 x C values
  always @(negedge clk) begin
    if (u_main.row_valid) begin
      for (int j = 0; j < 4; j++) begin
        fig_checks++;
        if (int'(u_main.c_row[j]) != FIG[u_main.row_idx][j]) begin
          failures++;
          $display("C[%0d][%0d] = %0d, listed value %0d", u_main.row_idx, j,
                   u_main.c_row[j], FIG[u_main.row_idx][j]);
        end
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
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
    repeat (3) @(posedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (2) @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      checks += ck[r];
      failures += fl[r];
      $display("instance %0d: %0d rows, mean error %0d.%04d %%, discard=%0d x12=%0d x34=%0d wrap=%0d overlap=%0d",
               r, rows[r], err[r] / 10000, err[r] % 10000, disc[r], x12[r], x34[r], wrap[r], ovl[r]);
      need(disc[r], "start-up discard of the RAM output");
      need(x12[r], "store into X1/X2");
      need(x34[r], "store into X3/X4");
      need(wrap[r], "RAM address wrap to the first row");
      need(ovl[r], "three rows in the pipeline at once");
    end
    checks += fig_checks;
    checks++;
    if (fig_checks != 16 * 4) begin
      failures++;
      $display("listed values compared %0d times, expected 64", fig_checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
