// tb_accuracy: accuracy of the word sizes the design was evaluated at.
//
// The multiplier is built with 3, 4, 6 and 7 fractional bits (10-, 11-, 13-
// and 14-bit words) and run on A = 16 down to 1. Each result is checked
// against the truncated-constant reference, and the mean relative error
// against the exact product is compared with the figures reported for the
// evaluated designs: 0.173 % at 11 bits, 0.0982 % at 13 bits and 0.0411 % at
// 14 bits (the 10-bit figure reported there belongs to a different
// multiplier and is not compared; its error is printed). A figure matches if
// it is within half a unit of its last printed digit.
module tb_accuracy;
  import mm_pkg::*;

  localparam int NR = 4;
  localparam int FRS [NR] = '{3, 4, 6, 7};
  // reported error x 1e4 percent and its tolerance; -1: nothing reported
  localparam int REP [NR] = '{-1, 1730, 982, 411};
  localparam int TOL [NR] = '{0, 5, 1, 1};

  logic clk = 1'b0;
  logic start = 1'b0;
  logic done [NR];
  int ck [NR], fl [NR], err [NR], disc [NR], x12 [NR], x34 [NR], wrap [NR], ovl [NR], rows [NR];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar r = 0; r < NR; r++) begin : g_run
    mm_run #(.FRAC_W(FRS[r]), .NMAT(1)) u_run (
      .clk(clk), .start(start), .done(done[r]), .checks(ck[r]), .failures(fl[r]),
      .err_e4(err[r]), .n_discard(disc[r]), .n_x12(x12[r]), .n_x34(x34[r]),
      .n_wrap(wrap[r]), .n_overlap(ovl[r]), .n_rows(rows[r]));
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int r = 0; r < NR; r++) begin
      checks += ck[r];
      failures += fl[r];
      $display("%0d-bit words: mean error %0d.%04d %%", INT_W + FRS[r], err[r] / 10000,
               err[r] % 10000);
      if (REP[r] >= 0) begin
        checks++;
        if (err[r] < REP[r] - TOL[r] || err[r] > REP[r] + TOL[r]) begin
          failures++;
          $display("  reported figure %0d.%04d %% not matched", REP[r] / 10000, REP[r] % 10000);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
