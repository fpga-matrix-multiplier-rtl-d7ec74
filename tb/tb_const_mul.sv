// tb_const_mul: exhaustive test of the constant multipliers.
//
// One const_mul per element kind of B and per fractional width 3, 4, 6 and 7
// (the 10-, 11-, 13- and 14-bit words); every input from 0 to 16 is applied
// and each product is compared with a * trunc(B * 2**F) worked out from the
// fraction in tb_ref_pkg.
module tb_const_mul;
  import mm_pkg::*;
  import tb_ref_pkg::*;

  localparam int NF = 4;
  localparam int FR [NF] = '{3, 4, 6, 7};
  // Row/column of B that holds each of the 12 element kinds.
  localparam int KR [12] = '{0, 0, 0, 2, 1, 0, 2, 1, 1, 1, 2, 3};
  localparam int KC [12] = '{0, 1, 3, 0, 3, 2, 1, 0, 1, 2, 2, 1};

  int checks = 0;
  int failures = 0;
  logic [A_W-1:0] a;
  logic [15:0] p [NF][12];

  for (genvar fi = 0; fi < NF; fi++) begin : g_f
    for (genvar ki = 0; ki < 12; ki++) begin : g_k
      logic [INT_W+FR[fi]-1:0] po;
      const_mul #(.K(bconst_e'(ki)), .FRAC_W(FR[fi])) u_dut (.a(a), .p(po));
      assign p[fi][ki] = 16'(po);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 16; v++) begin
      a = A_W'(v);
      #1;
      for (int fi = 0; fi < NF; fi++) begin
        for (int ki = 0; ki < 12; ki++) begin
          int exp_p;
          // the enum order and KR/KC must agree with the matrix in mm_pkg
          if (b_elem(KR[ki], KC[ki]) != bconst_e'(ki)) begin
            failures++;
            $display("table mismatch for kind %0d", ki);
          end
          exp_p = v * bq(KR[ki], KC[ki], FR[fi]);
          checks++;
          if (int'(p[fi][ki]) != exp_p) begin
            failures++;
            $display("F=%0d kind=%0d a=%0d: got %0d expected %0d",
                     FR[fi], ki, v, p[fi][ki], exp_p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
