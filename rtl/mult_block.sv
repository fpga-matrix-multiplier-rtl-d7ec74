// mult_block: multiply one row of A by all sixteen constants of B.
//
// Element k of the incoming row (A_ik) is multiplied by the four constants of
// row k of B, B_k1..B_k4, in sixteen const_mul instances, one per element of
// B as in the design description. The sixteen products are registered, which
// makes the multiplier one stage of the fetch / multiply / sum pipeline.
// prod[k][j] = A_ik * B_kj in unsigned fixed point (INT_W.FRAC_W). valid and
// row index travel alongside the data with the same one-cycle latency; the
// reset of the product registers is this implementation's choice. Many
// product bits are constant (1/8 x A has no low-order ones at 6 fractional
// bits, for instance); synthesis removes those flip-flops, as intended.
module mult_block
  import mm_pkg::*;
#(
  parameter int unsigned FRAC_W = 6
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic [N-1:0][A_W-1:0]                  row,
  input  logic                                   in_valid,
  input  logic [1:0]                             in_idx,
  output logic [N-1:0][N-1:0][INT_W+FRAC_W-1:0]  prod,
  output logic                                   out_valid,
  output logic [1:0]                             out_idx
);

  localparam int unsigned OUT_W = INT_W + FRAC_W;

  logic [N-1:0][N-1:0][OUT_W-1:0] p;

  for (genvar k = 0; k < N; k++) begin : g_k
    for (genvar j = 0; j < N; j++) begin : g_j
      const_mul #(.K(b_elem(k, j)), .FRAC_W(FRAC_W)) u_mul (
        .a (row[k]),
        .p (p[k][j])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prod      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      prod      <= p;
      out_valid <= in_valid;
      out_idx   <= in_idx;
    end
  end

endmodule
