// sum_block: add the four products of each column into one row of C.
//
// C_ij = sum over k of A_ik * B_kj. The four four-input additions are done in
// one combinational stage with a register only at the output, the one-stage
// summation the design description settles on (a three-stage adder tree was
// faster but larger). The output registers R1..R4 = c[0]..c[3] hold the row
// until the next one arrives; valid and row index are delayed with the data.
// No bit is lost: the largest sum, about 124.2, fits in INT_W = 7 integer bits.
module sum_block
  import mm_pkg::*;
#(
  parameter int unsigned FRAC_W = 6
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic [N-1:0][N-1:0][INT_W+FRAC_W-1:0]  prod,
  input  logic                                   in_valid,
  input  logic [1:0]                             in_idx,
  output logic [N-1:0][INT_W+FRAC_W-1:0]         c,
  output logic                                   out_valid,
  output logic [1:0]                             out_idx
);

  localparam int unsigned OUT_W = INT_W + FRAC_W;

  logic [N-1:0][OUT_W-1:0] s;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      s[j] = '0;
      for (int k = 0; k < N; k++) s[j] = s[j] + prod[k][j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c         <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      c         <= s;
      out_valid <= in_valid;
      out_idx   <= in_idx;
    end
  end

endmodule
