// matmul_top: 4x4 matrix multiplier C = A x B with a constant matrix B.
//
// A (integers 1..16) sits in a dual-port block RAM; B is fixed and built into
// the datapath as shift/add networks. The four blocks form a pipeline:
//   bram_dual -> fetch (R1..R4) -> mult_block (16 products) -> sum_block
// While the summation block outputs row 1 of C, row 2 is being summed, row 3
// multiplied and row 4 fetched. Only one row of A is needed for one row of C,
// so one row of hardware is used four times per matrix, which matches the two
// elements per cycle the RAM can deliver: one row of C every 2 cycles and one
// whole matrix every 8 cycles, repeated forever as the fetch loops over the
// RAM. The structure, pipeline and word sizes follow the design description.
//
// Interface: clk and rst (synchronous, active high) are the only inputs. c_row
// is the current row of C (R1..R4 = c_row[0..3]) in unsigned fixed point with
// 7 integer and FRAC_W fractional bits (13 bits by default); read it as an
// integer and divide by 2**FRAC_W. row_valid pulses for one cycle when a new
// row appears and row_idx says which row it is; these two outputs are
// additions of this implementation. The first row appears 6 cycles after rst
// is released.
module matmul_top
  import mm_pkg::*;
#(
  parameter int unsigned               FRAC_W = 6,
  parameter logic [DEPTH-1:0][A_W-1:0] INIT   = A_DEFAULT
) (
  input  logic                           clk,
  input  logic                           rst,
  output logic [N-1:0][INT_W+FRAC_W-1:0] c_row,
  output logic                           row_valid,
  output logic [1:0]                     row_idx
);

  localparam int unsigned OUT_W = INT_W + FRAC_W;

  logic [ADDR_W-1:0]              addr_a, addr_b;
  logic [A_W-1:0]                 dout_a, dout_b;
  logic [N-1:0][A_W-1:0]          a_row;
  logic                           a_valid;
  logic [1:0]                     a_idx;
  logic [N-1:0][N-1:0][OUT_W-1:0] prod;
  logic                           p_valid;
  logic [1:0]                     p_idx;

  bram_dual #(.INIT(INIT)) u_bram (
    .clk    (clk),
    .addr_a (addr_a),
    .addr_b (addr_b),
    .dout_a (dout_a),
    .dout_b (dout_b)
  );

  fetch u_fetch (
    .clk       (clk),
    .rst       (rst),
    .addr_a    (addr_a),
    .addr_b    (addr_b),
    .dout_a    (dout_a),
    .dout_b    (dout_b),
    .row       (a_row),
    .row_valid (a_valid),
    .row_idx   (a_idx)
  );

  mult_block #(.FRAC_W(FRAC_W)) u_mult (
    .clk       (clk),
    .rst       (rst),
    .row       (a_row),
    .in_valid  (a_valid),
    .in_idx    (a_idx),
    .prod      (prod),
    .out_valid (p_valid),
    .out_idx   (p_idx)
  );

  sum_block #(.FRAC_W(FRAC_W)) u_sum (
    .clk       (clk),
    .rst       (rst),
    .prod      (prod),
    .in_valid  (p_valid),
    .in_idx    (p_idx),
    .c         (c_row),
    .out_valid (row_valid),
    .out_idx   (row_idx)
  );

endmodule
