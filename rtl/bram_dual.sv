// bram_dual: dual-port block RAM that holds the 16 elements of matrix A.
//
// Two independent read ports, a and b, each return one element per clock, so
// a whole row-pair of A (two elements) is read every cycle and the complete
// matrix in 8 cycles. This matches the dual-output Xilinx block RAM of the
// design description, which halves the 16 cycles a single-output RAM needs.
// Reads are synchronous, as in a block RAM: the word addressed in one cycle
// appears on dout_a/dout_b in the next, and stays there until a new address
// is clocked in. The RAM is preloaded from the INIT parameter (element i at
// address i, row-major; default 16, 15, ..., 1) and is never written by the
// datapath, so it is described as a read-only array; the element width and
// the preload mechanism are this implementation's choices.
module bram_dual
  import mm_pkg::*;
#(
  parameter logic [DEPTH-1:0][A_W-1:0] INIT = A_DEFAULT
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [A_W-1:0]    dout_a,
  output logic [A_W-1:0]    dout_b
);

  logic [A_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
  end

endmodule
