// fetch: read matrix A from the dual-port RAM and present it one row at a time.
//
// The RAM delivers two elements per cycle, so a row of four takes two cycles.
// A pair counter walks the RAM from address 0 to 15 in steps of two (port a
// reads the even address, port b the odd one) and wraps, so the matrix is
// re-read forever. A 1-bit register, count, flips every cycle: when count is
// 1 the two RAM outputs are stored into X1 and X2, when it is 0 into X3 and
// X4. In the cycle after X3/X4 have been filled, X1..X4 are copied into the
// output registers R1..R4 (at the same edge X1/X2 take the next pair). Each
// intermediate register is therefore written only every second cycle. All of
// this follows the design description.
//
// Start-up: during and just after reset the RAM output still holds the word
// of address 0 from before, which must not be stored. A register en, cleared
// by reset, is set one cycle later, when the first read is on the RAM output,
// and gates every store; it does the job the description gives to its
// registers erase and en. row_valid (a one-cycle pulse when R1..R4 take a new
// row) and row_idx (which row of A is in R1..R4) are additions of this
// implementation.
//
// Two concurrent assertions state the timing rules of the row hand-over.
//
// Timing: after rst falls, the first row is in R1..R4 four cycles later, and
// a new row follows every 2 cycles, a whole matrix every 8.
module fetch
  import mm_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,      // synchronous, active high
  output logic [ADDR_W-1:0]      addr_a,
  output logic [ADDR_W-1:0]      addr_b,
  input  logic [A_W-1:0]         dout_a,
  input  logic [A_W-1:0]         dout_b,
  output logic [N-1:0][A_W-1:0]  row,      // R1..R4 = row[0]..row[3]
  output logic                   row_valid,
  output logic [1:0]             row_idx
);

  logic [PAIR_W-1:0] pair;     // pair being addressed
  logic              count;    // 1: store into X1/X2, 0: into X3/X4
  logic              en;       // RAM output holds a real read
  logic              x_full;   // X3/X4 have been filled at least once
  logic [1:0]        row_cnt;  // index of the next row to leave
  logic [A_W-1:0]    x1, x2, x3, x4;

  assign addr_a = {pair, 1'b0};
  assign addr_b = {pair, 1'b1};

  always_ff @(posedge clk) begin
    if (rst) begin
      pair      <= '0;
      count     <= 1'b0;
      en        <= 1'b0;
      x_full    <= 1'b0;
      row_cnt   <= '0;
      x1        <= '0;
      x2        <= '0;
      x3        <= '0;
      x4        <= '0;
      row       <= '0;
      row_valid <= 1'b0;
      row_idx   <= '0;
    end else begin
      pair      <= pair + 1'b1;
      count     <= ~count;
      en        <= 1'b1;
      row_valid <= 1'b0;
      if (en) begin
        if (count) begin
          x1 <= dout_a;
          x2 <= dout_b;
          if (x_full) begin
            row       <= {x4, x3, x2, x1};
            row_valid <= 1'b1;
            row_idx   <= row_cnt;
            row_cnt   <= row_cnt + 1'b1;
          end
        end else begin
          x3     <= dout_a;
          x4     <= dout_b;
          x_full <= 1'b1;
        end
      end
    end
  end

  // Timing rules: a new row at most every second cycle, and count flips
  // on every clock once out of reset.
  a_row_gap: assert property (@(posedge clk) disable iff (rst) row_valid |=> !row_valid)
    else $error("fetch: row_valid on two consecutive cycles");
  a_count_toggles: assert property (@(posedge clk) disable iff (rst) en |=> count != $past(count))
    else $error("fetch: count did not toggle");

endmodule
