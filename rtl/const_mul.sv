// const_mul: multiply an integer element of A by one constant element of B.
//
// B is known at design time, so no general multiplier is built. Each constant
// is turned into one or two shifted copies of the input combined by one adder
// or one subtractor, which is what the design description prescribes:
//   1     : a << F                       (integer to fixed point)
//   1/8, 1/4, 1/2, 2 : a single shift
//   3 = 2+1, 5 = 4+1, 3/2 = 1+1/2        : shift and add
//   3/4 = 1-1/4, 3/8 = 1/2-1/8           : shift and subtract
// The two constants that have no exact binary form, 7/15 and 140/123, are
// first truncated to F fractional bits (0.011101 and 1.001000 for F = 6).
// The truncated value is then recoded into canonical signed digits at
// elaboration time, so that it too is built from as few shifted copies as
// possible (29/64 = 1/2 - 1/16 + 1/64, 72/64 = 1 + 1/8). The description
// derives its own shift/subtract form by hand for one word size; the
// canonical-signed-digit recoding generalises that to every FRAC_W and is this
// implementation's choice.
//
// Interface: a is an unsigned integer of A_W bits (1..16); p is the exact
// puct in unsigned fixed point with INT_W integer and FRAC_W fractional
// bits. Purely combinational; the caller registers the result. FRAC_W must be
// at least 3 so that 1/8 is exact.
module const_mul
  import mm_pkg::*;
#(
  parameter bconst_e     K      = B_7_15,
  parameter int unsigned FRAC_W = 6
) (
  input  logic [A_W-1:0]          a,
  output logic [INT_W+FRAC_W-1:0] p
);

  localparam int unsigned F     = FRAC_W;
  localparam int unsigned OUT_W = INT_W + FRAC_W;

  // Canonical signed-digit recoding of an unsigned constant: returns the
  // positions of +1 digits in pos and of -1 digits in neg.
  function automatic logic [2*OUT_W-1:0] csd(input longint unsigned k);
    logic [OUT_W-1:0] pos, neg;
    longint unsigned  x;
    pos = '0;
    neg = '0;
    x   = k;
    for (int i = 0; i < OUT_W; i++) begin
      if (x[0]) begin
        if (x[1]) begin
          neg[i] = 1'b1;
          x      = x + 1;
        end else begin
          pos[i] = 1'b1;
          x      = x - 1;
        end
      end
      x = x >> 1;
    end
    return {pos, neg};
  endfunction

  // Truncated fixed-point values of the two inexact constants.
  localparam longint unsigned K_7_15    = (longint'(7)   << F) / 15;
  localparam longint unsigned K_140_123 = (longint'(140) << F) / 123;

  // All arithmetic is modulo 2**OUT_W: every shifted copy and the final
  // puct fit (the largest puct is 16 x 5 = 80), so an intermediate
  // difference that wraps comes back right.
  logic [OUT_W-1:0] ax;

  assign ax = OUT_W'(a);

  generate
    if (FRAC_W < 3) begin : g_bad_frac
      $error("const_mul: FRAC_W must be at least 3");
    end

    case (K)
      B_ONE:     begin : g_one assign p = ax << F;                           end
      B_EIGHTH:  begin : g_eig assign p = ax << (F - 3);                     end
      B_QUARTER: begin : g_qua assign p = ax << (F - 2);                     end
      B_HALF:    begin : g_hal assign p = ax << (F - 1);                     end
      B_TWO:     begin : g_two assign p = ax << (F + 1);                     end
      B_THREE:   begin : g_thr assign p = (ax << (F + 1)) + (ax << F);       end
      B_FIVE:    begin : g_fiv assign p = (ax << (F + 2)) + (ax << F);       end
      B_3_4:     begin : g_34  assign p = (ax << F) - (ax << (F - 2));       end
      B_3_2:     begin : g_32  assign p = (ax << F) + (ax << (F - 1));       end
      B_3_8:     begin : g_38  assign p = (ax << (F - 1)) - (ax << (F - 3)); end
      default: begin : g_csd
        // 7/15 or 140/123: sum of +/- shifted copies from the CSD digits.
        localparam longint unsigned KV = (K == B_7_15) ? K_7_15 : K_140_123;
        localparam logic [2*OUT_W-1:0] DIG = csd(KV);
        localparam logic [OUT_W-1:0]   POS = DIG[2*OUT_W-1:OUT_W];
        localparam logic [OUT_W-1:0]   NEG = DIG[OUT_W-1:0];
        always_comb begin
          p = '0;
          for (int i = 0; i < OUT_W; i++) begin
            if (POS[i]) p = p + (ax << i);
            if (NEG[i]) p = p - (ax << i);
          end
        end
      end
    endcase
  endgenerate

endmodule
