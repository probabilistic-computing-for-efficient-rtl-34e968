// abs_diff_unit - absolute difference |A - B| of two pixels with two adders and
// two multiplexers.
//
// Both pixels are zero-extended to the W-bit adder width.
//   1. The comparator adder computes A + ~B + 1 = A - B; its most significant
//      bit is the sign, 1 when A < B.
//   2. Multiplexer 1 passes A or ~A, multiplexer 2 passes B or ~B, so that
//      the difference adder computes A + ~B + 1 (A >= B) or ~A + B + 1
//      (A < B), which is the absolute difference in both cases.
// The structure (two adders, two multiplexers, the first adder serving as a
// magnitude comparator) is the second of the two absolute-value unit designs of
// the original architecture. Both adders are ripple_adder instances with adder
// ids ADDER_BASE (comparator) and ADDER_BASE+1 (difference), so that
// probabilistic errors (err_mask[0], err_mask[1]) and a radiation strike can
// reach either. The two inverter banks (~A, and ~B shared by the comparator and
// multiplexer 2) are voltage-scaled too: inv_mask[0] / inv_mask[1] invert bits
// of their outputs (all zero for exact operation). Purely combinational; W must
// exceed PIX_W so the sign bit is meaningful.
module abs_diff_unit
  import pc_pkg::*;
#(
  parameter int unsigned PW         = PIX_W,
  parameter int unsigned W          = ADD_W,
  parameter int unsigned ADDER_BASE = 0
) (
  input  logic [PW-1:0] pix_a,
  input  logic [PW-1:0] pix_b,
  input  logic [W-1:0]  err_mask [2],  // [0] comparator, [1] difference adder
  input  logic [W-1:0]  inv_mask [2],  // [0] ~A bank, [1] ~B bank
  input  set_hit_t      hit,
  output logic [W-1:0]  abs_diff
);
  logic [W-1:0] a_ext, b_ext, a_inv, b_inv, cmp_sum, mux1, mux2;
  logic         neg, cmp_cout, dif_cout;

  assign a_ext = W'(pix_a);
  assign b_ext = W'(pix_b);
  assign a_inv = ~a_ext ^ inv_mask[0];
  assign b_inv = ~b_ext ^ inv_mask[1];

  ripple_adder #(.W(W), .ADDER_ID(ADDER_BASE)) u_cmp (
    .a(a_ext), .b(b_inv), .cin(1'b1), .err_mask(err_mask[0]), .hit(hit),
    .sum(cmp_sum), .cout(cmp_cout)
  );

  assign neg  = cmp_sum[W-1];
  assign mux1 = neg ? a_inv : a_ext;
  assign mux2 = neg ? b_ext : b_inv;

  ripple_adder #(.W(W), .ADDER_ID(ADDER_BASE + 1)) u_dif (
    .a(mux1), .b(mux2), .cin(1'b1), .err_mask(err_mask[1]), .hit(hit),
    .sum(abs_diff), .cout(dif_cout)
  );

  // The carry outputs carry no information for an absolute difference.
  logic unused;
  assign unused = cmp_cout ^ dif_cout;
endmodule
