// ripple_adder - W-bit ripple-carry adder of nine-NAND full adders, with
// probabilistic and radiation error injection.
//
// sum/cout = a + b + cin, computed by a chain of nand_full_adder cells (bit 0
// first). Two error sources can be injected:
//   * err_mask: bit i of the sum is inverted when err_mask[i] is 1. This is
//     the logic-level image of a bit-level voltage-scaled (BIVOS) adder, where
//     each bit runs at its own supply voltage and is correct only with some
//     probability; the mask is drawn outside (an all-zero mask gives the exact
//     sum). The flip acts on the sum output only; the carry chain stays
//     exact.
//   * hit: a single-event transient. It acts when hit.valid is set and
//     hit.adder equals ADDER_ID, on full adder hit.bit_idx.
// The adder structure follows the original architecture (16-bit adders of NAND
// full adders); where the probabilistic flip is applied is this design's
// choice. Purely combinational.
module ripple_adder
  import pc_pkg::*;
#(
  parameter int unsigned W        = ADD_W,
  parameter int unsigned ADDER_ID = 0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic [W-1:0] err_mask,
  input  set_hit_t     hit,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;
  logic [W-1:0] s_raw;
  logic         mine;

  assign mine = hit.valid && (hit.adder == 8'(ADDER_ID));
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic [3:0] gate_i;
    assign gate_i = (mine && (hit.bit_idx == 4'(i))) ? hit.gate : 4'd0;
    nand_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .gate(gate_i), .transistor(hit.transistor), .stages(hit.stages),
      .s(s_raw[i]), .cout(c[i+1])
    );
  end

  assign sum  = s_raw ^ err_mask;
  assign cout = c[W];
endmodule
