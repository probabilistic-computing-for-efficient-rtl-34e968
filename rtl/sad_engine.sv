// sad_engine - probabilistic sum-of-absolute-differences engine for stereo
// window matching.
//
// Computes SAD = sum |L(i) - R(i)| over the n_pix selected pixels of a left and
// a right image window (an 8 x 8 window by default). Q = 2**K pixel pairs are
// processed per clock cycle:
//   input registers (Q pairs) -> Q abs_diff_unit -> registers
//   -> adder_tree (K registered levels) -> sad_accumulator (feedback adder)
// sequenced by sad_control. A run of n_pix pixels takes MaxCount =
// ceil(n_pix/Q) + K + 2 cycles from the cycle `start` is taken to the cycle
// `done` is high, when `sad` holds the result. A new `start` may be given in
// the done cycle, so windows run back to back every MaxCount + 1 cycles (14 for
// an 8 x 8 window).
//
// Pixel interface: while blk_rd is high, the source must drive pixel pairs
// blk_idx*Q .. blk_idx*Q+Q-1 of the window on pix_l / pix_r in the same cycle
// (as from a window buffer with combinational read). Lanes past n_pix are
// ignored.
//
// Error injection: the engine has 3*Q 16-bit adders (2 per ABS unit, Q-1 in the
// tree, 1 accumulator; numbering in pc_pkg). err_mask[a] inverts sum bits of
// adder a in the current cycle, standing for the bit errors of bit-level
// voltage-scaled (BIVOS) adders; inv_mask[2u] / inv_mask[2u+1] do the same for
// the ~A / ~B inverter banks of ABS unit u; `hit` applies one radiation strike
// to one NAND transistor of one full adder. All-zero masks and hit.valid = 0
// give the exact SAD. The control logic is kept free of injected errors.
// Structure, Q = 8, 16-bit adders and the cycle count follow the original
// architecture; the pixel handshake and the injection ports are this design's.
module sad_engine
  import pc_pkg::*;
#(
  parameter int unsigned Q        = 8,
  parameter int unsigned K        = $clog2(Q),
  parameter int unsigned NPIX_MAX = 64,
  parameter int unsigned W        = ADD_W,
  parameter int unsigned PW       = PIX_W,
  parameter int unsigned NA       = 3 * Q,
  parameter int unsigned NW       = $clog2(NPIX_MAX + 1),
  parameter int unsigned BW       = $clog2((NPIX_MAX + Q - 1) / Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n_pix,
  output logic          busy,
  output logic          blk_rd,
  output logic [BW-1:0] blk_idx,
  input  logic [PW-1:0] pix_l    [Q],
  input  logic [PW-1:0] pix_r    [Q],
  input  logic [W-1:0]  err_mask [NA],
  input  logic [W-1:0]  inv_mask [2*Q],
  input  set_hit_t      hit,
  output logic          done,
  output logic [W-1:0]  sad
);
  logic [Q-1:0] lane_valid;
  logic         pipe_en, acc_clr, acc_en;

  sad_control #(.Q(Q), .K(K), .NPIX_MAX(NPIX_MAX), .NW(NW), .BW(BW)) u_ctrl (
    .clk, .rst_n, .start, .n_pix, .busy, .blk_rd, .blk_idx,
    .lane_valid, .pipe_en, .acc_clr, .acc_en, .done
  );

  // Input registers: one block of Q pixel pairs, unselected lanes zeroed.
  logic [PW-1:0] in_l [Q];
  logic [PW-1:0] in_r [Q];
  always_ff @(posedge clk) begin
    for (int j = 0; j < Q; j++) begin
      if (!rst_n) begin
        in_l[j] <= '0;
        in_r[j] <= '0;
      end else if (pipe_en) begin
        in_l[j] <= lane_valid[j] ? pix_l[j] : '0;
        in_r[j] <= lane_valid[j] ? pix_r[j] : '0;
      end
    end
  end

  // Absolute-value units and their output registers.
  logic [W-1:0] abs_c [Q];
  logic [W-1:0] abs_r [Q];
  for (genvar j = 0; j < Q; j++) begin : g_abs
    logic [W-1:0] m [2], im [2];
    assign m[0]  = err_mask[2*j];
    assign m[1]  = err_mask[2*j+1];
    assign im[0] = inv_mask[2*j];
    assign im[1] = inv_mask[2*j+1];
    abs_diff_unit #(.PW(PW), .W(W), .ADDER_BASE(2*j)) u_abs (
      .pix_a(in_l[j]), .pix_b(in_r[j]), .err_mask(m), .inv_mask(im), .hit(hit),
      .abs_diff(abs_c[j])
    );
    always_ff @(posedge clk) begin
      if (!rst_n)       abs_r[j] <= '0;
      else if (pipe_en) abs_r[j] <= abs_c[j];
    end
  end

  // Adder tree.
  logic [W-1:0] tree_mask [Q-1];
  logic [W-1:0] tree_sum;
  for (genvar t = 0; t < Q - 1; t++) begin : g_tmask
    assign tree_mask[t] = err_mask[2*Q + t];
  end

  adder_tree #(.Q(Q), .K(K), .W(W), .ADDER_BASE(2*Q)) u_tree (
    .clk, .rst_n, .en(pipe_en), .din(abs_r), .err_mask(tree_mask), .hit(hit),
    .sum(tree_sum)
  );

  // Accumulating last adder.
  sad_accumulator #(.W(W), .ADDER_ID(3*Q - 1)) u_acc (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en), .din(tree_sum),
    .err_mask(err_mask[3*Q - 1]), .hit(hit), .acc(sad)
  );
endmodule
