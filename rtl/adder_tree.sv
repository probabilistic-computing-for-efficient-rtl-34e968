// adder_tree - k-level registered binary adder tree.
//
// Sums Q = 2**K inputs. Level l (1..K) has Q/2**l ripple_adder instances, each
// adding two results of level l-1, and a register after every adder, so the sum
// of a set of inputs appears on `sum` K clock cycles after it was presented; a
// new set can be presented every cycle. The registers load only while `en` is
// high. The tree shape and the register after each stage follow the original
// architecture; the synchronous active-low reset is this design's. Adder t of
// the tree (leaves first, level by level) has adder id ADDER_BASE + t and takes
// err_mask[t].
module adder_tree
  import pc_pkg::*;
#(
  parameter int unsigned Q          = 8,
  parameter int unsigned K          = $clog2(Q),
  parameter int unsigned W          = ADD_W,
  parameter int unsigned ADDER_BASE = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din      [Q],
  input  logic [W-1:0] err_mask [Q-1],
  input  set_hit_t     hit,
  output logic [W-1:0] sum
);
  for (genvar l = 1; l <= K; l++) begin : g_lvl
    localparam int unsigned N   = Q >> l;
    localparam int unsigned OFS = Q - (Q >> (l - 1));
    logic [W-1:0] r [N];
    for (genvar j = 0; j < N; j++) begin : g_add
      logic [W-1:0] x, y, s;
      logic         co;
      if (l == 1) begin : g_in
        assign x = din[2*j];
        assign y = din[2*j+1];
      end else begin : g_mid
        assign x = g_lvl[l-1].r[2*j];
        assign y = g_lvl[l-1].r[2*j+1];
      end
      ripple_adder #(.W(W), .ADDER_ID(ADDER_BASE + OFS + j)) u_add (
        .a(x), .b(y), .cin(1'b0), .err_mask(err_mask[OFS + j]), .hit(hit),
        .sum(s), .cout(co)
      );
      always_ff @(posedge clk) begin
        if (!rst_n)  r[j] <= '0;
        else if (en) r[j] <= s;
      end
      // Carry out is dropped: the tree width holds the whole sum.
      logic unused_co;
      assign unused_co = co;
    end
  end

  assign sum = g_lvl[K].r[0];
endmodule
