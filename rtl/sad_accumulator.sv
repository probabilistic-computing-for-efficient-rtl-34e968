// sad_accumulator - the last adder of the engine, with its output fed back.
//
// acc <= acc + din while `en` is high; `clr` empties the register (clr wins
// over en). The adder is a ripple_adder with adder id ADDER_ID, so
// probabilistic errors (err_mask) and a radiation strike reach it too. The
// feedback adder follows the original architecture; the clear input and the
// synchronous active-low reset are this design's. The carry out is dropped: a
// window of up to 2**(W-PIX_W) pixels cannot overflow.
module sad_accumulator
  import pc_pkg::*;
#(
  parameter int unsigned W        = ADD_W,
  parameter int unsigned ADDER_ID = 23
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] din,
  input  logic [W-1:0] err_mask,
  input  set_hit_t     hit,
  output logic [W-1:0] acc
);
  logic [W-1:0] s;
  logic         co;

  ripple_adder #(.W(W), .ADDER_ID(ADDER_ID)) u_add (
    .a(acc), .b(din), .cin(1'b0), .err_mask(err_mask), .hit(hit),
    .sum(s), .cout(co)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc <= '0;
    else if (en)       acc <= s;
  end

  logic unused;
  assign unused = co;
endmodule
