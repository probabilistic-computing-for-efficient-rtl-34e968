// bivos_error_model - behavioural model of the bit errors of bit-level
// voltage-scaled (BIVOS) adders, for simulation only.
//
// Each bit i of each of NA adders is correct with probability p_i, set by
// the bounded geometric supply-voltage distribution
//   p_0 = P0,  p_i = min(1, p_{i-1} + A * R**(i-1)),  p_i = 1 for i >= NBITS,
// so the low-order bits, run at the lowest voltages, fail most often. At
// every falling clock edge a fresh random mask is drawn (1 = bit wrong),
// which the engine XORs onto its adders' sums. Default P0/A/R are one of the
// best-fit parameter rows of the voltage study (p0 0.91, a 0.001, r 2).
module bivos_error_model #(
  parameter int  NA    = 24,
  parameter int  W     = 16,
  parameter int  NBITS = 6,
  parameter real P0    = 0.91,
  parameter real A     = 0.001,
  parameter real R     = 2.0
) (
  input  logic         clk,
  input  logic         enable,
  output logic [W-1:0] err_mask [NA]
);
  real p [W];

  initial begin
    for (int i = 0; i < W; i++) begin
      if (i == 0)          p[i] = P0;
      else                 p[i] = p[i-1] + A * (R ** (i - 1));
      if (p[i] > 1.0)      p[i] = 1.0;
      if (i >= NBITS)      p[i] = 1.0;
    end
    foreach (err_mask[n]) err_mask[n] = '0;
  end

  always @(negedge clk) begin
    for (int n = 0; n < NA; n++)
      for (int i = 0; i < W; i++)
        err_mask[n][i] <= enable && (real'($urandom) / 4294967296.0 >= p[i]);
  end
endmodule
