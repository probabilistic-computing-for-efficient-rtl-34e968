// nand_full_adder - one-bit full adder of nine NAND gates, with single-event
// transient (SET) injection.
//
// Gate network (gate numbers are used by the `gate` input):
//   g1 = ~(a  & b)     g4 = ~(g2 & g3) = a ^ b     g7 = ~(cin & g5)
//   g2 = ~(a  & g1)    g5 = ~(g4 & cin)            g8 = ~(g6 & g7) = s
//   g3 = ~(b  & g1)    g6 = ~(g4 & g5)             g9 = ~(g5 & g1) = cout
// Every gate is a rad_nand2. A strike hits transistor `transistor` of gate
// `gate` (1..9, 0 = no strike). The transient lasts `stages` gate delays; it
// changes an output only if it lasts at least as many stages as the shortest
// gate path from the struck gate to that output, the struck gate included (gate
// 2 is four stages from both s and cout; gate 6 is two stages from s). Each
// output therefore selects between the result of a struck copy of the network
// and an unstruck copy. The NAND network and the strike table follow the
// original architecture; the stage-count rule is this design's reading of its
// worked strike examples. Purely combinational.
module nand_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic [3:0] gate,        // struck gate 1..9, 0 = none
  input  logic [1:0] transistor,  // struck transistor 0..3
  input  logic [2:0] stages,      // transient duration in gate stages
  output logic       s,
  output logic       cout
);
  logic [9:1] gc;   // unstruck network
  logic [9:1] gh;   // struck network
  logic [9:1] hit_g;

  always_comb begin
    for (int g = 1; g <= 9; g++) hit_g[g] = (gate == 4'(g));
  end

  // Unstruck copy.
  rad_nand2 c1 (.a(a),     .b(b),     .hit(1'b0), .transistor(2'd0), .y(gc[1]));
  rad_nand2 c2 (.a(a),     .b(gc[1]), .hit(1'b0), .transistor(2'd0), .y(gc[2]));
  rad_nand2 c3 (.a(b),     .b(gc[1]), .hit(1'b0), .transistor(2'd0), .y(gc[3]));
  rad_nand2 c4 (.a(gc[2]), .b(gc[3]), .hit(1'b0), .transistor(2'd0), .y(gc[4]));
  rad_nand2 c5 (.a(gc[4]), .b(cin),   .hit(1'b0), .transistor(2'd0), .y(gc[5]));
  rad_nand2 c6 (.a(gc[4]), .b(gc[5]), .hit(1'b0), .transistor(2'd0), .y(gc[6]));
  rad_nand2 c7 (.a(cin),   .b(gc[5]), .hit(1'b0), .transistor(2'd0), .y(gc[7]));
  rad_nand2 c8 (.a(gc[6]), .b(gc[7]), .hit(1'b0), .transistor(2'd0), .y(gc[8]));
  rad_nand2 c9 (.a(gc[5]), .b(gc[1]), .hit(1'b0), .transistor(2'd0), .y(gc[9]));

  // Struck copy.
  rad_nand2 h1 (.a(a),     .b(b),     .hit(hit_g[1]), .transistor(transistor), .y(gh[1]));
  rad_nand2 h2 (.a(a),     .b(gh[1]), .hit(hit_g[2]), .transistor(transistor), .y(gh[2]));
  rad_nand2 h3 (.a(b),     .b(gh[1]), .hit(hit_g[3]), .transistor(transistor), .y(gh[3]));
  rad_nand2 h4 (.a(gh[2]), .b(gh[3]), .hit(hit_g[4]), .transistor(transistor), .y(gh[4]));
  rad_nand2 h5 (.a(gh[4]), .b(cin),   .hit(hit_g[5]), .transistor(transistor), .y(gh[5]));
  rad_nand2 h6 (.a(gh[4]), .b(gh[5]), .hit(hit_g[6]), .transistor(transistor), .y(gh[6]));
  rad_nand2 h7 (.a(cin),   .b(gh[5]), .hit(hit_g[7]), .transistor(transistor), .y(gh[7]));
  rad_nand2 h8 (.a(gh[6]), .b(gh[7]), .hit(hit_g[8]), .transistor(transistor), .y(gh[8]));
  rad_nand2 h9 (.a(gh[5]), .b(gh[1]), .hit(hit_g[9]), .transistor(transistor), .y(gh[9]));

  // A strike reaches an output when the pulse lasts at least as many stages
  // as the shortest gate path from the struck gate to that output, the
  // struck gate included:
  //   gate      1  2  3  4  5  6  7  8  9
  //   to s      5  4  4  3  3  2  2  1  -
  //   to cout   2  4  4  3  2  -  -  -  1
  logic reach_s, reach_c;

  always_comb begin
    reach_s = (gate == 4'd8                  && stages >= 3'd1) ||
              ((gate == 4'd6 || gate == 4'd7) && stages >= 3'd2) ||
              ((gate == 4'd4 || gate == 4'd5) && stages >= 3'd3) ||
              ((gate == 4'd2 || gate == 4'd3) && stages >= 3'd4) ||
              (gate == 4'd1                  && stages >= 3'd5);
    reach_c = (gate == 4'd9                  && stages >= 3'd1) ||
              ((gate == 4'd1 || gate == 4'd5) && stages >= 3'd2) ||
              (gate == 4'd4                  && stages >= 3'd3) ||
              ((gate == 4'd2 || gate == 4'd3) && stages >= 3'd4);
    s    = reach_s ? gh[8] : gc[8];
    cout = reach_c ? gh[9] : gc[9];
  end
endmodule
