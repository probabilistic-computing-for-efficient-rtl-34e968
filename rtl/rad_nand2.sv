// rad_nand2 - two-input CMOS NAND gate with a radiation-strike input.
//
// Without a strike, y = ~(a & b). When `hit` is high, one of the gate's four
// transistors (`transistor`, 0..3) is struck by a particle and the output takes
// the value the strike table of the CMOS NAND gives:
//   a b | transistor that flips the output
//   0 0 | none  (output stays 1)
//   0 1 | 0, 2  (output pulled to 0)
//   1 0 | 1, 3  (output pulled to 0)
//   1 1 | all   (output pulled to 1)
// The table is that of the original study; it is the logic-level image of a
// transient pulse on the drain of the struck transistor. Only bit 0 of
// `transistor` decides the outcome (transistors 0/2 and 1/3 act alike in the
// table); the port keeps both bits so that every transistor can be named.
// Purely combinational.
module rad_nand2 (
  input  logic       a,
  input  logic       b,
  input  logic       hit,         // a particle strikes this gate now
  input  logic [1:0] transistor,  // which transistor is struck
  output logic       y
);
  logic flip;

  always_comb begin
    unique case ({a, b})
      2'b00:   flip = 1'b0;
      2'b01:   flip = ~transistor[0];   // transistors 0 and 2
      2'b10:   flip =  transistor[0];   // transistors 1 and 3
      default: flip = 1'b1;             // 2'b11: every transistor
    endcase
    y = ~(a & b) ^ (hit & flip);
  end
endmodule
