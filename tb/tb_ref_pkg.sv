// tb_ref_pkg - reference models used by the testbenches.
//
// Written from the strike table of the CMOS NAND gate and the nine-NAND full
// adder, independently of the RTL: a struck gate's output is looked up in a
// 16-entry table, and a strike reaches an adder output only if its pulse lasts
// at least as many gate stages as the shortest path from the struck gate.
package tb_ref_pkg;

  // Strike table: output of a NAND with inputs {a,b} when transistor t is
  // struck, indexed {a, b, t}.
  localparam bit STRUCK [16] = '{
    1, 1, 1, 1,   // a=0 b=0
    0, 1, 0, 1,   // a=0 b=1
    1, 0, 1, 0,   // a=1 b=0
    1, 1, 1, 1    // a=1 b=1
  };

  function automatic bit nand_ref(bit a, bit b, bit hit, int t);
    if (!hit) return !(a && b);
    return STRUCK[{a, b} * 4 + t];
  endfunction

  // Shortest gate paths to s and cout (index = gate number, 99 = unreachable).
  localparam int DS [10] = '{99, 5, 4, 4, 3, 3, 2, 2, 1, 99};
  localparam int DC [10] = '{99, 2, 4, 4, 3, 2, 99, 99, 99, 1};

  // Returns {cout, s} of the nine-NAND full adder with gate `g` (0 = none)
  // struck at transistor t by a pulse lasting `st` stages.
  function automatic bit [1:0] fa_ref(bit a, bit b, bit c, int g, int t, int st);
    bit [9:1] n;
    bit s_clean, c_clean;
    n[1] = nand_ref(a,    b,    g == 1, t);
    n[2] = nand_ref(a,    n[1], g == 2, t);
    n[3] = nand_ref(b,    n[1], g == 3, t);
    n[4] = nand_ref(n[2], n[3], g == 4, t);
    n[5] = nand_ref(n[4], c,    g == 5, t);
    n[6] = nand_ref(n[4], n[5], g == 6, t);
    n[7] = nand_ref(c,    n[5], g == 7, t);
    n[8] = nand_ref(n[6], n[7], g == 8, t);
    n[9] = nand_ref(n[5], n[1], g == 9, t);
    s_clean = a ^ b ^ c;
    c_clean = (a & b) | (a & c) | (b & c);
    return { (g >= 1 && g <= 9 && st >= DC[g]) ? n[9] : c_clean,
             (g >= 1 && g <= 9 && st >= DS[g]) ? n[8] : s_clean };
  endfunction

  // 16-bit ripple adder with one struck full adder (bit `bi`) and an XOR
  // mask on the sum. Returns {cout, sum}.
  function automatic bit [16:0] add_ref(bit [15:0] a, bit [15:0] b, bit cin,
                                        bit [15:0] mask, int bi, int g, int t,
                                        int st);
    bit [15:0] s;
    bit        c = cin;
    for (int i = 0; i < 16; i++) begin
      bit [1:0] r = fa_ref(a[i], b[i], c, (i == bi) ? g : 0, t, st);
      s[i] = r[0];
      c    = r[1];
    end
    return {c, s ^ mask};
  endfunction

endpackage
