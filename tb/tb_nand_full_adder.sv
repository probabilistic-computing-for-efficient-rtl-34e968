// tb_nand_full_adder - exhaustive check of the nine-NAND full adder: all
// inputs, every struck gate and transistor, pulse lengths 0..7. Also the two
// worked strike examples: gate 6 with a four-stage pulse reaches s, gate 2
// with a two-stage pulse is filtered.
module tb_nand_full_adder;
  import tb_ref_pkg::*;
  logic a, b, cin, s, cout;
  logic [3:0] gate;
  logic [1:0] tr;
  logic [2:0] st;
  int checks = 0, failures = 0, flips = 0;

  nand_full_adder dut (.a, .b, .cin, .gate, .transistor(tr), .stages(st), .s, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++)
      for (int g = 0; g <= 9; g++)
        for (int t = 0; t < 4; t++)
          for (int p = 0; p < 8; p++) begin
            bit [1:0] exp;
            {a, b, cin} = 3'(v);
            gate = 4'(g); tr = 2'(t); st = 3'(p);
            #1;
            exp = fa_ref(a, b, cin, g, t, p);
            checks++;
            if ({cout, s} !== exp) begin
              failures++;
              $display("FAIL abc=%0d g=%0d t=%0d st=%0d got=%b exp=%b", v, g, t, p, {cout, s}, exp);
            end
            if ({cout, s} != 2'(a + b + cin)) flips++;
          end
    // Gate 2, two-stage pulse: never changes an output.
    for (int v = 0; v < 8; v++)
      for (int t = 0; t < 4; t++) begin
        {a, b, cin} = 3'(v); gate = 4'd2; tr = 2'(t); st = 3'd2;
        #1;
        checks++;
        if ({cout, s} != 2'(a + b + cin)) failures++;
      end
    // Gate 6, transistor 1, four stages, inputs g4=1 g5=0 -> g6 flips from 1
    // to 0 and s flips. a^b=1 with cin=1 gives g5=0.
    a = 1; b = 0; cin = 1; gate = 4'd6; tr = 2'd1; st = 3'd4;
    #1;
    checks++;
    if (s !== 1'b1 || cout !== 1'b1) begin
      failures++;
      $display("FAIL gate 6 example s=%0d cout=%0d", s, cout);
    end
    checks++;
    if (flips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
