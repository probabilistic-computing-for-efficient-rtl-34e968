// tb_rad_nand2 - exhaustive check of the radiation-struck NAND gate against
// the strike table, with and without a strike.
module tb_rad_nand2;
  import tb_ref_pkg::*;
  logic a, b, hit, y;
  logic [1:0] tr;
  int checks = 0, failures = 0;

  rad_nand2 dut (.a, .b, .hit, .transistor(tr), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {hit, a, b, tr} = 5'(v);
      #1;
      checks++;
      if (y !== nand_ref(a, b, hit, int'(tr))) begin
        failures++;
        $display("FAIL a=%0d b=%0d hit=%0d t=%0d y=%0d", a, b, hit, tr, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
