// tb_ripple_adder - 16-bit NAND ripple adder: random exact sums, XOR error
// masks, strikes on random bits/gates/transistors/pulse lengths compared with
// the reference model, and strikes addressed to another adder (no effect).
module tb_ripple_adder;
  import pc_pkg::*;
  import tb_ref_pkg::*;
  logic [15:0] a, b, mask, sum;
  logic        cin, cout;
  set_hit_t    hit;
  int checks = 0, failures = 0, struck = 0;

  ripple_adder #(.W(16), .ADDER_ID(5)) dut (.a, .b, .cin, .err_mask(mask), .hit, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit [16:0] exp);
    #1;
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%0d got=%h exp=%h", what, a, b, cin, {cout, sum}, exp);
    end
  endtask

  initial begin
    hit = '0;
    // Exact sums, including the extremes.
    a = 16'hFFFF; b = 16'h0001; cin = 0; mask = 0; check("max", 17'h10000);
    a = 16'hFFFF; b = 16'hFFFF; cin = 1; check("max2", 17'h1FFFF);
    for (int n = 0; n < 300; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); mask = 0;
      check("exact", 17'(a) + 17'(b) + 17'(cin));
    end
    // Error masks.
    for (int n = 0; n < 100; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); mask = 16'($urandom);
      check("mask", {1'b0, mask} ^ (17'(a) + 17'(b) + 17'(cin)));
    end
    // Strikes on this adder.
    mask = 0;
    for (int n = 0; n < 2000; n++) begin
      bit [16:0] exp;
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      hit.valid = 1; hit.adder = 8'd5; hit.bit_idx = 4'($urandom_range(0, 15));
      hit.gate = 4'($urandom_range(1, 9)); hit.transistor = 2'($urandom);
      hit.stages = 3'($urandom);
      exp = add_ref(a, b, cin, 0, hit.bit_idx, hit.gate, hit.transistor, hit.stages);
      if (exp != 17'(a) + 17'(b) + 17'(cin)) struck++;
      check("strike", exp);
    end
    // Strikes addressed elsewhere, or not valid.
    for (int n = 0; n < 100; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      hit.valid = 1'(n % 2); hit.adder = (n % 2) ? 8'd6 : 8'd5; hit.gate = 4'd8;
      hit.stages = 3'd7; hit.bit_idx = 4'($urandom);
      check("other", 17'(a) + 17'(b) + 17'(cin));
    end
    checks++;
    if (struck == 0) failures++;
    $display("strikes that changed the result: %0d of 2000", struck);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
