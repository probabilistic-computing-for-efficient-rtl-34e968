// tb_abs_diff_unit - absolute difference of all 8-bit pixel pairs (exact),
// an error mask on the difference adder (result XOR mask), a mask on the
// comparator's sign bit (selects the wrong operand order), and a strike
// addressed to another adder (no effect), and bit errors in the ~A / ~B
// inverter banks checked against a bit-exact model of the two-adder scheme.
module tb_abs_diff_unit;
  import pc_pkg::*;
  logic [7:0]  pa, pb;
  logic [15:0] mask [2], im [2];
  logic [15:0] d;
  set_hit_t    hit;
  int checks = 0, failures = 0;

  abs_diff_unit #(.PW(8), .W(16), .ADDER_BASE(4)) dut (
    .pix_a(pa), .pix_b(pb), .err_mask(mask), .inv_mask(im), .hit, .abs_diff(d));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] absd(int x, int y);
    return 16'((x > y) ? x - y : y - x);
  endfunction

  initial begin
    hit = '0; mask[0] = '0; mask[1] = '0; im[0] = '0; im[1] = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        pa = 8'(x); pb = 8'(y);
        #1;
        checks++;
        if (d !== absd(x, y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d %0d got %0d", x, y, d);
        end
      end
    for (int n = 0; n < 200; n++) begin
      pa = 8'($urandom); pb = 8'($urandom); mask[1] = 16'($urandom);
      #1;
      checks++;
      if (d !== (absd(int'(pa), int'(pb)) ^ mask[1])) failures++;
    end
    // Inverted sign bit: the operands are taken in the wrong order and
    // the unit computes the negated difference (mod 2**16).
    mask[1] = '0; mask[0] = 16'h8000;
    for (int n = 0; n < 200; n++) begin
      pa = 8'($urandom); pb = 8'($urandom);
      #1;
      checks++;
      if (d !== ((pa >= pb) ? 16'(int'(pb) - int'(pa)) : 16'(int'(pa) - int'(pb)))) failures++;
    end
    mask[0] = '0;
    hit.valid = 1; hit.adder = 8'd9; hit.gate = 4'd8; hit.stages = 3'd7;
    for (int n = 0; n < 100; n++) begin
      pa = 8'($urandom); pb = 8'($urandom); hit.bit_idx = 4'($urandom);
      #1;
      checks++;
      if (d !== absd(int'(pa), int'(pb))) failures++;
    end
    // Inverter-bank errors: comparator A + (~B^m1) + 1 selects the order;
    // the difference adder adds A + (~B^m1) + 1 or (~A^m0) + B + 1.
    hit = '0;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] an, bn, c, e;
      pa = 8'($urandom); pb = 8'($urandom);
      im[0] = 16'(1 << $urandom_range(0, 15));
      im[1] = (n % 2) ? 16'(1 << $urandom_range(0, 15)) : 16'h0;
      an = ~{8'h0, pa} ^ im[0];
      bn = ~{8'h0, pb} ^ im[1];
      c  = {8'h0, pa} + bn + 16'd1;
      e  = c[15] ? an + {8'h0, pb} + 16'd1 : c;
      #1;
      checks++;
      if (d !== e) begin
        failures++;
        $display("FAIL inv a=%0d b=%0d m0=%h m1=%h got=%h exp=%h", pa, pb, im[0], im[1], d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
