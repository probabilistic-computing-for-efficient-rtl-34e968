// tb_sad_accumulator - feedback adder: clear, random add sequences with
// enable gaps, a sum that wraps at 16 bits, and an error mask on one add.
module tb_sad_accumulator;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [15:0] din, mask, acc, model;
  set_hit_t hit;
  int checks = 0, failures = 0;

  sad_accumulator #(.W(16), .ADDER_ID(3)) dut (
    .clk, .rst_n, .clr, .en, .din, .err_mask(mask), .hit, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit = '0; mask = '0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (acc !== 16'd0) failures++;
    model = 0;
    for (int r = 0; r < 20; r++) begin
      clr = 1; en = 1; din = 16'($urandom);
      @(negedge clk);
      model = 0;
      clr = 0;
      checks++;
      if (acc !== 16'd0) failures++;
      for (int n = 0; n < 30; n++) begin
        en = 1'($urandom);
        din = 16'($urandom);
        mask = (n == 7) ? 16'h0100 : 16'h0000;
        if (en) model = (model + din) ^ mask;
        @(negedge clk);
        checks++;
        if (acc !== model) begin
          failures++;
          $display("FAIL run %0d step %0d acc=%h model=%h", r, n, acc, model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
