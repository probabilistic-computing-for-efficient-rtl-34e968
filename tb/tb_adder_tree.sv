// tb_adder_tree - registered 8-input, 3-level adder tree: a new input set
// every cycle, each sum checked exactly 3 cycles later; `en` low freezes the
// registers; an error mask on the root adder flips the result bits.
module tb_adder_tree;
  import pc_pkg::*;
  localparam int Q = 8, K = 3;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] din [Q];
  logic [15:0] mask [Q-1];
  logic [15:0] sum;
  set_hit_t hit;
  int checks = 0, failures = 0;
  logic [15:0] expq [$];

  adder_tree #(.Q(Q), .K(K), .W(16), .ADDER_BASE(16)) dut (
    .clk, .rst_n, .en, .din, .err_mask(mask), .hit, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] total();
    logic [15:0] s = 0;
    for (int j = 0; j < Q; j++) s += din[j];
    return s;
  endfunction

  initial begin
    logic [15:0] e, held;
    hit = '0;
    foreach (mask[t]) mask[t] = '0;
    foreach (din[j]) din[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    en = 1;
    // Streaming: the sum of the inputs given before clock edge c is on the
    // output after edge c+K-1.
    for (int c = 0; c < 200 + K; c++) begin
      if (c >= K) begin
        e = expq.pop_front();
        checks++;
        if (sum !== e) begin
          failures++;
          $display("FAIL streaming cycle %0d sum=%h exp=%h", c, sum, e);
        end
      end
      foreach (din[j]) din[j] = 16'($urandom_range(0, 255 * 8));
      expq.push_back(total());
      @(negedge clk);
    end
    // Hold: with en low the output does not move.
    en = 0;
    held = sum;
    repeat (4) @(negedge clk);
    checks++;
    if (sum !== held) failures++;
    // Root adder (id 16+6, err_mask[6]) error mask, applied in the cycle in
    // which the root adder sees this input set (two cycles after it is given).
    en = 1;
    foreach (din[j]) din[j] = 16'($urandom_range(0, 255));
    e = total();
    repeat (2) @(negedge clk);
    mask[6] = 16'h0005;
    @(negedge clk);
    mask[6] = '0;
    checks++;
    if (sum !== (e ^ 16'h0005)) begin
      failures++;
      $display("FAIL mask sum=%h exp=%h", sum, e ^ 16'h0005);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
