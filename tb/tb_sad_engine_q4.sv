// tb_sad_engine_q4 - the SAD engine built with 4 absolute-value units
// (Q = 4, K = 2, 12 adders): random windows of 1..64 pixels give the exact
// SAD after MaxCount = ceil(n/4) + 2 + 2 cycles, and a mask on the
// accumulating adder (id 11) in its last addition flips the result bits.
module tb_sad_engine_q4;
  import pc_pkg::*;
  localparam int Q = 4, K = 2, NP = 64, NA = 3 * Q;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] n_pix = '0;
  logic busy, blk_rd, done;
  logic [4:0] blk_idx;
  logic [7:0] pix_l [Q], pix_r [Q];
  logic [15:0] mask [NA], imask [2*Q];
  logic [15:0] sad;
  set_hit_t hit;
  logic [7:0] win_l [NP], win_r [NP];
  int checks = 0, failures = 0;

  sad_engine #(.Q(Q), .NPIX_MAX(NP)) dut (
    .clk, .rst_n, .start, .n_pix, .busy, .blk_rd, .blk_idx,
    .pix_l, .pix_r, .err_mask(mask), .inv_mask(imask), .hit, .done, .sad);

  always #5 clk = ~clk;

  always_comb
    for (int j = 0; j < Q; j++) begin
      pix_l[j] = win_l[(int'(blk_idx) * Q + j) % NP];
      pix_r[j] = win_r[(int'(blk_idx) * Q + j) % NP];
    end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_sad(int n);
    int s = 0;
    for (int i = 0; i < n; i++)
      s += (win_l[i] > win_r[i]) ? win_l[i] - win_r[i] : win_r[i] - win_l[i];
    return 16'(s);
  endfunction

  initial begin
    hit = '0;
    foreach (mask[a]) mask[a] = '0;
    foreach (imask[a]) imask[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      int n, cyc, nb;
      bit use_mask;
      n = (r % 5 == 0) ? NP : $urandom_range(1, NP);
      nb = (n + Q - 1) / Q;
      use_mask = (r % 4 == 3);
      for (int i = 0; i < NP; i++) begin
        win_l[i] = 8'($urandom);
        win_r[i] = 8'($urandom);
      end
      @(negedge clk);
      n_pix = 7'(n);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done && cyc < 100) begin
        mask[NA-1] = (use_mask && cyc == nb + K + 1) ? 16'h8001 : 16'h0;
        @(negedge clk);
        cyc++;
      end
      mask[NA-1] = '0;
      checks += 2;
      if (cyc != nb + K + 2) begin
        failures++;
        $display("FAIL n=%0d took %0d cycles, MaxCount %0d", n, cyc, nb + K + 2);
      end
      if (sad !== (ref_sad(n) ^ (use_mask ? 16'h8001 : 16'h0))) begin
        failures++;
        $display("FAIL n=%0d sad=%h exp=%h", n, sad, ref_sad(n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
