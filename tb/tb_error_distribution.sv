// tb_error_distribution - error distribution of the full SAD circuit over
// 5000 random calculations of 8 pixel pairs each (one block of the engine,
// MaxCount = 1 + 3 + 2 = 6 cycles), for four error settings:
//   exact          no injected errors (every result must be exact)
//   bivos          bit errors of voltage-scaled adders on all 24 adders,
//                  bounded geometric p_i with p0 = 0.91, a = 0.001, r = 2
//   rad_384        one radiation strike per calculation on one of the
//                  24 x 16 = 384 full adders, chosen uniformly (p = 1/384 each)
//   rad_192        two strikes per calculation (p = 1/192 per full adder)
//   bivos_rad_384  both
// The absolute error of each result is binned in powers of two (bin b holds
// errors in [2**(b-1), 2**b), bin 0 the exact results) and printed.
module tb_error_distribution;
  import pc_pkg::*;
  localparam int Q = 8, K = 3, NP = 64, NA = 3 * Q, NCALC = 5000, NPX = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] n_pix = 7'(NPX);
  logic busy, blk_rd, done;
  logic [3:0] blk_idx;
  logic [7:0] pix_l [Q], pix_r [Q];
  logic [15:0] mask [NA], mask_bivos [NA];
  logic [15:0] sad;
  logic [15:0] imask [2*Q];
  set_hit_t hit;
  logic bivos_en = 0;
  logic [7:0] win_l [Q], win_r [Q];
  int checks = 0, failures = 0;

  sad_engine dut (
    .clk, .rst_n, .start, .n_pix, .busy, .blk_rd, .blk_idx,
    .pix_l, .pix_r, .err_mask(mask), .inv_mask(imask), .hit, .done, .sad);

  bivos_error_model #(.NA(NA), .W(16)) u_bivos (.clk, .enable(bivos_en), .err_mask(mask_bivos));
  bivos_error_model #(.NA(2*Q), .W(16)) u_bivos_inv (.clk, .enable(bivos_en), .err_mask(imask));

  always #5 clk = ~clk;

  always_comb begin
    for (int j = 0; j < Q; j++) begin
      pix_l[j] = win_l[j];
      pix_r[j] = win_r[j];
    end
    for (int a = 0; a < NA; a++) mask[a] = mask_bivos[a];
  end

  initial begin
    repeat (5 * NCALC * 10 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sad();
    int s = 0;
    for (int i = 0; i < NPX; i++)
      s += (win_l[i] > win_r[i]) ? win_l[i] - win_r[i] : win_r[i] - win_l[i];
    return s;
  endfunction

  function automatic int bin_of(int e);
    int b = 0;
    while (e > 0) begin
      e >>= 1;
      b++;
    end
    return b;
  endfunction

  // strikes: number of radiation strikes during the calculation.
  task automatic campaign(input string name, input bit bivos, input int strikes);
    int hist [17];
    int wrong = 0;
    int hit_cyc [2];
    set_hit_t h [2];
    foreach (hist[b]) hist[b] = 0;
    bivos_en = bivos;
    @(negedge clk);
    for (int c = 0; c < NCALC; c++) begin
      int e, cyc;
      for (int i = 0; i < Q; i++) begin
        win_l[i] = 8'($urandom);
        win_r[i] = 8'($urandom);
      end
      for (int s = 0; s < 2; s++) begin
        int fa = $urandom_range(0, NA * 16 - 1);
        hit_cyc[s] = (s < strikes) ? $urandom_range(0, 5) : -1;
        h[s].valid = 1'b1;
        h[s].adder = 8'(fa / 16);
        h[s].bit_idx = 4'(fa % 16);
        h[s].gate = 4'($urandom_range(1, 9));
        h[s].transistor = 2'($urandom);
        h[s].stages = 3'($urandom);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done && cyc < 20) begin
        hit = '0;
        for (int s = 0; s < 2; s++) if (hit_cyc[s] == cyc) hit = h[s];
        @(negedge clk);
        cyc++;
      end
      hit = '0;
      checks++;
      if (cyc != 1 + K + 2) failures++;
      e = int'(sad) - ref_sad();
      if (e < 0) e = -e;
      if (e != 0) wrong++;
      hist[bin_of(e)]++;
      if (!bivos && strikes == 0) begin
        checks++;
        if (e != 0) failures++;
      end
      @(negedge clk);
    end
    $write("%-14s wrong=%4d/%0d  bins:", name, wrong, NCALC);
    for (int b = 0; b <= 16; b++) $write(" %0d", hist[b]);
    $write("\n");
    checks++;
    if ((bivos || strikes > 0) && wrong == 0) failures++;
    bivos_en = 0;
  endtask

  initial begin
    hit = '0;
    foreach (win_l[i]) begin
      win_l[i] = '0;
      win_r[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    campaign("exact", 0, 0);
    campaign("bivos", 1, 0);
    campaign("rad_384", 0, 1);
    campaign("rad_192", 0, 2);
    campaign("bivos_rad_384", 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
