// tb_disparity_search - 1-D correlator matching with the SAD engine, as in
// the stereo algorithm's matching step: for a left-image 8 x 8 window the
// engine computes the SAD against right-image windows shifted by every
// disparity 0..D-1, and the smallest SAD selects the disparity.
//
// The image pair is synthetic: a random-texture left image and a right image
// that is the left image shifted by a known disparity, so the true match has
// SAD 0. With exact computing every window must recover the true disparity;
// with bit errors of voltage-scaled adders (bounded geometric p_i, p0 = 0.91,
// a = 0.001, r = 2) the number of windows still matched is reported. Windows
// are started back to back (start in the done cycle), 14 cycles each.
module tb_disparity_search;
  import pc_pkg::*;
  localparam int Q = 8, K = 3, NA = 3 * Q, WIN = 8, D = 16, IW = 96, NWIN = 24;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] n_pix = 7'(WIN * WIN);
  logic busy, blk_rd, done;
  logic [3:0] blk_idx;
  logic [7:0] pix_l [Q], pix_r [Q];
  logic [15:0] mask [NA], mask_bivos [NA];
  logic [15:0] sad;
  logic [15:0] imask [2*Q];
  set_hit_t hit;
  logic bivos_en = 0;

  logic [7:0] img_l [WIN][IW], img_r [WIN][IW];
  int x0 = 0, dx = 0;
  int checks = 0, failures = 0;

  sad_engine dut (
    .clk, .rst_n, .start, .n_pix, .busy, .blk_rd, .blk_idx,
    .pix_l, .pix_r, .err_mask(mask), .inv_mask(imask), .hit, .done, .sad);

  bivos_error_model #(.NA(NA), .W(16)) u_bivos (.clk, .enable(bivos_en), .err_mask(mask_bivos));
  bivos_error_model #(.NA(2*Q), .W(16)) u_bivos_inv (.clk, .enable(bivos_en), .err_mask(imask));

  always #5 clk = ~clk;

  // Window buffer: block b of the window is row b, columns x0.. x0+7.
  always_comb begin
    for (int j = 0; j < Q; j++) begin
      pix_l[j] = img_l[int'(blk_idx) % WIN][(x0 + j) % IW];
      pix_r[j] = img_r[int'(blk_idx) % WIN][(x0 + dx + j) % IW];
    end
    for (int a = 0; a < NA; a++) mask[a] = mask_bivos[a];
  end

  initial begin
    repeat (2 * NWIN * D * 16 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Searches all disparities for the window at x; returns the best one.
  task automatic search(input int x, output int best, output int best_sad,
                        output int cycles);
    best = -1;
    best_sad = 1 << 30;
    cycles = 0;
    x0 = x;
    for (int d = 0; d < D; d++) begin
      dx = d;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      if (int'(sad) < best_sad) begin
        best_sad = int'(sad);
        best = d;
      end
      // The next start is given in this done cycle.
    end
    @(negedge clk);
  endtask

  initial begin
    int truth [NWIN];
    int matched_exact = 0, matched_bivos = 0;
    hit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NWIN; w++) truth[w] = $urandom_range(0, D - 1);
    for (int pass = 0; pass < 2; pass++) begin
      bivos_en = (pass == 1);
      for (int w = 0; w < NWIN; w++) begin
        int best, bsad, cyc;
        // New texture for each window; the right image is the left one
        // shifted right by truth[w]: img_r(x + d) = img_l(x).
        for (int y = 0; y < WIN; y++)
          for (int x = 0; x < IW; x++) img_l[y][x] = 8'($urandom);
        for (int y = 0; y < WIN; y++)
          for (int x = 0; x < IW; x++)
            img_r[y][x] = (x >= truth[w]) ? img_l[y][x - truth[w]] : 8'($urandom);
        search(8 + w, best, bsad, cyc);
        if (pass == 0) begin
          checks += 3;
          if (best != truth[w]) begin
            failures++;
            $display("FAIL window %0d: disparity %0d, true %0d", w, best, truth[w]);
          end
          if (bsad != 0) failures++;
          // D windows of MaxCount = ceil(64/8)+3+2 = 13 cycles plus the done
          // cycle, in which the next window starts: 14 cycles each.
          if (cyc != D * 14) begin
            failures++;
            $display("FAIL window %0d took %0d cycles, expected %0d", w, cyc, D * 14);
          end
          if (best == truth[w]) matched_exact++;
        end else if (best == truth[w]) matched_bivos++;
      end
    end
    $display("disparity recovered: exact %0d/%0d, with BIVOS bit errors %0d/%0d",
             matched_exact, NWIN, matched_bivos, NWIN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
