// tb_sad_engine - end-to-end test of the SAD engine at its default size
// (8 absolute-value units, 3-level tree, 8 x 8 windows, 16-bit adders).
//
// Windows of random 8-bit pixels are matched with random pixel counts; each
// result is compared with a sum of absolute differences computed here, and
// the number of cycles from start to done with ceil(n/8) + 3 + 2. Besides
// exact runs it makes each mechanism happen and counts it:
//   full window, partial last block, restart in the done cycle,
//   an error mask on the accumulating adder's last addition (result XOR mask),
//   radiation strikes too short to reach an output (result exact),
//   radiation strikes that change the result,
//   BIVOS bit errors from the behavioural error model that change the result.
module tb_sad_engine;
  import pc_pkg::*;
  localparam int Q = 8, K = 3, NP = 64, NA = 3 * Q;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] n_pix = '0;
  logic busy, blk_rd, done;
  logic [3:0] blk_idx;
  logic [7:0] pix_l [Q], pix_r [Q];
  logic [15:0] mask [NA], mask_tb [NA], mask_bivos [NA];
  logic [15:0] sad;
  logic [15:0] imask [2*Q], imask_bivos [2*Q];
  set_hit_t hit;
  logic use_bivos = 0, bivos_en = 0;

  logic [7:0] win_l [NP], win_r [NP];
  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0, n_restart = 0, n_mask = 0, n_filtered = 0;
  int n_strike_changed = 0, n_bivos_changed = 0;

  sad_engine dut (
    .clk, .rst_n, .start, .n_pix, .busy, .blk_rd, .blk_idx,
    .pix_l, .pix_r, .err_mask(mask), .inv_mask(imask), .hit, .done, .sad);

  bivos_error_model #(.NA(NA), .W(16)) u_bivos (.clk, .enable(bivos_en), .err_mask(mask_bivos));
  bivos_error_model #(.NA(2*Q), .W(16)) u_bivos_inv (.clk, .enable(bivos_en), .err_mask(imask_bivos));

  always #5 clk = ~clk;

  // Window buffer with combinational read.
  always_comb begin
    for (int j = 0; j < Q; j++) begin
      pix_l[j] = win_l[(int'(blk_idx) * Q + j) % NP];
      pix_r[j] = win_r[(int'(blk_idx) * Q + j) % NP];
    end
    for (int a = 0; a < NA; a++) mask[a] = use_bivos ? mask_bivos[a] : mask_tb[a];
    for (int a = 0; a < 2 * Q; a++) imask[a] = use_bivos ? imask_bivos[a] : '0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_sad(int n);
    int s = 0;
    for (int i = 0; i < n; i++)
      s += (win_l[i] > win_r[i]) ? win_l[i] - win_r[i] : win_r[i] - win_l[i];
    return 16'(s);
  endfunction

  task automatic new_windows();
    for (int i = 0; i < NP; i++) begin
      win_l[i] = 8'($urandom);
      win_r[i] = 8'($urandom);
    end
  endtask

  // One run. mode: 0 exact, 1 accumulator mask on last add, 2 short strikes,
  // 3 random strikes, 4 BIVOS errors. Returns the result. If `restart` the
  // next start is raised in the done cycle.
  task automatic run(input int n, input int mode, input bit restart_next,
                     output logic [15:0] res, output int cycles);
    int nb = (n + Q - 1) / Q;
    // Without a restart, leave the done cycle of the previous run first.
    if (!restart_next) @(negedge clk);
    n_pix = 7'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done && cycles < 200) begin
      foreach (mask_tb[a]) mask_tb[a] = '0;
      hit = '0;
      if (mode == 1 && cycles == nb + K + 1) mask_tb[NA-1] = 16'h0101;
      if (mode == 2) begin
        hit.valid = 1; hit.adder = 8'($urandom_range(0, NA - 1));
        hit.bit_idx = 4'($urandom); hit.gate = 4'($urandom_range(2, 3));
        hit.transistor = 2'($urandom); hit.stages = 3'($urandom_range(0, 3));
      end
      if (mode == 3) begin
        hit.valid = 1'($urandom_range(0, 1)); hit.adder = 8'($urandom_range(0, NA - 1));
        hit.bit_idx = 4'($urandom_range(0, 12)); hit.gate = 4'($urandom_range(1, 9));
        hit.transistor = 2'($urandom); hit.stages = 3'($urandom_range(1, 7));
      end
      @(negedge clk);
      cycles++;
    end
    foreach (mask_tb[a]) mask_tb[a] = '0;
    hit = '0;
    res = sad;
  endtask

  initial begin
    logic [15:0] res, exp;
    int cyc;
    hit = '0;
    foreach (mask_tb[a]) mask_tb[a] = '0;
    new_windows();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Exact runs: full windows, partial blocks, back-to-back restarts.
    for (int r = 0; r < 40; r++) begin
      int n;
      bit rs;
      n  = (r % 4 == 0) ? NP : $urandom_range(1, NP);
      rs = (r % 3 == 2);
      new_windows();
      run(n, 0, rs, res, cyc);
      exp = ref_sad(n);
      checks += 2;
      if (res !== exp) begin
        failures++;
        $display("FAIL exact n=%0d sad=%0d exp=%0d", n, res, exp);
      end
      if (cyc != (n + Q - 1) / Q + K + 2) begin
        failures++;
        $display("FAIL n=%0d took %0d cycles, MaxCount %0d", n, cyc, (n + Q - 1) / Q + K + 2);
      end
      if (n == NP) n_full++;
      if (n % Q != 0) n_partial++;
      if (rs) n_restart++;
    end

    // Error mask on the accumulating adder's last addition.
    for (int r = 0; r < 5; r++) begin
      int n;
      n = $urandom_range(1, NP);
      new_windows();
      run(n, 1, 0, res, cyc);
      checks++;
      if (res !== (ref_sad(n) ^ 16'h0101)) begin
        failures++;
        $display("FAIL mask n=%0d sad=%h exp=%h", n, res, ref_sad(n) ^ 16'h0101);
      end else n_mask++;
    end

    // Strikes on gates 2/3 with pulses of at most 3 stages never reach an
    // output (both are four stages from s and cout).
    for (int r = 0; r < 10; r++) begin
      new_windows();
      run(NP, 2, 0, res, cyc);
      checks++;
      if (res !== ref_sad(NP)) failures++;
      else n_filtered++;
    end

    // Random strikes: count the runs whose result they change.
    for (int r = 0; r < 20; r++) begin
      new_windows();
      run(NP, 3, 0, res, cyc);
      if (res !== ref_sad(NP)) n_strike_changed++;
    end

    // BIVOS bit errors on every adder.
    use_bivos = 1; bivos_en = 1;
    for (int r = 0; r < 10; r++) begin
      new_windows();
      run(NP, 4, 0, res, cyc);
      if (res !== ref_sad(NP)) n_bivos_changed++;
    end
    use_bivos = 0; bivos_en = 0;
    @(negedge clk);

    // Errors switched off again: exact.
    new_windows();
    run(NP, 0, 0, res, cyc);
    checks++;
    if (res !== ref_sad(NP)) failures++;

    $display("mechanisms: full=%0d partial=%0d restart=%0d acc_mask=%0d filtered_strike=%0d strike_changed=%0d bivos_changed=%0d",
             n_full, n_partial, n_restart, n_mask, n_filtered, n_strike_changed, n_bivos_changed);
    checks += 7;
    if (n_full == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_restart == 0) failures++;
    if (n_mask == 0) failures++;
    if (n_filtered == 0) failures++;
    if (n_strike_changed == 0) failures++;
    if (n_bivos_changed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
