// tb_sad_control - the sequencer for several pixel counts: done comes exactly
// MaxCount = ceil(n/8)+3+2 cycles after start, blocks 0..ceil(n/8)-1 are read
// in order, exactly n lanes are marked valid, and the accumulator is enabled
// ceil(n/8) times, starting K+2 cycles after the start.
module tb_sad_control;
  localparam int Q = 8, K = 3, NPIX = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] n_pix;
  logic busy, blk_rd, pipe_en, acc_clr, acc_en, done;
  logic [3:0] blk_idx;
  logic [Q-1:0] lane_valid;
  int checks = 0, failures = 0;

  sad_control #(.Q(Q), .K(K), .NPIX_MAX(NPIX)) dut (
    .clk, .rst_n, .start, .n_pix, .busy, .blk_rd, .blk_idx, .lane_valid,
    .pipe_en, .acc_clr, .acc_en, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int cyc = 0, reads = 0, lanes = 0, adds = 0, first_add = -1, nb;
    nb = (n + Q - 1) / Q;
    @(negedge clk);
    start = 1; n_pix = 7'(n);
    #1;
    checks++;
    if (!acc_clr) failures++;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 100) begin
      if (blk_rd) begin
        checks++;
        if (int'(blk_idx) != reads) failures++;
        reads++;
        lanes += $countones(lane_valid);
      end
      if (acc_en) begin
        if (first_add < 0) first_add = cyc;
        adds++;
      end
      checks++;
      if (!pipe_en) failures++;
      @(negedge clk);
      cyc++;
    end
    checks += 5;
    if (cyc != nb + K + 2) begin
      failures++;
      $display("FAIL n=%0d done after %0d cycles, MaxCount=%0d", n, cyc, nb + K + 2);
    end
    if (reads != nb) failures++;
    if (lanes != n) failures++;
    if (adds != nb) failures++;
    if (first_add != K + 2) failures++;
    checks++;
    if (pipe_en) failures++;
  endtask

  initial begin
    n_pix = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(64);
    run(1);
    run(13);
    run(8);
    run(63);
    for (int r = 0; r < 20; r++) run($urandom_range(1, 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
