// sad_control - counter-based sequencer of the SAD engine.
//
// On `start` (while idle) it loads n_pix, the number of selected pixels, and
// runs a cycle counter cnt = 0, 1, 2, ... It finishes when the counter reaches
// MaxCount = ceil(n_pix / Q) + K + 2: one cycle per block of Q pixel pairs, K
// cycles through the adder tree, one for the input registers and one for the
// absolute-value registers.
//   blk_rd / blk_idx  : while cnt < ceil(n_pix/Q), block cnt is read into the
//                       input registers; lane_valid marks the lanes of the
//                       block that hold selected pixels (the rest are zeroed).
//   pipe_en           : loads the absolute-value and tree registers. It is
//                       the inverse of the hold signal that loads the result,
//                       so the earlier stages stop when the result is taken.
//   acc_clr / acc_en  : empty the accumulator when starting; add one block
//                       sum in each cycle K+2 .. ceil(n_pix/Q)+K+1.
//   done              : one cycle, cnt == MaxCount; the accumulator then holds
//                       the window's sum. The engine then returns to idle,
//                       unless `start` is high in the done cycle: the next
//                       run then begins at once, without an idle cycle.
// The counter compared with MaxCount (the original equation) and the inverted
// enable of the early stages follow the original architecture; the exact cycle
// at which each enable rises is this design's.
module sad_control #(
  parameter int unsigned Q        = 8,
  parameter int unsigned K        = $clog2(Q),
  parameter int unsigned NPIX_MAX = 64,
  parameter int unsigned NW       = $clog2(NPIX_MAX + 1),
  parameter int unsigned BW       = $clog2((NPIX_MAX + Q - 1) / Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n_pix,       // 1..NPIX_MAX selected pixels
  output logic          busy,
  output logic          blk_rd,
  output logic [BW-1:0] blk_idx,
  output logic [Q-1:0]  lane_valid,
  output logic          pipe_en,
  output logic          acc_clr,
  output logic          acc_en,
  output logic          done
);
  localparam int unsigned CW = $clog2((NPIX_MAX + Q - 1) / Q + K + 3);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t        state;
  logic [CW-1:0] cnt, max_cnt;
  logic [BW-1:0] nblk;
  logic [NW-1:0] npix_r;
  logic          hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      max_cnt <= '0;
      nblk    <= '0;
      npix_r  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_RUN;
          cnt     <= '0;
          npix_r  <= n_pix;
          nblk    <= BW'((32'(n_pix) + Q - 1) / Q);
          max_cnt <= CW'((32'(n_pix) + Q - 1) / Q + K + 2);
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (hold && start) begin
            cnt     <= '0;
            npix_r  <= n_pix;
            nblk    <= BW'((32'(n_pix) + Q - 1) / Q);
            max_cnt <= CW'((32'(n_pix) + Q - 1) / Q + K + 2);
          end else if (hold) begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy    = (state == S_RUN);
    hold    = busy && (cnt == max_cnt);
    done    = hold;
    pipe_en = busy && !hold;
    blk_rd  = busy && (CW'(cnt) < CW'(nblk));
    blk_idx = BW'(cnt);
    acc_clr = start && ((state == S_IDLE) || hold);
    acc_en  = busy && (cnt >= CW'(K + 2)) && (cnt < CW'(nblk) + CW'(K + 2));
    for (int j = 0; j < Q; j++)
      lane_valid[j] = blk_rd && ((32'(cnt) * Q + j) < 32'(npix_r));
  end

  // A run always covers at least one pixel.
  a_npix_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                   acc_clr |-> n_pix != '0);
endmodule
