// Control: trial-frequency search followed by turbo synchronization.
//
// After start (a burst has been written into the Sym RAM) the controller
//   1. steps through the grid of n_trials trial frequencies
//      f_i = f_start + i * f_step. For each it lets Pre correlate the unique
//      words (Eq. 8). A trial whose correlation magnitude is below the
//      threshold is excluded at once (Eq. 12). Otherwise Pre corrects the
//      burst with f_i and the estimated phase and writes the channel LLRs,
//      the MAP decoder runs trial_iters full iterations (two half iterations
//      each), and Post correlates the burst with the soft symbol estimate
//      (Eq. 10). The trial with the largest correlation magnitude is kept
//      (Eq. 11);
//   2. starts turbo synchronization from the best trial: for each of
//      max_iters full decoder iterations Post measures the residual
//      frequency and phase from the newest APP LLRs (Eqs. 3-5), f and phi are
//      updated, and Pre writes freshly corrected LLRs for the next iteration
//      while the extrinsic information of the decoder is kept.
// done pulses at the end; found says whether any trial passed the threshold,
// f_est / phi_est / best_idx hold the result. The page selects of the three
// double-buffered memories are swapped whenever a producer has finished a
// page for its consumer. The units run one after the other here: the
// pipelined overlap of Pre, MAP and Post on different trials that the
// double buffering allows is not exploited. Counters report how many trials
// were excluded and accepted and how often the best trial changed.
module ctrl_unit
  import ts_pkg::*;
#(
  parameter int NT_W = 8,     // trial counter width (61 trials)
  parameter int IT_W = 4      // iteration counter width (8 iterations)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [NT_W-1:0]          n_trials,
  input  logic signed [FREQ_W-1:0] f_start,
  input  logic signed [FREQ_W-1:0] f_step,
  input  logic [IT_W-1:0]          trial_iters,
  input  logic [IT_W-1:0]          max_iters,
  // Pre
  output logic                     pre_cmd_uw,
  output logic                     pre_cmd_corr,
  output logic signed [FREQ_W-1:0] pre_freq,
  output logic        [PH_W-1:0]   pre_phase,
  input  logic                     pre_done,
  input  logic                     pre_accept,
  input  logic        [PH_W-1:0]   pre_phase_est,
  // MAP
  output logic                     map_start,
  output logic                     map_half,
  output logic                     map_first,
  input  logic                     map_done,
  // Post
  output logic                     post_cmd,
  input  logic                     post_done,
  input  logic [32:0]              post_c_mag,
  input  logic signed [FREQ_W-1:0] post_dfreq,
  input  logic        [PH_W-1:0]   post_dphase,
  // page selects of the double-buffered memories (read pages; write = ~read)
  output logic                     sym_rpage,
  output logic                     llrin_rpage,
  output logic                     llrout_rpage,
  // status and results
  output logic                     busy,
  output logic                     done,
  output logic                     found,
  output logic [NT_W-1:0]          best_idx,
  output logic signed [FREQ_W-1:0] f_est,
  output logic        [PH_W-1:0]   phi_est,
  output logic [NT_W-1:0]          n_excluded,
  output logic [NT_W-1:0]          n_accepted,
  output logic [NT_W-1:0]          n_best_upd
);
  typedef enum logic [3:0] {
    C_IDLE, C_UW, C_UW_W, C_CORR, C_CORR_W, C_MAP, C_MAP_W, C_POST, C_POST_W,
    C_NEXT, C_DONE
  } cstate_e;

  cstate_e            st;
  logic               ts;          // 1: turbo synchronization phase
  logic [NT_W-1:0]    idx;
  logic [IT_W-1:0]    it;
  logic               half;
  logic               first_it;
  logic signed [FREQ_W-1:0] f_cur;
  logic        [PH_W-1:0]   ph_cur;
  logic [32:0]        best_mag;

  assign pre_freq  = f_cur;
  assign pre_phase = ph_cur;
  assign map_half  = half;
  assign map_first = first_it && !half;
  assign busy      = st != C_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; ts <= 1'b0; idx <= '0; it <= '0; half <= 1'b0;
      first_it <= 1'b0; f_cur <= '0; ph_cur <= '0; best_mag <= '0;
      pre_cmd_uw <= 1'b0; pre_cmd_corr <= 1'b0; map_start <= 1'b0;
      post_cmd <= 1'b0; sym_rpage <= 1'b0; llrin_rpage <= 1'b0;
      llrout_rpage <= 1'b0; done <= 1'b0; found <= 1'b0; best_idx <= '0;
      f_est <= '0; phi_est <= '0; n_excluded <= '0; n_accepted <= '0;
      n_best_upd <= '0;
    end else begin
      pre_cmd_uw   <= 1'b0;
      pre_cmd_corr <= 1'b0;
      map_start    <= 1'b0;
      post_cmd     <= 1'b0;
      done         <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          sym_rpage  <= ~sym_rpage;     // the page just written becomes read page
          ts         <= 1'b0;
          idx        <= '0;
          f_cur      <= f_start;
          best_mag   <= '0;
          found      <= 1'b0;
          n_excluded <= '0;
          n_accepted <= '0;
          n_best_upd <= '0;
          st         <= (n_trials == 0) ? C_DONE : C_UW;
        end
        C_UW: begin
          pre_cmd_uw <= 1'b1;
          st         <= C_UW_W;
        end
        C_UW_W: if (pre_done) begin
          if (pre_accept) begin
            ph_cur     <= pre_phase_est;
            n_accepted <= n_accepted + 1'b1;
            st         <= C_CORR;
          end else begin
            n_excluded <= n_excluded + 1'b1;
            st         <= C_NEXT;
          end
          it       <= '0;
          half     <= 1'b0;
          first_it <= 1'b1;
        end
        C_CORR: begin
          pre_cmd_corr <= 1'b1;
          st           <= C_CORR_W;
        end
        C_CORR_W: if (pre_done) begin
          llrin_rpage <= ~llrin_rpage;
          st          <= C_MAP;
        end
        C_MAP: begin
          map_start <= 1'b1;
          st        <= C_MAP_W;
        end
        C_MAP_W: if (map_done) begin
          half <= ~half;
          if (!half) st <= C_MAP;
          else begin
            it           <= it + 1'b1;
            first_it     <= 1'b0;
            if (ts || it + 1'b1 == trial_iters) begin
              llrout_rpage <= ~llrout_rpage;
              st           <= C_POST;
            end else st <= C_MAP;
          end
        end
        C_POST: begin
          post_cmd <= 1'b1;
          st       <= C_POST_W;
        end
        C_POST_W: if (post_done) begin
          if (!ts) begin
            if (post_c_mag > best_mag) begin
              best_mag   <= post_c_mag;
              best_idx   <= idx;
              f_est      <= f_cur;
              phi_est    <= ph_cur;
              found      <= 1'b1;
              n_best_upd <= n_best_upd + 1'b1;
            end
            st <= C_NEXT;
          end else begin
            f_cur   <= f_cur + post_dfreq;
            ph_cur  <= ph_cur + post_dphase;
            f_est   <= f_cur + post_dfreq;
            phi_est <= ph_cur + post_dphase;
            if (it == max_iters) st <= C_DONE;
            else                 st <= C_CORR;
          end
        end
        C_NEXT: begin
          if (idx + 1'b1 == n_trials) begin
            if (found) begin             // start turbo synchronization
              ts       <= 1'b1;
              f_cur    <= f_est;
              ph_cur   <= phi_est;
              it       <= '0;
              half     <= 1'b0;
              first_it <= 1'b1;
              st       <= (max_iters == 0) ? C_DONE : C_CORR;
            end else st <= C_DONE;
          end else begin
            idx   <= idx + 1'b1;
            f_cur <= f_cur + f_step;
            st    <= C_UW;
          end
        end
        C_DONE: begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
