// bd_unit: on-the-fly boundary detection of the heart beats in one frame.
//
// Works on a frame already in memory: N ECG samples and their N/8 level-3
// Haar detail coefficients (cD_L3). Steps, one after the other:
//  1. Sub-frames: cD_L3 is cut into N/1024 sub-frames (4 of 128 for N=4096);
//     the maximum of each is found and min_4, the smallest of these maxima,
//     is kept. Every sub-frame holds at least one beat at 1 kHz sampling.
//  2. Threshold Th = 60 % of min_4, formed as (min_4 * 154) >>> 8.
//  3. Comparator: comp_mem[i] = (cD_L3[i] > Th) for all i, a 1-bit memory.
//  4. Candidate scan: only the last 1 of each run of 1s is a candidate.
//     Candidates closer than MIN_GAP+1 (50 coefficients = 400 samples, the
//     shortest R-R interval at 1 kHz) collapse onto the later one; the
//     survivors (at most MAX_PEAKS) are the beat maxima. Pairs that the
//     sub-frame maxima miss are found here too.
//  5. For each maximum t: the minimum of cD_L3 within t+-MIN_WIN gives the
//     pair (t1, t2); the R-peak is the sample of largest magnitude between
//     t1*8 and t2*8 (the pair projected back to the ECG by a 3-bit shift).
//  6. Boundaries are the midpoints of consecutive R-peaks. The first is
//     R0 - (R1-R0)/2 and the last R_end + (R_end - R_end-1)/2 when these fall
//     inside the frame; otherwise 0 / N-1 with first_valid / last_valid low.
// The method, its constants and the memories follow the boundary-detection
// method this design implements; the 154/256 threshold constant, tie rules
// and the overflow / too_few flags are this design's choices.
//
// Interface: start (one clock) runs the whole procedure; done pulses when res
// is complete; busy is high in between. The unit reads cD_L3 through
// cd3_raddr/cd3_rdata and the ECG through ecg_raddr/ecg_rdata, both with one
// clock of read latency. About 2*N/8 + N/8 + 150 + 35 per peak clocks.
module bd_unit
  import ecg_pkg::*;
#(
  parameter int unsigned N              = N_FRAME,
  parameter int unsigned SAMPLES_PER_SF = 1024,
  parameter int unsigned TH_PERCENT     = 60,
  parameter int unsigned MIN_GAP        = 50,
  parameter int unsigned MIN_WIN        = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [CD3_AW-1:0]       cd3_raddr,
  input  logic signed [CD3_W-1:0] cd3_rdata,
  output logic [ADDR_W-1:0]       ecg_raddr,
  input  logic signed [ECG_W-1:0] ecg_rdata,
  output bd_result_t              res,
  output logic signed [CD3_W-1:0] min4,
  output logic signed [CD3_W-1:0] threshold
);
  localparam int unsigned N3     = N / 8;
  localparam int unsigned N_SF   = N / SAMPLES_PER_SF;
  localparam int unsigned SF_LEN = N3 / N_SF;
  localparam int unsigned TH_Q8  = (TH_PERCENT * 256 + 50) / 100;
  localparam int unsigned SF_W   = $clog2(N_SF + 1);

  initial assert (N <= N_FRAME && N % SAMPLES_PER_SF == 0)
    else $error("bd_unit: unsupported frame length %0d", N);

  typedef enum logic [3:0] {
    S_IDLE, S_SF_GO, S_SF_WAIT, S_TH, S_CMP, S_CAND, S_FLUSH,
    S_PK_CHK, S_MIN_WAIT, S_R_WAIT, S_BOUND, S_DONE
  } state_e;
  state_e state;

  // ---- shared search engine ----
  logic                    s_start, s_done, s_busy;
  search_mode_e            s_mode;
  logic [ADDR_W-1:0]       s_lo, s_hi, s_addr, s_idx;
  logic signed [CD3_W-1:0] s_data, s_val;
  logic                    src_ecg;

  assign s_data = src_ecg ? CD3_W'(ecg_rdata) : cd3_rdata;

  extremum_search #(.AW(ADDR_W), .DATA_W(CD3_W)) u_search (
    .clk, .rst_n, .start(s_start), .mode(s_mode), .lo(s_lo), .hi(s_hi),
    .rd_addr(s_addr), .rd_data(s_data), .busy(s_busy), .done(s_done),
    .best_idx(s_idx), .best_val(s_val));

  // ---- comparator pass and candidate scan ----
  logic [N3-1:0]     comp_mem;
  logic [CD3_AW-1:0] cmp_addr, cmp_pidx;
  logic              cmp_issue, cmp_pend;
  logic [CD3_AW-1:0] ci;                 // candidate scan index
  logic [CD3_AW-1:0] pend_c;             // pending candidate
  logic              have_c;
  logic [CD3_AW-1:0] store [MAX_PEAKS];  // store_index memory
  logic [NPK_W-1:0]  n_store;
  logic [NPK_W-1:0]  k;
  logic [SF_W-1:0]   sf;

  assign cd3_raddr = (state == S_CMP) ? cmp_addr : s_addr[CD3_AW-1:0];
  assign ecg_raddr = s_addr;

  logic cand;
  assign cand = comp_mem[ci] && ((ci == CD3_AW'(N3 - 1)) || !comp_mem[ci + 1'b1]);

  logic signed [CD3_W+9:0] th_prod;
  assign th_prod = min4 * $signed({1'b0, 9'(TH_Q8)});

  // current peak's window for the minimum search
  logic [CD3_AW-1:0] tk, win_lo, win_hi;
  assign tk     = store[k];
  assign win_lo = (tk >= CD3_AW'(MIN_WIN)) ? tk - CD3_AW'(MIN_WIN) : '0;
  assign win_hi = ({1'b0, tk} + (CD3_AW+1)'(MIN_WIN) > (CD3_AW+1)'(N3 - 1))
                  ? CD3_AW'(N3 - 1) : tk + CD3_AW'(MIN_WIN);

  logic [CD3_AW-1:0] pair_lo, pair_hi;
  assign pair_lo = (s_idx[CD3_AW-1:0] < tk) ? s_idx[CD3_AW-1:0] : tk;
  assign pair_hi = (s_idx[CD3_AW-1:0] < tk) ? tk : s_idx[CD3_AW-1:0];

  task automatic push_peak(input logic [CD3_AW-1:0] v, input logic [NPK_W-1:0] n);
    if (n < NPK_W'(MAX_PEAKS)) begin
      store[n] <= v;
      n_store  <= n + 1'b1;
    end else begin
      res.overflow <= 1'b1;
    end
  endtask

  // boundary arithmetic (one clock, in S_BOUND)
  logic [ADDR_W:0] half0, half_l, room_l;
  logic [ADDR_W-1:0] r_first, r_second, r_last, r_prev;
  always_comb begin
    r_first  = res.r_idx[0];
    r_second = res.r_idx[1];
    r_last   = res.r_idx[n_store - 1'b1];
    r_prev   = res.r_idx[n_store - 2'd2];
    half0    = (ADDR_W+1)'(r_second - r_first) >> 1;
    half_l   = (ADDR_W+1)'(r_last - r_prev) >> 1;
    room_l   = (ADDR_W+1)'(N - 1) - (ADDR_W+1)'(r_last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      s_start   <= 1'b0;
      s_mode    <= SRCH_MAX;
      s_lo      <= '0;
      s_hi      <= '0;
      src_ecg   <= 1'b0;
      sf        <= '0;
      min4      <= '0;
      threshold <= '0;
      cmp_addr  <= '0;
      cmp_pidx  <= '0;
      cmp_issue <= 1'b0;
      cmp_pend  <= 1'b0;
      comp_mem  <= '0;
      ci        <= '0;
      pend_c    <= '0;
      have_c    <= 1'b0;
      n_store   <= '0;
      k         <= '0;
      res       <= '0;
      for (int j = 0; j < MAX_PEAKS; j++) store[j] <= '0;
    end else begin
      done    <= 1'b0;
      s_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sf      <= '0;
          res     <= '0;
          n_store <= '0;
          state   <= S_SF_GO;
        end
        // 1. maximum of each sub-frame, keep the smallest
        S_SF_GO: begin
          s_start <= 1'b1;
          s_mode  <= SRCH_MAX;
          src_ecg <= 1'b0;
          s_lo    <= ADDR_W'(sf * SF_LEN);
          s_hi    <= ADDR_W'(sf * SF_LEN + SF_LEN - 1);
          state   <= S_SF_WAIT;
        end
        S_SF_WAIT: if (s_done) begin
          if (sf == '0 || s_val < min4) min4 <= s_val;
          if (sf == SF_W'(N_SF - 1)) state <= S_TH;
          else begin
            sf    <= sf + 1'b1;
            state <= S_SF_GO;
          end
        end
        // 2. threshold
        S_TH: begin
          threshold <= CD3_W'(th_prod >>> 8);
          cmp_addr  <= '0;
          cmp_issue <= 1'b1;
          cmp_pend  <= 1'b0;
          state     <= S_CMP;
        end
        // 3. comparator into comp_mem
        S_CMP: begin
          cmp_pend <= cmp_issue;
          cmp_pidx <= cmp_addr;
          if (cmp_issue) begin
            if (cmp_addr == CD3_AW'(N3 - 1)) cmp_issue <= 1'b0;
            else                             cmp_addr  <= cmp_addr + 1'b1;
          end
          if (cmp_pend) begin
            comp_mem[cmp_pidx] <= (cd3_rdata > threshold);
            if (cmp_pidx == CD3_AW'(N3 - 1)) begin
              ci     <= '0;
              have_c <= 1'b0;
              state  <= S_CAND;
            end
          end
        end
        // 4. candidate scan with the minimum-gap rule
        S_CAND: begin
          if (cand) begin
            if (have_c && (ci - pend_c > CD3_AW'(MIN_GAP))) push_peak(pend_c, n_store);
            pend_c <= ci;
            have_c <= 1'b1;
          end
          if (ci == CD3_AW'(N3 - 1)) state <= S_FLUSH;
          else                       ci    <= ci + 1'b1;
        end
        S_FLUSH: begin
          if (have_c) push_peak(pend_c, n_store);
          k     <= '0;
          state <= S_PK_CHK;
        end
        // 5. minimum near each maximum, then the R-peak in the ECG
        S_PK_CHK: begin
          if (k == n_store) state <= S_BOUND;
          else begin
            s_start <= 1'b1;
            s_mode  <= SRCH_MIN;
            src_ecg <= 1'b0;
            s_lo    <= ADDR_W'(win_lo);
            s_hi    <= ADDR_W'(win_hi);
            state   <= S_MIN_WAIT;
          end
        end
        S_MIN_WAIT: if (s_done) begin
          res.t1[k] <= pair_lo;
          res.t2[k] <= pair_hi;
          s_start   <= 1'b1;
          s_mode    <= SRCH_ABSMAX;
          src_ecg   <= 1'b1;
          s_lo      <= {pair_lo, 3'b000};
          s_hi      <= {pair_hi, 3'b000};
          state     <= S_R_WAIT;
        end
        S_R_WAIT: if (s_done) begin
          res.r_idx[k] <= s_idx;
          res.r_val[k] <= ECG_W'(s_val);
          k            <= k + 1'b1;
          state        <= S_PK_CHK;
        end
        // 6. boundaries
        S_BOUND: begin
          res.n_peaks <= n_store;
          if (n_store < 2) begin
            res.too_few <= 1'b1;
          end else begin
            for (int j = 1; j < MAX_PEAKS; j++)
              if (NPK_W'(j) < n_store)
                res.bound[j] <= ADDR_W'(((ADDR_W+1)'(res.r_idx[j-1]) +
                                         (ADDR_W+1)'(res.r_idx[j])) >> 1);
            if ((ADDR_W+1)'(r_first) >= half0) begin
              res.bound[0]    <= ADDR_W'((ADDR_W+1)'(r_first) - half0);
              res.first_valid <= 1'b1;
            end else begin
              res.bound[0]    <= '0;
              res.first_valid <= 1'b0;
            end
            if (room_l >= half_l) begin
              res.bound[n_store] <= ADDR_W'((ADDR_W+1)'(r_last) + half_l);
              res.last_valid     <= 1'b1;
            end else begin
              res.bound[n_store] <= ADDR_W'(N - 1);
              res.last_valid     <= 1'b0;
            end
          end
          state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  logic unused;
  assign unused = s_busy;
endmodule
