// fe_unit: feature extraction for every beat found by boundary detection.
//
// For beat k (R-peak R, boundaries B_k and B_k+1, cD_L3 max/min pair t1<t2):
//   QRS_on  = t1 - QRS_EXT, QRS_off = t2 + QRS_EXT   (cD_L3 index, clipped)
//   Q = argmin ECG[QRS_on*8 .. R]   if ECG[R] >= 0, else argmax
//   S = argmin ECG[R .. QRS_off*8]  if ECG[R] >= 0, else argmax
//   P: x1 = argmax, x2 = argmin of cD_L5 over [B_k/32 .. QRS_on/4];
//      P_on = min(x1,x2)*32, P_off = max(x1,x2)*32,
//      P peak = largest |ECG| between P_on and P_off
//   T: the same over cD_L5 [QRS_off/4 .. B_k+1/32]
// All multiplications and divisions by powers of two are wiring (appended or
// dropped bits), and the order of x1/x2 needs no case analysis because the
// projected range is simply scanned from the smaller to the larger index.
// The Q/S sign rule, the /4 mapping from level 3 to level 5 and the x32
// projection follow the feature-extraction method this design implements.
// How QRS_on/QRS_off are found is not part of that method's description: here
// they are the boundary-detection pair widened by QRS_EXT coefficients (this
// design's choice), and the P/T windows are limited to the beat's own
// boundaries.
//
// Interface: start (one clock) with bd holding a complete boundary result.
// One feat record per beat is emitted with a one-clock feat_valid, in beat
// order; done pulses after the last. Memory reads (ECG and cD_L5) have one
// clock of latency. Each beat takes about 8 searches, i.e. roughly
// (QRS width + P/T window lengths) + 40 clocks.
module fe_unit
  import ecg_pkg::*;
#(
  parameter int unsigned N       = N_FRAME,
  parameter int unsigned QRS_EXT = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  bd_result_t              bd,
  output logic                    busy,
  output logic                    done,
  output logic [ADDR_W-1:0]       ecg_raddr,
  input  logic signed [ECG_W-1:0] ecg_rdata,
  output logic [CD5_AW-1:0]       cd5_raddr,
  input  logic signed [CD5_W-1:0] cd5_rdata,
  output logic                    feat_valid,
  output feat_t                   feat
);
  localparam int unsigned N3 = N / 8;

  typedef enum logic [3:0] {
    S_IDLE, S_BEAT, S_Q, S_S, S_PMAX, S_PMIN, S_PPK, S_TMAX, S_TMIN, S_TPK,
    S_EMIT, S_DONE
  } state_e;
  state_e state;

  // ---- shared search engine ----
  logic                    s_start, s_done, s_busy;
  search_mode_e            s_mode;
  logic [ADDR_W-1:0]       s_lo, s_hi, s_addr, s_idx;
  logic signed [CD5_W-1:0] s_data, s_val;
  logic                    src_ecg;

  assign s_data    = src_ecg ? CD5_W'(ecg_rdata) : cd5_rdata;
  assign ecg_raddr = s_addr;
  assign cd5_raddr = s_addr[CD5_AW-1:0];

  extremum_search #(.AW(ADDR_W), .DATA_W(CD5_W)) u_search (
    .clk, .rst_n, .start(s_start), .mode(s_mode), .lo(s_lo), .hi(s_hi),
    .rd_addr(s_addr), .rd_data(s_data), .busy(s_busy), .done(s_done),
    .best_idx(s_idx), .best_val(s_val));

  logic [NPK_W-1:0]  k;
  logic [CD3_AW-1:0] qon, qoff;      // QRS on/off, cD_L3 index
  logic              r_pos;
  logic [CD5_AW-1:0] x1;             // cD_L5 index of the window maximum
  logic [CD5_AW-1:0] win_lo, win_hi; // cD_L5 window of the current P/T search

  // QRS window of beat k
  logic [CD3_AW-1:0] t1k, t2k, qon_c, qoff_c;
  assign t1k    = bd.t1[k];
  assign t2k    = bd.t2[k];
  assign qon_c  = (t1k >= CD3_AW'(QRS_EXT)) ? t1k - CD3_AW'(QRS_EXT) : '0;
  assign qoff_c = ({1'b0, t2k} + (CD3_AW+1)'(QRS_EXT) > (CD3_AW+1)'(N3 - 1))
                  ? CD3_AW'(N3 - 1) : t2k + CD3_AW'(QRS_EXT);

  // P window [B_k/32 .. QRS_on/4], T window [QRS_off/4 .. B_k+1/32]
  logic [CD5_AW-1:0] p_lo_c, p_hi_c, t_lo_c, t_hi_c, bstart5, bend5;
  assign bstart5 = bd.bound[k][ADDR_W-1:5];
  assign bend5   = bd.bound[k + 1'b1][ADDR_W-1:5];
  assign p_hi_c  = qon[CD3_AW-1:2];
  assign p_lo_c  = (bstart5 < p_hi_c) ? bstart5 : p_hi_c;
  assign t_lo_c  = qoff[CD3_AW-1:2];
  assign t_hi_c  = (bend5 > t_lo_c) ? bend5 : t_lo_c;

  // projected P/T range from the two cD_L5 extrema
  logic [CD5_AW-1:0] x2, xlo, xhi;
  assign x2  = s_idx[CD5_AW-1:0];
  assign xlo = (x1 < x2) ? x1 : x2;
  assign xhi = (x1 < x2) ? x2 : x1;

  task automatic launch(input search_mode_e m, input logic from_ecg,
                        input logic [ADDR_W-1:0] lo, input logic [ADDR_W-1:0] hi);
    s_start <= 1'b1;
    s_mode  <= m;
    src_ecg <= from_ecg;
    s_lo    <= lo;
    s_hi    <= hi;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      feat_valid <= 1'b0;
      feat       <= '0;
      s_start    <= 1'b0;
      s_mode     <= SRCH_MAX;
      s_lo       <= '0;
      s_hi       <= '0;
      src_ecg    <= 1'b0;
      k          <= '0;
      qon        <= '0;
      qoff       <= '0;
      r_pos      <= 1'b0;
      x1         <= '0;
      win_lo     <= '0;
      win_hi     <= '0;
    end else begin
      done       <= 1'b0;
      feat_valid <= 1'b0;
      s_start    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k     <= '0;
          state <= (bd.too_few || bd.n_peaks == '0) ? S_DONE : S_BEAT;
        end
        S_BEAT: begin
          qon          <= qon_c;
          qoff         <= qoff_c;
          r_pos        <= !bd.r_val[k][ECG_W-1];
          feat         <= '0;
          feat.beat    <= k;
          feat.b_start <= bd.bound[k];
          feat.b_end   <= bd.bound[k + 1'b1];
          feat.r_idx   <= bd.r_idx[k];
          feat.r_val   <= bd.r_val[k];
          feat.qrs_on  <= {qon_c, 3'b000};
          feat.qrs_off <= {qoff_c, 3'b000};
          launch(bd.r_val[k][ECG_W-1] ? SRCH_MAX : SRCH_MIN, 1'b1,
                 {qon_c, 3'b000}, bd.r_idx[k]);
          state <= S_Q;
        end
        S_Q: if (s_done) begin
          feat.q_idx <= s_idx;
          launch(r_pos ? SRCH_MIN : SRCH_MAX, 1'b1, feat.r_idx, {qoff, 3'b000});
          state <= S_S;
        end
        S_S: if (s_done) begin
          feat.s_idx <= s_idx;
          win_lo     <= p_lo_c;
          win_hi     <= p_hi_c;
          launch(SRCH_MAX, 1'b0, ADDR_W'(p_lo_c), ADDR_W'(p_hi_c));
          state <= S_PMAX;
        end
        S_PMAX: if (s_done) begin
          x1 <= s_idx[CD5_AW-1:0];
          launch(SRCH_MIN, 1'b0, ADDR_W'(win_lo), ADDR_W'(win_hi));
          state <= S_PMIN;
        end
        S_PMIN: if (s_done) begin
          feat.p_on  <= {xlo, 5'b00000};
          feat.p_off <= {xhi, 5'b00000};
          launch(SRCH_ABSMAX, 1'b1, {xlo, 5'b00000}, {xhi, 5'b00000});
          state <= S_PPK;
        end
        S_PPK: if (s_done) begin
          feat.p_peak <= s_idx;
          win_lo      <= t_lo_c;
          win_hi      <= t_hi_c;
          launch(SRCH_MAX, 1'b0, ADDR_W'(t_lo_c), ADDR_W'(t_hi_c));
          state <= S_TMAX;
        end
        S_TMAX: if (s_done) begin
          x1 <= s_idx[CD5_AW-1:0];
          launch(SRCH_MIN, 1'b0, ADDR_W'(win_lo), ADDR_W'(win_hi));
          state <= S_TMIN;
        end
        S_TMIN: if (s_done) begin
          feat.t_on  <= {xlo, 5'b00000};
          feat.t_off <= {xhi, 5'b00000};
          launch(SRCH_ABSMAX, 1'b1, {xlo, 5'b00000}, {xhi, 5'b00000});
          state <= S_TPK;
        end
        S_TPK: if (s_done) begin
          feat.t_peak <= s_idx;
          state       <= S_EMIT;
        end
        S_EMIT: begin
          feat_valid <= 1'b1;
          k          <= k + 1'b1;
          state      <= (k + 1'b1 == bd.n_peaks) ? S_DONE : S_BEAT;
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
  assign unused = ^{s_busy, s_val};
endmodule
