// agc_decoder: digital decoder of the automatic gain control (Moore machine).
//
// The AGC keeps the ADC input near its best-SNR level by choosing which
// capacitors of the PGA's bank (Cg plus 3Cg on S3, 4.5Cg on S5, 6Cg on S4)
// are connected. A peak detector and a two-level voltage detector report the
// amplified signal: vo1 = peak above the lower level, vo2 = peak above the
// upper level. The decoder starts at the smallest bank (gain code 0) and,
// after waiting SETTLE_CYCLES for the peak detector to see at least one
// beat, steps the gain up while the peak is below range. It stops when the
// peak is in range, or steps back one code and stops on overshoot, or stops
// at the largest bank. Then S1 goes high: the AGC is isolated (powered down)
// and the ADC is powered up, so the ADC never runs during gain search.
// That structure (peak detector, range detector, Moore decoder, isolation
// and ADC enable via S1) follows the acquisition scheme this design
// implements; the eight-step ordering of the switch sets, the search order
// and the settling time are this design's choices.
//
// Interface: start (one clock, the RST/START button) restarts the search.
// vo1/vo2 are asynchronous and are synchronised with two flip-flops. All
// outputs are registered and depend on the state only. With SETTLE_CYCLES
// = 1.5 M at 1 MHz, a search of n steps takes about n*1.5 s.
module agc_decoder
  import ecg_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 1_500_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       vo1,
  input  logic       vo2,
  output logic [2:0] gain_code,
  output cap_sw_t    sw,
  output logic       s1
);
  localparam int unsigned CW = $clog2(SETTLE_CYCLES + 1);

  typedef enum logic [1:0] {S_SETTLE, S_DECIDE, S_DONE} state_e;
  state_e state;

  logic [1:0]    sync1, sync2;
  logic          lvl_lo, lvl_hi;
  logic [CW-1:0] wait_cnt;

  assign lvl_lo = sync2[0];
  assign lvl_hi = sync2[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= {vo2, vo1};
      sync2 <= sync1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SETTLE;
      gain_code <= '0;
      wait_cnt  <= '0;
    end else if (start) begin
      state     <= S_SETTLE;
      gain_code <= '0;
      wait_cnt  <= '0;
    end else begin
      unique case (state)
        S_SETTLE: begin
          if (wait_cnt == CW'(SETTLE_CYCLES - 1)) begin
            wait_cnt <= '0;
            state    <= S_DECIDE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_DECIDE: begin
          if (lvl_hi) begin
            if (gain_code != 3'd0) gain_code <= gain_code - 1'b1;
            state <= S_DONE;
          end else if (lvl_lo || gain_code == 3'd7) begin
            state <= S_DONE;
          end else begin
            gain_code <= gain_code + 1'b1;
            state     <= S_SETTLE;
          end
        end
        S_DONE:  state <= S_DONE;
        default: state <= S_SETTLE;
      endcase
    end
  end

  assign sw = gain_switches(gain_code);
  assign s1 = (state == S_DONE);
endmodule
