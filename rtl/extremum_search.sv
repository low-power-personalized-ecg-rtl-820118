// extremum_search: sequential max / min / largest-magnitude search over a
// range of a memory.
//
// Every search of the boundary-detection and feature-extraction steps (the
// sub-frame maxima and the minimum near a maximum in cD_L3, the R, Q, S, P
// and T peaks in the ECG samples, the cD_L5 extrema) is one call of this
// engine, so one comparator per unit serves them all.
//
// Interface: a one-clock start with mode, lo and hi (inclusive, hi < lo is
// treated as hi = lo). From the next clock the engine drives rd_addr = lo,
// lo+1, ... hi, one
// per clock, and expects rd_data one clock after each address (synchronous
// RAM). done is registered after the last data word, so it is seen k+2
// clock edges after the start edge for k words. best_idx/best_val hold the result
// until the next start. On ties the lowest index wins. A start while busy
// restarts the search.
module extremum_search
  import ecg_pkg::*;
#(
  parameter int unsigned AW     = ADDR_W,
  parameter int unsigned DATA_W = CD5_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  search_mode_e             mode,
  input  logic [AW-1:0]            lo,
  input  logic [AW-1:0]            hi,
  output logic [AW-1:0]            rd_addr,
  input  logic signed [DATA_W-1:0] rd_data,
  output logic                     busy,
  output logic                     done,
  output logic [AW-1:0]            best_idx,
  output logic signed [DATA_W-1:0] best_val
);
  logic          issuing;     // an address is being presented this clock
  logic [AW-1:0] hi_r;
  logic          pend;        // rd_data carries the word at pend_idx
  logic [AW-1:0] pend_idx;
  logic          have;        // best_* holds a word of this search
  search_mode_e  mode_r;

  // magnitude with one extra bit so the most negative value fits
  function automatic logic [DATA_W:0] mag(input logic signed [DATA_W-1:0] v);
    return v[DATA_W-1] ? (DATA_W+1)'(-(DATA_W+1)'(v)) : (DATA_W+1)'(v);
  endfunction

  logic better;
  always_comb begin
    unique case (mode_r)
      SRCH_MAX:    better = rd_data > best_val;
      SRCH_MIN:    better = rd_data < best_val;
      default:     better = mag(rd_data) > mag(best_val);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      rd_addr  <= '0;
      hi_r     <= '0;
      pend     <= 1'b0;
      pend_idx <= '0;
      have     <= 1'b0;
      mode_r   <= SRCH_MAX;
      done     <= 1'b0;
      best_idx <= '0;
      best_val <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        issuing <= 1'b1;
        rd_addr <= lo;
        hi_r    <= (hi < lo) ? lo : hi;
        pend    <= 1'b0;
        have    <= 1'b0;
        mode_r  <= mode;
      end else begin
        pend     <= issuing;
        pend_idx <= rd_addr;
        if (issuing) begin
          if (rd_addr == hi_r) issuing <= 1'b0;
          else                 rd_addr <= rd_addr + 1'b1;
        end
        if (pend) begin
          if (!have || better) begin
            best_idx <= pend_idx;
            best_val <= rd_data;
          end
          have <= 1'b1;
          if (pend_idx == hi_r) done <= 1'b1;
        end
      end
    end
  end

  assign busy = issuing || pend;
endmodule
