// dropoff_detector: coarse timing from the point where the short-preamble correlation ends.
//
// The lag-16 correlation stays above half the received power for as long as the periodic short
// training symbols last and falls away in the guard interval before the long symbols. A counter
// starts when the packet detector asserts pd and advances once per sample while the comparator
// decision (metric: |R|^2 above half of P^2, the same threshold as detection) stays set. The first
// sample with the decision clear ends the count: the count is the coarse timing offset in samples
// since detection. The result is held for HOLD samples with t_valid set; the detector then waits
// for pd to fall before it re-arms, so a packet gives one estimate. Counter, state machine, hold
// time and threshold reuse follow the document's description; HOLD, the re-arm rule and the
// saturation at 2^CNT_W-1 (which also ends the count) are this design's choices.
//
// Interface: pd and metric come from packet_detector in the same clock. t_off is valid while
// t_valid is high; done pulses in the first clock of t_valid.
module dropoff_detector #(
  parameter int unsigned CNT_W = 8,
  parameter int unsigned HOLD  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pd,
  input  logic             metric,
  output logic [CNT_W-1:0] t_off,
  output logic             t_valid,
  output logic             done
);
  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_HOLD, S_WAIT} state_e;

  localparam int unsigned HW = $clog2(HOLD + 1);

  state_e          state;
  logic [CNT_W-1:0] cnt;
  logic [HW-1:0]    hold_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      hold_cnt <= '0;
      t_off    <= '0;
      t_valid  <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (pd) begin
          state <= S_COUNT;
          cnt   <= '0;
        end
        S_COUNT: begin
          if (!metric || cnt == '1) begin
            state    <= S_HOLD;
            t_off    <= cnt;
            t_valid  <= 1'b1;
            done     <= 1'b1;
            hold_cnt <= HW'(HOLD - 1);
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_HOLD: begin
          if (hold_cnt == '0) begin
            state   <= S_WAIT;
            t_valid <= 1'b0;
            t_off   <= '0;
          end else begin
            hold_cnt <= hold_cnt - 1'b1;
          end
        end
        S_WAIT: if (!pd) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
