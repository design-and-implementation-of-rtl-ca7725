// max_detector: fine timing point as the position of the largest cross-correlation magnitude.
//
// When started, the detector examines the next WINDOW magnitudes (the document searches the first
// 100 samples after enabling) and keeps the largest one and its index, counted from 0 at the
// sample present in the start clock. On ties the earlier sample wins. At the end of the window the
// index of the maximum is published as the fine timing offset. The window length and the
// arg-max rule follow the document; the index origin and the tie rule are this design's choices.
//
// Interface: start is a one-clock pulse; a start during a search restarts it. mag is sampled every
// clock. done pulses, and t_off/t_valid are updated, in the clock after the last sample of the
// window, i.e. WINDOW clocks after the start clock; t_off then holds and t_valid stays set until
// the next start.
module max_detector #(
  parameter int unsigned WINDOW = 100,
  parameter int unsigned MAG_W  = 46,
  parameter int unsigned IDX_W  = $clog2(WINDOW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [MAG_W-1:0] mag,
  output logic [IDX_W-1:0] t_off,
  output logic             t_valid,
  output logic             done
);
  logic             searching;
  logic [IDX_W-1:0] idx, best_idx;
  logic [MAG_W-1:0] best;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      searching <= 1'b0;
      idx       <= '0;
      best_idx  <= '0;
      best      <= '0;
      t_off     <= '0;
      t_valid   <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        searching <= 1'b1;
        best      <= mag;
        best_idx  <= '0;
        idx       <= IDX_W'(1);
        t_valid   <= 1'b0;
      end else if (searching) begin
        if (mag > best) begin
          best     <= mag;
          best_idx <= idx;
        end
        if (idx == IDX_W'(WINDOW - 1)) begin
          searching <= 1'b0;
          done      <= 1'b1;
          t_valid   <= 1'b1;
          t_off     <= (mag > best) ? idx : best_idx;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  initial assert (WINDOW >= 2) else $error("max_detector: WINDOW must be at least 2");
endmodule
