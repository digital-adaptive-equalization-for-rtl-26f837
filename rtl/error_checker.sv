// error_checker: measures how far the equalized PRS part of a frame is from
// the bits the transmitter is known to have sent.
//
// Each frame starts with an 8-bit pseudo-random sequence (PRS) that is
// hard-wired here (PRS_PATTERN, bit 0 first). Because the equalizer delays
// the symbol stream by ERR_DELAY samples, the equalized sample at frame
// position p (0..15) is compared with PRS bit p-ERR_DELAY, for p from
// ERR_DELAY to ERR_DELAY+PRS_LEN-1 (4..11 by default). For each of these the
// equalized value is brought to sample units (y >>> COEFF_FRAC), the level
// of the PRS bit (+PRS_LEVEL for '1', -PRS_LEVEL for '0') is subtracted, and
// the absolute difference is added to a 16-bit unsigned total that
// saturates at 16'hFFFF. The window, the comparison and the accumulation
// follow the data sheet; the scaling, the level and saturation are this
// design's choices.
//
// Interface: clear (one cycle, start of frame) empties the total. In a cycle
// with sample_valid=1, y_in is the equalized sample at frame position
// sample_index. One cycle after the last sample of the window, error_rate
// holds the total and error_valid is high for that one cycle; error_done
// stays high from then until the next clear.
module error_checker
  import eq_pkg::*;
#(
  parameter logic [PRS_LEN-1:0] PRS   = PRS_PATTERN,
  parameter int unsigned        DELAY = ERR_DELAY,
  parameter int                 LEVEL = PRS_LEVEL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    sample_valid,
  input  logic [3:0]              sample_index,
  input  logic signed [OUT_W-1:0] y_in,
  output logic [ERR_W-1:0]        error_rate,
  output logic                    error_valid,
  output logic                    error_done
);

  localparam int unsigned FIRST = DELAY;
  localparam int unsigned LAST  = DELAY + PRS_LEN - 1;

  logic                    in_window;
  logic [2:0]              prs_idx;
  logic signed [OUT_W-1:0] y_scaled, target;
  logic signed [OUT_W:0]   diff;
  logic [OUT_W:0]          abs_diff;
  logic [OUT_W+1:0]        sum_wide;
  logic [ERR_W-1:0]        acc_next;

  always_comb begin
    in_window = (32'(sample_index) >= FIRST) && (32'(sample_index) <= LAST);
    prs_idx   = 3'(32'(sample_index) - FIRST);
    y_scaled  = y_in >>> COEFF_FRAC;
    target    = PRS[prs_idx] ? OUT_W'(LEVEL) : -OUT_W'(LEVEL);
    diff      = (OUT_W+1)'(y_scaled) - (OUT_W+1)'(target);
    abs_diff  = diff[OUT_W] ? unsigned'(-diff) : unsigned'(diff);
    sum_wide  = (OUT_W+2)'(error_rate) + (OUT_W+2)'(abs_diff);
    acc_next  = (sum_wide > (OUT_W+2)'({ERR_W{1'b1}})) ? {ERR_W{1'b1}} : sum_wide[ERR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error_rate  <= '0;
      error_valid <= 1'b0;
      error_done  <= 1'b0;
    end else begin
      error_valid <= 1'b0;
      if (clear) begin
        error_rate <= '0;
        error_done <= 1'b0;
      end else if (sample_valid && in_window && !error_done) begin
        error_rate <= acc_next;
        if (32'(sample_index) == LAST) begin
          error_valid <= 1'b1;
          error_done  <= 1'b1;
        end
      end
    end
  end

endmodule
