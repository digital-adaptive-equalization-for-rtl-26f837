// signalproc: top of the equalizer core. It runs the per-sample handshake
// with software, feeds each received sample through the 8-tap equalizer,
// lets error_checker score the PRS part of the frame, and slices the data
// part of the frame into one output byte.
//
// Frame: 16 samples, one per transmitted bit. Samples 0..7 carry the known
// PRS, samples 8..15 the data byte. Per sample, software
//   1. writes signalIn and raises statusIn[0] (sample available);
//   2. waits for statusOut[0] (sample complete);
//   3. lowers statusIn[0], after which statusOut[0] falls.
// A frame is opened by raising statusIn[2] (frame active). After the 16th
// sample statusOut[2] (frame complete / data valid) rises; software reads
// the byte and the error and lowers statusIn[2] to acknowledge, which
// returns the core to idle. Lowering statusIn[2] during a frame abandons it.
//
// statusOut = {state[1:0], counterSampleBlock[2:0], frame done, error done,
// sample done}; counterSampleBlock is the number of samples processed in
// this frame, truncated to 3 bits. statusOutIsValid is high in each cycle in
// which statusOut has just changed (and in the first cycle after reset), so
// an external register that loads while it is high always holds the current
// value. dataBlockIsValid and errorRateIsValid are one-cycle strobes with the
// new dataBlockOut / errorRate; those outputs then hold their value.
//
// Slicing: the equalized sample of each of frame positions 8..15 becomes a
// '1' if it is greater than zero and a '0' otherwise; position 8 goes to
// dataBlockOut[0] (LSB first, as on the RS-232 line the data comes from).
// The error total covers positions 4..11 (see error_checker).
//
// Timing: statusOut[0] rises 4 cycles after the cycle in which the core sees
// statusIn[0]=1 (1 cycle to accept, 2 in the equalizer, 1 to register).
// Handshake, status layout, slicing rule and frame layout follow the core's
// data sheet; the exact cycle counts, bit order of the byte and the unused
// statusIn bits (ignored) are this design's choices.
module signalproc
  import eq_pkg::*;
(
  input  logic                        clk,
  input  logic                        reset_b,
  input  logic [N_TAPS*COEFF_W-1:0]   coeffArrayIn,
  input  logic [SAMPLE_W-1:0]         signalIn,
  input  logic [7:0]                  statusIn,
  output logic [7:0]                  statusOut,
  output logic                        statusOutIsValid,
  output logic [DATA_LEN-1:0]         dataBlockOut,
  output logic                        dataBlockIsValid,
  output logic [ERR_W-1:0]            errorRate,
  output logic                        errorRateIsValid,
  output logic signed [OUT_W-1:0]     signalOut
);

  sp_state_e   state;
  logic [3:0]  count;         // samples processed in this frame
  logic        sample_done;   // statusOut[0]
  logic        frame_done;    // statusOut[2]
  logic        error_done;    // statusOut[1]
  logic [DATA_LEN-1:0] byte_sr;
  logic [7:0]  status_prev;

  logic eq_start, eq_done, eq_busy;
  logic signed [OUT_W-1:0] eq_y;
  logic frame_open;

  wire sample_avail = statusIn[SI_SAMPLE_AVAIL];
  wire frame_active = statusIn[SI_FRAME_ACTIVE];

  assign frame_open = (state == SP_IDLE) && frame_active;
  assign eq_start   = (state == SP_ACTIVE) && frame_active && sample_avail && !sample_done;

  equalizer u_eq (
    .clk      (clk),
    .rst_n    (reset_b),
    .start    (eq_start),
    .sample_in(signalIn),
    .coeffs   (coeffArrayIn),
    .y_out    (eq_y),
    .done     (eq_done),
    .busy     (eq_busy)
  );

  error_checker u_err (
    .clk         (clk),
    .rst_n       (reset_b),
    .clear       (frame_open),
    .sample_valid(eq_done && state == SP_BUSY),
    .sample_index(count),
    .y_in        (eq_y),
    .error_rate  (errorRate),
    .error_valid (errorRateIsValid),
    .error_done  (error_done)
  );

  assign signalOut = eq_y;

  always_ff @(posedge clk or negedge reset_b) begin
    if (!reset_b) begin
      state            <= SP_IDLE;
      count            <= '0;
      sample_done      <= 1'b0;
      frame_done       <= 1'b0;
      byte_sr          <= '0;
      dataBlockOut     <= '0;
      dataBlockIsValid <= 1'b0;
    end else begin
      dataBlockIsValid <= 1'b0;
      if (!sample_avail) sample_done <= 1'b0;
      unique case (state)
        SP_IDLE: if (frame_active) begin
          count      <= '0;
          frame_done <= 1'b0;
          state      <= SP_ACTIVE;
        end
        SP_ACTIVE: begin
          if (!frame_active)  state <= SP_IDLE;
          else if (eq_start)  state <= SP_BUSY;
        end
        SP_BUSY: if (eq_done) begin
          sample_done <= 1'b1;
          count       <= count + 4'd1;
          if (count >= 4'(PRS_LEN)) begin
            byte_sr[3'(count - 4'(PRS_LEN))] <= (eq_y > 0);
          end
          if (count == 4'(FRAME_LEN - 1)) begin
            dataBlockOut     <= {(eq_y > 0), byte_sr[DATA_LEN-2:0]};
            dataBlockIsValid <= 1'b1;
            frame_done       <= 1'b1;
            state            <= SP_FRAME_DONE;
          end else begin
            state <= SP_ACTIVE;
          end
        end
        SP_FRAME_DONE: if (!frame_active) begin
          frame_done <= 1'b0;
          state      <= SP_IDLE;
        end
        default: state <= SP_IDLE;
      endcase
    end
  end

  always_comb begin
    statusOut = '0;
    statusOut[SO_SAMPLE_DONE] = sample_done;
    statusOut[SO_ERROR_DONE]  = error_done;
    statusOut[SO_FRAME_DONE]  = frame_done;
    statusOut[SO_COUNT_LSB +: 3] = count[2:0];
    statusOut[SO_STATE_LSB +: 2] = state;
  end

  always_ff @(posedge clk or negedge reset_b) begin
    if (!reset_b) status_prev <= 8'hFF;
    else          status_prev <= statusOut;
  end
  assign statusOutIsValid = (statusOut != status_prev);

  // The equalizer is started only from ACTIVE and must be idle then.
  assert property (@(posedge clk) disable iff (!reset_b) eq_start |-> !eq_busy);
  // The equalizer only finishes while the state machine waits for it.
  assert property (@(posedge clk) disable iff (!reset_b) eq_done |-> state == SP_BUSY);

endmodule
