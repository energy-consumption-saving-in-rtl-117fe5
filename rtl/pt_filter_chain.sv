// pt_filter_chain: the DSP section of the Pan-Tompkins QRS detector.
//
// Five stages in series, each one register deep:
//   low-pass (15 Hz) -> high-pass (5 Hz) -> derivative -> squaring -> moving-window
//   integration (WIN samples).
// The low-pass and high-pass together form the band-pass that removes mains hum,
// baseline wander, motion and muscle noise; the derivative gives the slope, the
// square emphasises the steep QRS slopes, and the integrator smooths the result
// into one lump per heartbeat. Between stages the gain of each filter is removed
// by a right shift inside the stage, so with a DATA_W-bit input the widths are
// DATA_W+1 (low-pass), DATA_W+3 (band-pass and derivative) and 2*DATA_W (square
// and integral, 32 bits for 16-bit samples); no stage can overflow.
//
// Interface: a sample is taken in each cycle with in_valid high (full throughput,
// one sample per clock). Each stage is one register, the first loaded by the edge
// that takes the sample, so the integrated value appears with mwi_valid four clocks
// after that edge (mwi_valid is high in the fifth cycle counting the one in which
// in_valid was high). bp_data, deriv_data
// and sq_data are copies of the earlier stage outputs carried along the pipeline
// (each copy advances with the valid of the stage it waits beside), so that all
// four outputs belong to the same input sample however closely samples follow each
// other. All outputs hold until the next result. rst_n (synchronous, active low)
// and clear empty every delay line.
//
// The order of the stages and the window of 32 follow the algorithm; the widths,
// scalings and the handshake are this design's own choices.
module pt_filter_chain #(
  parameter int DATA_W  = 16,
  parameter int MWI_WIN = 32,
  localparam int LP_W   = DATA_W + 1,
  localparam int BP_W   = LP_W + 2,
  localparam int SQ_W   = 2*BP_W - 1 - 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic signed [BP_W-1:0] bp_data,
  output logic signed [BP_W-1:0] deriv_data,
  output logic [SQ_W-1:0]        sq_data,
  output logic                   mwi_valid,
  output logic [SQ_W-1:0]        mwi_data
);

  logic                   lp_valid, bp_valid, d_valid, sq_valid;
  logic signed [LP_W-1:0] lp_data;
  logic signed [BP_W-1:0] bp_s, d_s;   // stage outputs
  logic [SQ_W-1:0]        sq_s;
  logic signed [BP_W-1:0] bp_q1, bp_q2, d_q1;

  pt_lowpass #(.IN_W(DATA_W), .OUT_W(LP_W)) u_lowpass (
    .clk, .rst_n, .clear,
    .in_valid (in_valid), .in_data (in_data),
    .out_valid(lp_valid), .out_data(lp_data)
  );

  pt_highpass #(.IN_W(LP_W), .OUT_W(BP_W)) u_highpass (
    .clk, .rst_n, .clear,
    .in_valid (lp_valid), .in_data (lp_data),
    .out_valid(bp_valid), .out_data(bp_s)
  );

  pt_derivative #(.IN_W(BP_W), .OUT_W(BP_W)) u_derivative (
    .clk, .rst_n, .clear,
    .in_valid (bp_valid), .in_data (bp_s),
    .out_valid(d_valid),  .out_data(d_s)
  );

  pt_squarer #(.IN_W(BP_W), .SHIFT(5), .OUT_W(SQ_W)) u_squarer (
    .clk, .rst_n, .clear,
    .in_valid (d_valid),  .in_data (d_s),
    .out_valid(sq_valid), .out_data(sq_s)
  );

  pt_mwi #(.IN_W(SQ_W), .WIN(MWI_WIN)) u_mwi (
    .clk, .rst_n, .clear,
    .in_valid (sq_valid),  .in_data (sq_s),
    .out_valid(mwi_valid), .out_data(mwi_data)
  );

  // Side copies that keep the band-pass, derivative and square of a sample next to
  // it until its integral is ready.
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      bp_q1      <= '0;
      bp_q2      <= '0;
      bp_data    <= '0;
      d_q1       <= '0;
      deriv_data <= '0;
      sq_data    <= '0;
    end else begin
      if (bp_valid) bp_q1 <= bp_s;
      if (d_valid) begin
        bp_q2 <= bp_q1;
        d_q1  <= d_s;
      end
      if (sq_valid) begin
        bp_data    <= bp_q2;
        deriv_data <= d_q1;
        sq_data    <= sq_s;
      end
    end
  end

endmodule
