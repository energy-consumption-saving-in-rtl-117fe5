// pt_lowpass: 15 Hz low-pass stage of the Pan-Tompkins filter chain (fs = 200 Hz).
//
// Implements the integer recursive low-pass
//     y[n] = 2*y[n-1] - y[n-2] + x[n] - 2*x[n-6] + x[n-12]
// whose impulse response is a 12-tap triangle (1,2,..,6,..,2,1), DC gain 36. Every
// coefficient is 1 or 2, so the stage uses only adders and shifts, no multiplier.
// The recursion is exact in integer arithmetic; the accumulator is wide enough for
// 36 times full-scale input. The output is y/32 (arithmetic shift), one bit wider
// than the input, which removes most of the gain without overflow. The pair of
// filters is usually quoted as a 5-15 Hz band-pass; the -3 dB point of this
// low-pass on its own lies near 11 Hz.
//
// Interface: one sample per cycle with in_valid high; out_data/out_valid are
// registered, so the result of a sample appears one clock after it is taken and
// holds until the next sample. rst_n (synchronous, active low) and clear empty
// the delay line and the recursion state.
//
// The filter order, cut-off and the multiplier-free form follow the Pan-Tompkins
// algorithm that the accelerator implements; the word lengths, output scaling and
// the valid handshake are this design's own choices.
module pt_lowpass #(
  parameter int IN_W  = 16,
  parameter int OUT_W = IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int ACC_W = IN_W + 7;   // |y| <= 36 * 2^(IN_W-1)

  logic signed [IN_W-1:0]  xd [1:12]; // xd[k] = x[n-k]
  logic signed [ACC_W-1:0] y1, y2;    // y[n-1], y[n-2]
  logic signed [ACC_W-1:0] y_new;

  always_comb begin
    y_new = (y1 <<< 1) - y2
          + ACC_W'(in_data)
          - (ACC_W'(xd[6]) <<< 1)
          + ACC_W'(xd[12]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 1; k <= 12; k++) xd[k] <= '0;
      y1        <= '0;
      y2        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        xd[1] <= in_data;
        for (int k = 2; k <= 12; k++) xd[k] <= xd[k-1];
        y2       <= y1;
        y1       <= y_new;
        out_data <= OUT_W'(y_new >>> 5);
      end
    end
  end

endmodule
