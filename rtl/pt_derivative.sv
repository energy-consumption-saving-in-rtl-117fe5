// pt_derivative: five-point derivative stage of the Pan-Tompkins filter chain.
//
// Gives the slope of the band-passed ECG with the Pan-Tompkins five-point
// difference, made causal (two samples of group delay):
//     y[n] = (2*x[n] + x[n-1] - x[n-3] - 2*x[n-4]) / 8
// The factors 2 and 1/8 are shifts, so the stage has no multiplier. The division
// is an arithmetic right shift (rounds toward minus infinity). |y| <= 6/8 of
// full scale, so the output has the input's width.
//
// Interface: one sample per cycle with in_valid high; out_data/out_valid are
// registered one clock after the sample and hold until the next one. rst_n
// (synchronous, active low) and clear empty the delay line.
//
// The difference equation follows the Pan-Tompkins algorithm; the word lengths
// and handshake are this design's own choices.
module pt_derivative #(
  parameter int IN_W  = 19,
  parameter int OUT_W = IN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int ACC_W = IN_W + 3;   // |8y| <= 6 * 2^(IN_W-1)

  logic signed [IN_W-1:0]  xd [1:4];  // xd[k] = x[n-k]
  logic signed [ACC_W-1:0] d_new;

  always_comb begin
    d_new = (ACC_W'(in_data) <<< 1) + ACC_W'(xd[1])
          - ACC_W'(xd[3]) - (ACC_W'(xd[4]) <<< 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 1; k <= 4; k++) xd[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        xd[1] <= in_data;
        for (int k = 2; k <= 4; k++) xd[k] <= xd[k-1];
        out_data <= OUT_W'(d_new >>> 3);
      end
    end
  end

endmodule
