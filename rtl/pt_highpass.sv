// pt_highpass: 5 Hz high-pass stage of the Pan-Tompkins filter chain (fs = 200 Hz).
//
// Built, as in the Pan-Tompkins algorithm, as a delayed all-pass minus a low-pass:
// a 32-sample moving sum p[n] = p[n-1] + x[n] - x[n-32] (kept recursively) is
// subtracted from the input delayed by 16 samples and scaled by 32:
//     y[n] = 32*x[n-16] - p[n]
// The factor 32 is a shift, so the stage has no multiplier. The output is y/32
// (arithmetic shift); |y| can reach 64 times full-scale input, so the output is
// two bits wider than the input.
//
// Interface: one sample per cycle with in_valid high; out_data/out_valid are
// registered one clock after the sample and hold until the next one. rst_n
// (synchronous, active low) and clear empty the delay line and the moving sum.
//
// The difference equation follows the Pan-Tompkins algorithm; the word lengths,
// scaling and handshake are this design's own choices.
module pt_highpass #(
  parameter int IN_W  = 17,
  parameter int OUT_W = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int ACC_W = IN_W + 7;   // |y| <= 64 * 2^(IN_W-1)

  logic signed [IN_W-1:0]  xd [1:32]; // xd[k] = x[n-k]
  logic signed [ACC_W-1:0] p;         // p[n-1]
  logic signed [ACC_W-1:0] p_new, y_new;

  always_comb begin
    p_new = p + ACC_W'(in_data) - ACC_W'(xd[32]);
    y_new = (ACC_W'(xd[16]) <<< 5) - p_new;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 1; k <= 32; k++) xd[k] <= '0;
      p         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        xd[1] <= in_data;
        for (int k = 2; k <= 32; k++) xd[k] <= xd[k-1];
        p        <= p_new;
        out_data <= OUT_W'(y_new >>> 5);
      end
    end
  end

endmodule
