// pt_squarer: squaring stage of the Pan-Tompkins filter chain.
//
// Squares the derivative point by point, y[n] = x[n]^2 / 2^SHIFT, which makes every
// value positive and stresses the large slopes of the QRS complex over the
// smaller ones of the P and T waves. The square of an IN_W-bit signed value is at
// most 2^(2*IN_W-2); after the shift it fits exactly in 2*IN_W-1-SHIFT bits, so
// no saturation is needed (32 bits for the default 19-bit input).
//
// Interface: one sample per cycle with in_valid high; out_data/out_valid are
// registered one clock after the sample and hold until the next one. rst_n
// (synchronous, active low) and clear zero the output.
//
// Squaring is a step of the algorithm; the scaling, width and handshake are this
// design's own choices. Unlike the filters, this stage needs a multiplier.
module pt_squarer #(
  parameter int IN_W  = 19,
  parameter int SHIFT = 5,
  parameter int OUT_W = 2*IN_W - 1 - SHIFT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic [OUT_W-1:0]       out_data
);

  logic signed [2*IN_W-1:0] sq;

  always_comb sq = in_data * in_data;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= OUT_W'($unsigned(sq) >> SHIFT);
    end
  end

endmodule
