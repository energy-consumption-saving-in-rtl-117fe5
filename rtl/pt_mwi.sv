// pt_mwi: moving-window integrator of the Pan-Tompkins filter chain.
//
// Outputs the mean of the last WIN input samples,
//     y[n] = (x[n] + x[n-1] + ... + x[n-WIN+1]) / WIN,
// kept as a running sum: each sample adds the newest value and subtracts the one
// that leaves the window, so the cost does not grow with WIN. WIN must be a power
// of two so that the mean is a right shift; the default 32 is the window width for
// a 200 Hz sample rate. Until WIN samples have arrived after reset the missing
// ones count as zero.
//
// Interface: one unsigned sample per cycle with in_valid high; out_data/out_valid
// are registered one clock after the sample and hold until the next one. rst_n
// (synchronous, active low) and clear empty the window.
//
// The window width of 32 follows the algorithm; the running-sum structure, the
// truncating mean, the widths and the handshake are this design's own choices.
module pt_mwi #(
  parameter int IN_W = 32,
  parameter int WIN  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [IN_W-1:0] in_data,
  output logic            out_valid,
  output logic [IN_W-1:0] out_data
);

  localparam int LW    = $clog2(WIN);
  localparam int SUM_W = IN_W + LW;

  logic [IN_W-1:0]  win [WIN];        // win[k] = x[n-1-k]
  logic [SUM_W-1:0] sum;              // sum of win[0..WIN-1]
  logic [SUM_W-1:0] sum_new;

  always_comb sum_new = sum + SUM_W'(in_data) - SUM_W'(win[WIN-1]);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 0; k < WIN; k++) win[k] <= '0;
      sum       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win[0] <= in_data;
        for (int k = 1; k < WIN; k++) win[k] <= win[k-1];
        sum      <= sum_new;
        out_data <= IN_W'(sum_new >> LW);
      end
    end
  end

  initial assert (WIN == (1 << LW)) else $error("pt_mwi: WIN must be a power of two");

endmodule
