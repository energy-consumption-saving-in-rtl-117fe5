// tb_pt_filter_chain: self-checking testbench of the whole filter chain.
//
// Streams eight seconds of a synthetic 200 Hz ECG (baseline wander, P, QRS and T
// waves, noise), then random full-scale samples, mixing back-to-back samples with
// idle gaps. A scoreboard holds the reference results of each sample (pt_ref_pkg)
// and compares band-pass, derivative, square and integral when mwi_valid rises.
// Checks that each result comes exactly four clocks after the edge that takes its sample,
// that all four outputs belong to the same sample even when samples are one clock
// apart, and that clear empties every stage. Stops with a failure after a fixed
// number of clocks.
module tb_pt_filter_chain;
  import pt_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int BP_W   = DATA_W + 3;
  localparam int SQ_W   = 2 * DATA_W;
  localparam int LAT    = 4;   // clocks from the edge that takes a sample to its result

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     rst_n, clear, in_valid, mwi_valid;
  logic signed [DATA_W-1:0] in_data;
  logic signed [BP_W-1:0]   bp_data, deriv_data;
  logic [SQ_W-1:0]          sq_data, mwi_data;

  pt_filter_chain #(.DATA_W(DATA_W), .MWI_WIN(32)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_data,
    .bp_data, .deriv_data, .sq_data, .mwi_valid, .mwi_data
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  chain_ref   m = new(32);
  chain_out_t exp_q[$];
  int         time_q[$];
  int         results = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // scoreboard: runs just after each rising edge
  always @(posedge clk) begin
    #1;
    if (rst_n && mwi_valid) begin
      chain_out_t e;
      int         t0;
      results++;
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL result with no sample outstanding");
      end else begin
        e  = exp_q.pop_front();
        t0 = time_q.pop_front();
        check("latency in clocks", longint'(cycle - t0), LAT);
        check("band-pass", longint'(bp_data), e.bp);
        check("derivative", longint'(deriv_data), e.deriv);
        check("square", longint'(sq_data), e.sq);
        check("integral", longint'(mwi_data), e.mwi);
      end
    end
  end

  task automatic send(longint x);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = DATA_W'(x);
    exp_q.push_back(m.push(longint'($signed(in_data))));
    time_q.push_back(cycle + 1);  // cycle number in which the sample is offered
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < 1600; n++) begin
      send(ecg_sample(n, 160));
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 6));
    end
    for (int n = 0; n < 400; n++) begin
      send(longint'($signed(16'($urandom))));
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 2));
    end
    idle(LAT + 2);
    check("every sample produced a result", longint'(exp_q.size()), 0);

    // clear empties every stage
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    #1;
    check("mwi_valid after clear", longint'(mwi_valid), 0);
    check("integral after clear", longint'(mwi_data), 0);
    check("band-pass after clear", longint'(bp_data), 0);
    m.reset();
    for (int n = 0; n < 200; n++) send(ecg_sample(n + 37, 160));
    idle(LAT + 2);
    check("every sample after clear produced a result", longint'(exp_q.size()), 0);
    check("number of results", longint'(results), 2200);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
