// tb_pt_mwi: self-checking testbench of the moving-window integrator (pt_mwi).
//
// Feeds random full-scale samples, extreme values, an impulse and a step, with
// back-to-back samples and idle gaps, and compares every output with the reference
// model in pt_ref_pkg (the mean of the last 32 inputs, summed directly). Also checks the timing: out_valid rises exactly one
// clock after each sample and the output holds while no sample arrives; and that
// clear and reset empty the state. Stops with a failure after a fixed number of
// clocks.
module tb_pt_mwi;
  import pt_ref_pkg::*;

  localparam int IN_W  = 32;
  localparam int OUT_W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n, clear, in_valid, out_valid;
  logic [IN_W-1:0]  in_data;
  logic [OUT_W-1:0] out_data;

  pt_mwi #(.IN_W(IN_W), .WIN(32)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_data, .out_valid, .out_data
  );

  int checks = 0, failures = 0;
  chain_ref m = new(32);
  longint   last_exp = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint out_val();
    return longint'(out_data);
  endfunction

  // One sample: driven at the falling edge, taken at the next rising edge, and the
  // registered result must be there right after that edge.
  task automatic send(longint x);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = IN_W'(x);
    x        = longint'(in_data);
    last_exp = m.mwi(x);
    @(posedge clk);
    #1;
    check("out_valid one clock after the sample", longint'(out_valid), 1);
    check("output", out_val(), last_exp);
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      in_data  = IN_W'($urandom);
      @(posedge clk);
      #1;
      check("out_valid low without a sample", longint'(out_valid), 0);
      check("output holds", out_val(), last_exp);
    end
  endtask

  function automatic longint rnd();
    longint v = longint'({$urandom, $urandom});
    return longint'(v & ((64'sd1 <<< IN_W) - 1));
  endfunction

  localparam longint MAXV = (64'sd1 <<< IN_W) - 1;
  localparam longint MINV = 0;

  initial begin
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1;
    check("out_valid after reset", longint'(out_valid), 0);
    check("output after reset", out_val(), 0);
    @(negedge clk) rst_n = 1'b1;

    // impulse, then a step held for 40 samples
    send(1000);
    for (int i = 0; i < 40; i++) send(0);
    for (int i = 0; i < 40; i++) send(1000);
    // extremes
    for (int i = 0; i < 40; i++) send(MAXV);
    for (int i = 0; i < 40; i++) send(MINV);
    for (int i = 0; i < 40; i++) send((i % 2) ? MAXV : MINV);
    // random samples, with gaps
    for (int i = 0; i < 600; i++) begin
      send(rnd());
      if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 3));
    end

    // clear empties the state: the next result equals that of a fresh filter
    @(negedge clk);
    in_valid = 1'b0;
    clear    = 1'b1;
    @(posedge clk);
    #1;
    check("out_valid after clear", longint'(out_valid), 0);
    check("output after clear", out_val(), 0);
    @(negedge clk) clear = 1'b0;
    m.reset();
    last_exp = 0;
    for (int i = 0; i < 100; i++) send(rnd());
    idle(2);

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
