// tb_pt_accel: end-to-end testbench of the Pan-Tompkins accelerator at its default
// parameters.
//
// The testbench plays the host processor. It streams ten seconds of a synthetic
// 200 Hz ECG (one beat every 160 samples, i.e. 75 beats per minute) over the
// AXI4-Lite bus, one write to SAMPLE per sample, waits for the result (through
// irq, or by polling STATUS when the interrupt is off), reads SQUARE, BP, DERIV and
// MWI and compares them with the reference model in pt_ref_pkg. Part of the stream
// runs with a master that stalls bready / rready.
//
// On the MWI values it then runs the software half of the algorithm, a simplified
// Pan-Tompkins decision: local maxima of the integral, a 200 ms refractory period,
// running estimates of signal and noise peaks and a threshold a quarter of the way
// from the noise estimate to the signal estimate. Every beat after a two-second
// learning period must give exactly one detection, close after its R wave, and no
// detection may fall elsewhere.
//
// It also makes each mechanism of the accelerator happen and counts it: the
// interrupt path, the polling path, OVERRUN on a missed result and its clearing,
// CLEAR in the middle of the stream, SLVERR on an unmapped offset, and bus stalls;
// a mechanism that never happened counts as a failure. The time from the write
// response of a sample to the interrupt is checked to be six clocks. Stops with a
// failure after a fixed number of clocks.
module tb_pt_accel;
  import pt_pkg::*;
  import pt_ref_pkg::*;

  localparam int ADDR_W   = 6;     // defaults of pt_accel
  localparam int N        = 2040;  // samples streamed (10.2 s at 200 Hz)
  localparam int PERIOD   = 160;   // samples per beat
  localparam int R_PHASE  = ECG_R_PEAK - 1;  // start of the R peak window inside a beat
  localparam int LEARN    = 400;   // two seconds of threshold learning
  localparam int IRQ_LAT  = 6;     // clocks from write response to irq

  logic aclk = 1'b0;
  always #5 aclk = ~aclk;
  logic aresetn;
  logic irq;

  axil_if #(.ADDR_W(ADDR_W)) bus (.aclk);

  pt_accel dut (
    .aclk, .aresetn,
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid),
    .s_axi_wready(bus.wready), .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid),
    .s_axi_bready(bus.bready), .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid),
    .s_axi_arready(bus.arready), .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp),
    .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .irq
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  int b_rise_cycle = 0, irq_rise_cycle = 0;
  logic bvalid_q = 1'b0, irq_q = 1'b0;

  // mechanism counters
  int n_irq = 0, n_poll = 0, n_overrun = 0, n_clear = 0, n_slverr = 0;

  always @(posedge aclk) begin
    #1;
    cycle++;
    if (bus.bvalid && !bvalid_q) b_rise_cycle = cycle;
    if (irq && !irq_q) irq_rise_cycle = cycle;
    bvalid_q = bus.bvalid;
    irq_q    = irq;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [ADDR_W-1:0] off(reg_idx_e r);
    return ADDR_W'(r) << 2;
  endfunction

  task automatic wr(reg_idx_e r, logic [31:0] d);
    logic [1:0] resp;
    bus.write(off(r), d, resp);
    check("write response", longint'(resp), longint'(AXI_RESP_OKAY));
  endtask

  task automatic rd(reg_idx_e r, output logic [31:0] d);
    logic [1:0] resp;
    bus.read(off(r), d, resp);
    check("read response", longint'(resp), longint'(AXI_RESP_OKAY));
  endtask

  chain_ref m = new(32);
  longint   mwi_hist[$];   // integral per sample index, for the decision

  // One sample through the accelerator, results checked against the model.
  task automatic process(longint x, bit use_irq);
    logic [31:0] d;
    chain_out_t  e;
    int          waited = 0;
    e = m.push(longint'($signed(16'(x))));
    wr(REG_SAMPLE, 32'(x));
    if (use_irq) begin
      while (!irq && waited < 100) begin @(negedge aclk); waited++; end
      check("irq after a sample", longint'(irq), 1);
      check("clocks from write response to irq", longint'(irq_rise_cycle - b_rise_cycle),
            IRQ_LAT);
      n_irq++;
    end else begin
      do begin rd(REG_STATUS, d); waited++; end
      while (!d[STATUS_READY_BIT] && waited < 100);
      check("READY after a sample (polling)", longint'(d[STATUS_READY_BIT]), 1);
      n_poll++;
    end
    rd(REG_SQUARE, d); check("SQUARE", longint'(d), e.sq);
    rd(REG_BP, d);     check("BP", longint'($signed(d)), e.bp);
    rd(REG_DERIV, d);  check("DERIV", longint'($signed(d)), e.deriv);
    rd(REG_MWI, d);    check("MWI", longint'(d), e.mwi);
    mwi_hist.push_back(longint'(d));
    rd(REG_STATUS, d);
    check("READY clear after reading MWI", longint'(d[STATUS_READY_BIT]), 0);
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  resp;
    int          det[$];
    automatic int beats = 0, matched = 0, stray = 0;
    automatic int t_start;
    bus.init();
    aresetn = 1'b0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1'b1;

    // a mapped register before anything happens
    rd(REG_STATUS, d);
    check("STATUS after reset", longint'(d), 0);

    // unmapped offset
    bus.write(ADDR_W'(8 << 2), 32'h1, resp);
    if (resp == AXI_RESP_SLVERR) n_slverr++;
    bus.read(ADDR_W'(12 << 2), d, resp);
    if (resp == AXI_RESP_SLVERR) n_slverr++;
    check("SLVERR on unmapped offsets", longint'(n_slverr), 2);

    // a short burst of noise, then CLEAR: the stream below must start from scratch
    wr(REG_CTRL, 32'(1) << CTRL_IRQ_EN_BIT);
    for (int n = 0; n < 50; n++) process(longint'($signed(16'($urandom))), 1'b1);
    wr(REG_CTRL, (32'(1) << CTRL_IRQ_EN_BIT) | (32'(1) << CTRL_CLEAR_BIT));
    rd(REG_COUNT, d);
    check("COUNT zero after CLEAR", longint'(d), 0);
    n_clear++;
    m.reset();
    mwi_hist = {};

    // the ECG stream: first half with interrupts, second half polling with stalls
    t_start = cycle;
    for (int n = 0; n < N; n++) begin
      if (n == N / 2) begin
        $display("bus clocks per sample with interrupt and no stalls: %0d",
                 (cycle - t_start) / (N / 2));
        check("a sample costs fewer than 40 bus clocks", longint'((cycle - t_start) / (N / 2) < 40), 1);
        wr(REG_CTRL, 32'd0);
        bus.stall = 1'b1;
      end
      process(ecg_sample(n, PERIOD), n < N / 2);
    end
    rd(REG_COUNT, d);
    check("COUNT after the stream", longint'(d), N);

    // overrun: two samples without reading the first result
    wr(REG_SAMPLE, 32'd100);
    wr(REG_SAMPLE, 32'd200);
    repeat (8) @(posedge aclk);
    rd(REG_STATUS, d);
    check("OVERRUN after a missed result", longint'(d[STATUS_OVERRUN_BIT]), 1);
    if (d[STATUS_OVERRUN_BIT]) n_overrun++;
    wr(REG_STATUS, 32'(1) << STATUS_OVERRUN_BIT);
    rd(REG_STATUS, d);
    check("OVERRUN cleared", longint'(d[STATUS_OVERRUN_BIT]), 0);

    // decision on the integral
    qrs_decide(mwi_hist, LEARN, det);
    for (int k = 0; k * PERIOD + R_PHASE < N; k++) begin
      automatic int r = k * PERIOD + R_PHASE;
      automatic int hits = 0;
      if (r < LEARN || r + 80 >= N) continue;
      beats++;
      foreach (det[i]) if (det[i] >= r && det[i] < r + 80) hits++;
      check($sformatf("detections for the beat at sample %0d", r), hits, 1);
      matched += hits;
    end
    foreach (det[i]) begin
      automatic int ph = det[i] % PERIOD;
      if (ph < R_PHASE || ph >= R_PHASE + 80) stray++;
    end
    check("no detection away from an R wave", longint'(stray), 0);
    $display("beats checked %0d, detected %0d, detections in all %0d", beats, matched, det.size());

    // every mechanism happened
    check("interrupt path used", longint'(n_irq > 0), 1);
    check("polling path used", longint'(n_poll > 0), 1);
    check("OVERRUN happened", longint'(n_overrun > 0), 1);
    check("CLEAR happened", longint'(n_clear > 0), 1);
    check("SLVERR happened", longint'(n_slverr > 0), 1);
    check("write response stalled", longint'(bus.b_stalls > 0), 1);
    check("read data stalled", longint'(bus.r_stalls > 0), 1);
    $display("mechanisms: irq %0d, poll %0d, overrun %0d, clear %0d, slverr %0d, b stalls %0d, r stalls %0d",
             n_irq, n_poll, n_overrun, n_clear, n_slverr, bus.b_stalls, bus.r_stalls);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
