// tb_pt_accel_record: QRS-detection workload on the accelerator at its default
// parameters.
//
// Streams a 30-second synthetic ECG record at 200 Hz (6,000 samples) through the
// AXI4-Lite bus, as the host processor would: one SAMPLE write per sample, wait for
// irq, read BP, DERIV and MWI. The rhythm is irregular, with RR intervals of 120 to
// 230 samples (52 to 100 beats per minute), and the QRS amplitude varies between
// 0.6 and 1.2 of nominal. Every result is compared with the reference model. The
// software decision step from pt_ref_pkg then runs on the MWI values. After two
// seconds of learning, each beat must give exactly one detection within 80 samples
// of its R peak, and there must be no other detection. The master stalls the
// response channels at random all the way through. Stops with a failure after a
// fixed number of clocks.
module tb_pt_accel_record;
  import pt_pkg::*;
  import pt_ref_pkg::*;

  localparam int ADDR_W = 6;
  localparam int N      = 6000;
  localparam int LEARN  = 400;
  localparam int WINDOW = 80;     // detections may trail the R peak by this much

  logic aclk = 1'b0;
  always #5 aclk = ~aclk;
  logic aresetn, irq;

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
  longint   mwi_hist[$];
  int       r_peaks[$];     // sample index of every R peak in the record

  initial begin
    automatic int beat_start = 0, rr = 160, waited;
    automatic real gain = 1.0;
    automatic int det[$];
    automatic int beats = 0, stray = 0;
    logic [31:0] d;
    chain_out_t  e;

    bus.init();
    aresetn = 1'b0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1'b1;
    bus.stall = 1'b1;
    wr(REG_CTRL, 32'(1) << CTRL_IRQ_EN_BIT);

    for (int n = 0; n < N; n++) begin
      longint x;
      if (n - beat_start >= rr) begin
        beat_start = n;
        rr   = $urandom_range(120, 230);
        gain = 0.6 + 0.6 * real'($urandom_range(0, 100)) / 100.0;
      end
      if (n - beat_start == ECG_R_PEAK) r_peaks.push_back(n);
      x = ecg_wave(n, n - beat_start, gain);
      e = m.push(longint'($signed(16'(x))));
      wr(REG_SAMPLE, 32'(x));
      waited = 0;
      while (!irq && waited < 100) begin @(negedge aclk); waited++; end
      check("irq after a sample", longint'(irq), 1);
      rd(REG_BP, d);    check("BP", longint'($signed(d)), e.bp);
      rd(REG_DERIV, d); check("DERIV", longint'($signed(d)), e.deriv);
      rd(REG_MWI, d);   check("MWI", longint'(d), e.mwi);
      mwi_hist.push_back(longint'(d));
    end
    rd(REG_STATUS, d);
    check("no overrun in the record", longint'(d[STATUS_OVERRUN_BIT]), 0);

    qrs_decide(mwi_hist, LEARN, det);
    foreach (r_peaks[k]) begin
      automatic int hits = 0;
      if (r_peaks[k] < LEARN || r_peaks[k] + WINDOW >= N) continue;
      beats++;
      foreach (det[i]) if (det[i] >= r_peaks[k] && det[i] < r_peaks[k] + WINDOW) hits++;
      check($sformatf("detections for the beat at sample %0d", r_peaks[k]), hits, 1);
    end
    foreach (det[i]) begin
      automatic bit near = 1'b0;
      foreach (r_peaks[k]) if (det[i] >= r_peaks[k] && det[i] < r_peaks[k] + WINDOW) near = 1'b1;
      if (!near) stray++;
    end
    check("no detection away from an R peak", longint'(stray), 0);
    check("enough beats in the record", longint'(beats >= 25), 1);
    $display("record: %0d samples, %0d beats checked, %0d detections, bus stalls %0d / %0d",
             N, beats, det.size(), bus.b_stalls, bus.r_stalls);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
