// tb_pt_axil_regs: self-checking testbench of the accelerator's AXI4-Lite slave.
//
// The register file is driven on its bus side by the master model in axil_if and
// on its filter side directly by the testbench, which plays the filter chain.
// Checks: a write to SAMPLE gives exactly one sample_valid pulse with the written
// value and bumps COUNT; results presented with mwi_valid appear in MWI, BP, DERIV
// (sign-extended) and SQUARE and set READY; reading MWI clears READY; a second
// result n0 that read sets OVERRUN, which writing 1 to STATUS bit 1 clears;
// IRQ_EN gates irq; CLEAR pulses chain_clear and zeroes COUNT and the flags;
// unmapped offsets answer SLVERR on both channels; responses survive a master that
// holds bready / rready low. Stops with a failure after a fixed number of clocks.
module tb_pt_axil_regs;
  import pt_pkg::*;

  localparam int ADDR_W = 6;
  localparam int DATA_W = 16;
  localparam int BP_W   = DATA_W + 3;
  localparam int SQ_W   = 2 * DATA_W;

  logic aclk = 1'b0;
  always #5 aclk = ~aclk;
  logic aresetn;

  axil_if #(.ADDR_W(ADDR_W)) bus (.aclk);

  logic                     chain_clear, sample_valid, mwi_valid, irq;
  logic signed [DATA_W-1:0] sample_data;
  logic signed [BP_W-1:0]   bp_data, deriv_data;
  logic [SQ_W-1:0]          sq_data, mwi_data;

  pt_axil_regs #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .BP_W(BP_W), .SQ_W(SQ_W)) dut (
    .aclk, .aresetn,
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid),
    .s_axi_wready(bus.wready), .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid),
    .s_axi_bready(bus.bready), .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid),
    .s_axi_arready(bus.arready), .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp),
    .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .chain_clear, .sample_valid, .sample_data,
    .bp_data, .deriv_data, .sq_data, .mwi_valid, .mwi_data, .irq
  );

  int checks = 0, failures = 0;
  int sample_pulses = 0, clear_pulses = 0;
  logic signed [DATA_W-1:0] last_sample;

  always @(posedge aclk) begin
    #1;
    if (sample_valid) begin sample_pulses++; last_sample = sample_data; end
    if (chain_clear) clear_pulses++;
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

  task automatic wr(logic [ADDR_W-1:0] a, logic [31:0] d, logic [1:0] exp_resp = AXI_RESP_OKAY);
    logic [1:0] resp;
    bus.write(a, d, resp);
    check($sformatf("write response at 0x%0h", a), longint'(resp), longint'(exp_resp));
  endtask

  task automatic rd(logic [ADDR_W-1:0] a, output logic [31:0] d,
                    input logic [1:0] exp_resp = AXI_RESP_OKAY);
    logic [1:0] resp;
    bus.read(a, d, resp);
    check($sformatf("read response at 0x%0h", a), longint'(resp), longint'(exp_resp));
  endtask

  task automatic expect_reg(reg_idx_e r, logic [31:0] exp, string what);
    logic [31:0] d;
    rd(off(r), d);
    check(what, longint'(d), longint'(exp));
  endtask

  // The testbench's stand-in for the filter chain: one result for one clock.
  task automatic present(longint bp, longint dv, longint sq, longint mw);
    @(negedge aclk);
    bp_data    = BP_W'(bp);
    deriv_data = BP_W'(dv);
    sq_data    = SQ_W'(sq);
    mwi_data   = SQ_W'(mw);
    mwi_valid  = 1'b1;
    @(negedge aclk);
    mwi_valid  = 1'b0;
    bp_data    = '0; deriv_data = '0; sq_data = '0; mwi_data = '0;
  endtask

  localparam logic [31:0] READY   = 32'(1) << STATUS_READY_BIT;
  localparam logic [31:0] OVERRUN = 32'(1) << STATUS_OVERRUN_BIT;

  initial begin
    logic [31:0] d;
    bus.init();
    aresetn = 1'b0; mwi_valid = 1'b0;
    bp_data = '0; deriv_data = '0; sq_data = '0; mwi_data = '0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1'b1;

    for (int pass = 0; pass < 2; pass++) begin
      bus.stall = (pass == 1);

      expect_reg(REG_STATUS, 32'd0, "STATUS idle");
      expect_reg(REG_CTRL, 32'd0, "CTRL idle");

      // samples: one pulse each, value and count
      for (int i = 0; i < 10; i++) begin
        automatic logic signed [DATA_W-1:0] s = DATA_W'($urandom);
        automatic int n0 = sample_pulses;
        wr(off(REG_SAMPLE), 32'(s));
        repeat (2) @(posedge aclk);
        check("one sample_valid pulse per write", longint'(sample_pulses - n0), 1);
        check("sample value", longint'(last_sample), longint'(s));
        expect_reg(REG_SAMPLE, 32'(s), "SAMPLE reads back");
      end
      expect_reg(REG_COUNT, 32'd10, "COUNT after ten samples");

      // a result: all four values, READY, then clear READY by reading MWI
      present(-12345, -77, 32'h89ab_cdef, 32'h1234_5678);
      expect_reg(REG_STATUS, READY, "READY after a result");
      expect_reg(REG_BP, 32'(-12345), "BP sign-extended");
      expect_reg(REG_DERIV, 32'(-77), "DERIV sign-extended");
      expect_reg(REG_SQUARE, 32'h89ab_cdef, "SQUARE");
      expect_reg(REG_STATUS, READY, "READY survives other reads");
      expect_reg(REG_MWI, 32'h1234_5678, "MWI");
      expect_reg(REG_STATUS, 32'd0, "reading MWI clears READY");

      // overrun: two results without reading MWI in between
      present(1, 2, 3, 4);
      present(5, 6, 7, 8);
      expect_reg(REG_STATUS, READY | OVERRUN, "OVERRUN after a missed result");
      expect_reg(REG_MWI, 32'd8, "MWI holds the newest result");
      expect_reg(REG_STATUS, OVERRUN, "OVERRUN is sticky");
      wr(off(REG_STATUS), OVERRUN);
      expect_reg(REG_STATUS, 32'd0, "writing 1 clears OVERRUN");

      // interrupt enable
      wr(off(REG_CTRL), 32'(1) << CTRL_IRQ_EN_BIT);
      expect_reg(REG_CTRL, 32'(1) << CTRL_IRQ_EN_BIT, "IRQ_EN reads back");
      check("irq low while not READY", longint'(irq), 0);
      present(9, 10, 11, 12);
      @(posedge aclk); #1;
      check("irq follows READY", longint'(irq), 1);
      expect_reg(REG_MWI, 32'd12, "MWI under irq");
      @(posedge aclk); #1;
      check("irq drops once MWI is read", longint'(irq), 0);
      wr(off(REG_CTRL), 32'd0);
      present(13, 14, 15, 16);
      @(posedge aclk); #1;
      check("irq masked without IRQ_EN", longint'(irq), 0);

      // clear
      begin
        automatic int n0 = clear_pulses;
        present(17, 18, 19, 20);
        wr(off(REG_CTRL), 32'(1) << CTRL_CLEAR_BIT);
        repeat (2) @(posedge aclk);
        check("one chain_clear pulse", longint'(clear_pulses - n0), 1);
        expect_reg(REG_STATUS, 32'd0, "CLEAR clears the flags");
        expect_reg(REG_COUNT, 32'd0, "CLEAR zeroes COUNT");
        expect_reg(REG_CTRL, 32'd0, "CLEAR bit reads as zero");
      end

      // unmapped offsets
      for (int a = 8; a < 16; a++) begin
        wr(ADDR_W'(a << 2), 32'hdead_beef, AXI_RESP_SLVERR);
        rd(ADDR_W'(a << 2), d, AXI_RESP_SLVERR);
      end
      expect_reg(REG_COUNT, 32'd0, "unmapped writes change nothing");
      // writes to read-only registers are ignored
      wr(off(REG_COUNT), 32'd55);
      expect_reg(REG_COUNT, 32'd0, "COUNT is read-only");
    end

    check("master stalls exercised on B", longint'(bus.b_stalls > 0), 1);
    check("master stalls exercised on R", longint'(bus.r_stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
