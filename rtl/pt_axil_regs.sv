// pt_axil_regs: AXI4-Lite slave and register file of the Pan-Tompkins accelerator.
//
// The host processor drives the accelerator through eight 32-bit registers
// (offsets in pt_pkg): it writes one ECG sample to SAMPLE, which issues a one-cycle
// sample_valid pulse into the filter chain, then polls STATUS.READY (or waits for
// irq) and reads MWI, plus BP and DERIV for the peak classification it does in
// software. Reading MWI clears READY; a result that arrives while READY is still
// set also sets the sticky OVERRUN flag (cleared by writing 1 to STATUS bit 1).
// Writing 1 to CTRL.CLEAR empties every delay line of the chain and zeroes the
// sample counter and the flags. CTRL.IRQ_EN routes READY to irq.
//
// Bus behaviour: the write address and write data channels are accepted
// independently; once both are held the write takes effect and a response is
// raised, and no new address or data is accepted until it is taken. A read is
// answered one clock after its address is accepted; no new address is accepted
// while the data waits. Unmapped offsets answer SLVERR, writes to read-only
// registers are ignored with OKAY, and write strobes are not used (the host writes
// whole words). aresetn is synchronous and active low.
//
// Only the use of AXI4-Lite comes from the accelerator's description; the
// register map, the flags, the interrupt and the channel timing are this design's
// own choices.
module pt_axil_regs
  import pt_pkg::*;
#(
  parameter int ADDR_W = 6,
  parameter int DATA_W = 16,
  parameter int BP_W   = DATA_W + 3,
  parameter int SQ_W   = 2*DATA_W
) (
  input  logic                    aclk,
  input  logic                    aresetn,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]       s_axi_awaddr,
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [31:0]             s_axi_wdata,
  input  logic [3:0]              s_axi_wstrb,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  output logic [1:0]              s_axi_bresp,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  input  logic [ADDR_W-1:0]       s_axi_araddr,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  output logic [31:0]             s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready,
  // filter chain side
  output logic                    chain_clear,
  output logic                    sample_valid,
  output logic signed [DATA_W-1:0] sample_data,
  input  logic signed [BP_W-1:0]  bp_data,
  input  logic signed [BP_W-1:0]  deriv_data,
  input  logic [SQ_W-1:0]         sq_data,
  input  logic                    mwi_valid,
  input  logic [SQ_W-1:0]         mwi_data,
  output logic                    irq
);

  // ---------------------------------------------------------------- registers
  logic        irq_en, ready, overrun;
  logic [31:0] count;
  logic [31:0] res_mwi, res_bp, res_deriv, res_sq;

  // ---------------------------------------------------------------- write path
  logic              aw_held, w_held;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]       w_data;
  logic              do_write;
  logic [ADDR_W-3:0] w_word;
  logic              w_mapped;

  assign s_axi_awready = !aw_held && !s_axi_bvalid;
  assign s_axi_wready  = !w_held  && !s_axi_bvalid;
  assign do_write      = aw_held && w_held && !s_axi_bvalid;
  assign w_word        = aw_addr[ADDR_W-1:2];
  assign w_mapped      = (w_word < 8);

  // ---------------------------------------------------------------- read path
  logic [ADDR_W-3:0] r_word;
  logic              r_accept;
  logic              r_clears_ready;

  assign s_axi_arready  = !s_axi_rvalid;
  assign r_accept       = s_axi_arvalid && s_axi_arready;
  assign r_word         = s_axi_araddr[ADDR_W-1:2];
  assign r_clears_ready = r_accept && (r_word == (ADDR_W-2)'(REG_MWI));

  logic clear_now;
  assign clear_now = do_write && w_mapped && (w_word == (ADDR_W-2)'(REG_CTRL))
                     && w_data[CTRL_CLEAR_BIT];

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      aw_held      <= 1'b0;
      w_held       <= 1'b0;
      aw_addr      <= '0;
      w_data       <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= AXI_RESP_OKAY;
      s_axi_rvalid <= 1'b0;
      s_axi_rresp  <= AXI_RESP_OKAY;
      s_axi_rdata  <= '0;
      irq_en       <= 1'b0;
      ready        <= 1'b0;
      overrun      <= 1'b0;
      count        <= '0;
      res_mwi      <= '0;
      res_bp       <= '0;
      res_deriv    <= '0;
      res_sq       <= '0;
      chain_clear  <= 1'b0;
      sample_valid <= 1'b0;
      sample_data  <= '0;
    end else begin
      chain_clear  <= 1'b0;
      sample_valid <= 1'b0;

      // write channels
      if (s_axi_awvalid && s_axi_awready) begin
        aw_held <= 1'b1;
        aw_addr <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_held <= 1'b1;
        w_data <= s_axi_wdata;
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      // results from the chain
      if (mwi_valid) begin
        res_mwi   <= 32'(mwi_data);
        res_bp    <= 32'(bp_data);
        res_deriv <= 32'(deriv_data);
        res_sq    <= 32'(sq_data);
        ready     <= 1'b1;
        if (ready && !r_clears_ready) overrun <= 1'b1;
      end else if (r_clears_ready) begin
        ready <= 1'b0;
      end

      if (do_write) begin
        aw_held      <= 1'b0;
        w_held       <= 1'b0;
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= w_mapped ? AXI_RESP_OKAY : AXI_RESP_SLVERR;
        if (w_mapped) begin
          unique case (reg_idx_e'(w_word[2:0]))
            REG_CTRL: begin
              irq_en <= w_data[CTRL_IRQ_EN_BIT];
              if (w_data[CTRL_CLEAR_BIT]) chain_clear <= 1'b1;
            end
            REG_STATUS: if (w_data[STATUS_OVERRUN_BIT]) overrun <= 1'b0;
            REG_SAMPLE: begin
              sample_data  <= w_data[DATA_W-1:0];
              sample_valid <= 1'b1;
              count        <= count + 32'd1;
            end
            default: ;  // read-only registers
          endcase
        end
      end

      // CLEAR wins over a result arriving in the same cycle
      if (clear_now) begin
        ready   <= 1'b0;
        overrun <= 1'b0;
        count   <= '0;
      end

      // read channel
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (r_accept) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= (r_word < 8) ? AXI_RESP_OKAY : AXI_RESP_SLVERR;
        s_axi_rdata  <= '0;
        if (r_word < 8) begin
          unique case (reg_idx_e'(r_word[2:0]))
            REG_CTRL:   s_axi_rdata <= 32'(irq_en) << CTRL_IRQ_EN_BIT;
            REG_STATUS: s_axi_rdata <= (32'(overrun) << STATUS_OVERRUN_BIT)
                                     | (32'(ready)   << STATUS_READY_BIT);
            REG_SAMPLE: s_axi_rdata <= 32'(sample_data);
            REG_MWI:    s_axi_rdata <= res_mwi;
            REG_BP:     s_axi_rdata <= res_bp;
            REG_DERIV:  s_axi_rdata <= res_deriv;
            REG_SQUARE: s_axi_rdata <= res_sq;
            REG_COUNT:  s_axi_rdata <= count;
          endcase
        end
      end
    end
  end

  assign irq = irq_en && ready;

  // Write strobes and the byte-offset address bits are not used: the host
  // accesses whole, aligned words.
  logic unused_wstrb;
  assign unused_wstrb = ^{s_axi_wstrb, s_axi_araddr[1:0], aw_addr[1:0]};

  // AXI rule: a raised response stays up, unchanged, until it is taken.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
