// pt_accel: Pan-Tompkins filtering accelerator for an embedded processor.
//
// Offloads the filtering part of the Pan-Tompkins QRS detector, the part where a
// processor running the whole algorithm spends most of its time. With this split
// a speed-up of about ten in clock cycles per ECG record has been reported. The
// saved time can either be spent idle (less energy per sample) or traded for a
// clock ten times slower (less power at the same sample rate); the accelerator is
// small, so its own power is a minor addition.
//
// Structure: an AXI4-Lite slave (pt_axil_regs) in front of the filter chain
// (pt_filter_chain: 15 Hz low-pass, 5 Hz high-pass, derivative, square, 32-sample
// moving-window integration). The processor writes a sample to SAMPLE (0x08); six
// clocks after the write response is raised STATUS.READY (and irq, if enabled)
// rises, and MWI (0x0C), BP (0x10), DERIV (0x14) and SQUARE (0x18) hold the results
// for that sample. Peak detection and thresholding stay in software.
//
// Timing: one sample per AXI write; a write completes in two clocks with an
// always-ready master, so the chain never limits the rate. All state is reset by
// aresetn (synchronous, active low) or by CTRL.CLEAR.
//
// The split between hardware and software, the filter stages and the AXI4-Lite
// attachment follow the accelerator as described; register map, widths and
// handshakes are this design's own choices.
module pt_accel #(
  parameter int DATA_W  = 16,
  parameter int MWI_WIN = 32,
  parameter int ADDR_W  = 6
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic              irq
);

  localparam int BP_W = DATA_W + 3;
  localparam int SQ_W = 2*DATA_W;

  logic                     chain_clear, sample_valid, mwi_valid;
  logic signed [DATA_W-1:0] sample_data;
  logic signed [BP_W-1:0]   bp_data, deriv_data;
  logic [SQ_W-1:0]          sq_data, mwi_data;

  pt_axil_regs #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .BP_W(BP_W), .SQ_W(SQ_W)) u_regs (
    .aclk, .aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .chain_clear, .sample_valid, .sample_data,
    .bp_data, .deriv_data, .sq_data, .mwi_valid, .mwi_data,
    .irq
  );

  pt_filter_chain #(.DATA_W(DATA_W), .MWI_WIN(MWI_WIN)) u_chain (
    .clk      (aclk),
    .rst_n    (aresetn),
    .clear    (chain_clear),
    .in_valid (sample_valid),
    .in_data  (sample_data),
    .bp_data, .deriv_data, .sq_data, .mwi_valid, .mwi_data
  );

endmodule
