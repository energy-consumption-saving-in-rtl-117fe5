// pt_pkg: constants and types shared by the Pan-Tompkins filtering accelerator.
//
// Holds the register map of the AXI4-Lite slave (byte offsets of 32-bit words), the
// bit positions inside the control and status registers, and the AXI response codes.
// The register map and every width here are choices of this design; the algorithm
// only fixes the order of the filter stages and the 32-sample integration window
// at a 200 Hz sample rate.
package pt_pkg;

  // Register word index (byte offset = index * 4).
  typedef enum logic [2:0] {
    REG_CTRL   = 3'd0,  // 0x00 R/W  bit0 CLEAR (write 1, self-clearing), bit1 IRQ_EN
    REG_STATUS = 3'd1,  // 0x04 R/W1C bit0 READY (read only), bit1 OVERRUN (write 1 clears)
    REG_SAMPLE = 3'd2,  // 0x08 R/W  writing pushes one ECG sample into the filter chain
    REG_MWI    = 3'd3,  // 0x0C R    moving-window integral; reading clears READY
    REG_BP     = 3'd4,  // 0x10 R    band-passed signal (high-pass output), sign-extended
    REG_DERIV  = 3'd5,  // 0x14 R    derivative output, sign-extended
    REG_SQUARE = 3'd6,  // 0x18 R    squared derivative
    REG_COUNT  = 3'd7   // 0x1C R    samples accepted since reset or CLEAR
  } reg_idx_e;

  localparam int CTRL_CLEAR_BIT     = 0;
  localparam int CTRL_IRQ_EN_BIT    = 1;
  localparam int STATUS_READY_BIT   = 0;
  localparam int STATUS_OVERRUN_BIT = 1;

  typedef enum logic [1:0] {
    AXI_RESP_OKAY   = 2'b00,
    AXI_RESP_SLVERR = 2'b10
  } axi_resp_e;

endpackage
