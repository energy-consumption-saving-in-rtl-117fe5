// axil_if: AXI4-Lite bundle with a simple master model, for the testbenches.
//
// Carries the five AXI4-Lite channels. The tasks act as a bus master: write()
// offers address and data (the data after a random delay of 0-2 clocks, so the
// two channels are accepted independently) and waits for the response; read()
// offers an address and waits for the data. With 'stall' set, the master holds
// bready / rready low for a random number of clocks after a response appears, to make
// the slave keep it (and keeps it low until one does); the clocks a response
// waits that way are counted in b_stalls and r_stalls. All signals are driven at the falling edge and handshakes are judged
// there, so nothing races the rising edge at which the slave samples them.
interface axil_if #(parameter int ADDR_W = 6) (input logic aclk);

  logic [ADDR_W-1:0] awaddr;
  logic              awvalid, awready;
  logic [31:0]       wdata;
  logic [3:0]        wstrb;
  logic              wvalid, wready;
  logic [1:0]        bresp;
  logic              bvalid, bready;
  logic [ADDR_W-1:0] araddr;
  logic              arvalid, arready;
  logic [31:0]       rdata;
  logic [1:0]        rresp;
  logic              rvalid, rready;

  bit stall    = 1'b0;
  int b_stalls = 0;
  int r_stalls = 0;

  task automatic init();
    awaddr = '0; awvalid = 1'b0; wdata = '0; wstrb = '0; wvalid = 1'b0;
    bready = 1'b0; araddr = '0; arvalid = 1'b0; rready = 1'b0;
  endtask

  task automatic write(input logic [ADDR_W-1:0] addr, input logic [31:0] data,
                       output logic [1:0] resp);
    bit aw_pend = 1'b1, w_pend = 1'b1, aw_fire, w_fire, b_fire;
    int wdelay  = stall ? $urandom_range(0, 2) : 0;
    @(negedge aclk);
    awaddr  = addr;
    awvalid = 1'b1;
    wdata   = data;
    wstrb   = 4'hf;
    wvalid  = (wdelay == 0);
    while (aw_pend || w_pend) begin
      aw_fire = awvalid && awready;
      w_fire  = wvalid && wready;
      @(negedge aclk);
      if (aw_fire) begin aw_pend = 1'b0; awvalid = 1'b0; end
      if (w_fire)  begin w_pend  = 1'b0; wvalid  = 1'b0; end
      if (w_pend && !wvalid) begin
        wdelay--;
        if (wdelay <= 0) wvalid = 1'b1;
      end
    end
    do begin
      if (stall && (!bvalid || $urandom_range(0, 1) == 1)) begin
        if (bvalid) b_stalls++;
        bready = 1'b0;
      end else begin
        bready = 1'b1;
      end
      b_fire = bvalid && bready;
      resp   = bresp;
      @(negedge aclk);
    end while (!b_fire);
    bready = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    bit ar_fire, r_fire;
    @(negedge aclk);
    araddr  = addr;
    arvalid = 1'b1;
    do begin
      ar_fire = arvalid && arready;
      @(negedge aclk);
    end while (!ar_fire);
    arvalid = 1'b0;
    do begin
      if (stall && (!rvalid || $urandom_range(0, 1) == 1)) begin
        if (rvalid) r_stalls++;
        rready = 1'b0;
      end else begin
        rready = 1'b1;
      end
      r_fire = rvalid && rready;
      data   = rdata;
      resp   = rresp;
      @(negedge aclk);
    end while (!r_fire);
    rready = 1'b0;
  endtask

endinterface
