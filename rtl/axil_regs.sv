// AXI4-Lite slave holding the transmitter's ten 32-bit control registers.
//
// Register i sits at byte address 4*i (see txr_pkg::reg_idx_e); regs[i] is its
// current value, presented to the datapath every cycle. A write needs AWVALID and
// WVALID together; the register is updated in that cycle honouring WSTRB, and BVALID
// rises the next cycle and holds until BREADY. A read returns the register on the
// cycle after ARVALID is accepted, holding RVALID until RREADY. Addresses beyond the
// last register return SLVERR and writes to them are ignored. Only one transaction of
// each kind is outstanding (AWREADY/WREADY low while BVALID is high, ARREADY low
// while RVALID is high). All registers reset to zero. The register set follows the
// transmitter description; the addresses, the response codes and the handshake
// timing are this design's choice.
module axil_regs
  import txr_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic              arvalid,
  output logic              arready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rvalid,
  input  logic              rready,
  output logic [31:0]       regs [NREGS]
);
  logic              do_wr, do_rd;
  logic [ADDR_W-3:0] widx, ridx;

  assign awready = !bvalid && awvalid && wvalid;
  assign wready  = awready;
  assign do_wr   = awready;
  assign arready = !rvalid;
  assign do_rd   = arvalid && arready;
  assign widx    = awaddr[ADDR_W-1:2];
  assign ridx    = araddr[ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs   <= '{default: '0};
      bvalid <= 1'b0;
      bresp  <= 2'b00;
      rvalid <= 1'b0;
      rresp  <= 2'b00;
      rdata  <= '0;
    end else begin
      if (do_wr) begin
        bvalid <= 1'b1;
        if (32'(widx) < NREGS) begin
          bresp <= 2'b00;
          for (int b = 0; b < 4; b++)
            if (wstrb[b]) regs[widx][8*b +: 8] <= wdata[8*b +: 8];
        end else begin
          bresp <= 2'b10;
        end
      end else if (bready) begin
        bvalid <= 1'b0;
      end
      if (do_rd) begin
        rvalid <= 1'b1;
        if (32'(ridx) < NREGS) begin
          rdata <= regs[ridx];
          rresp <= 2'b00;
        end else begin
          rdata <= '0;
          rresp <= 2'b10;
        end
      end else if (rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata));
endmodule
