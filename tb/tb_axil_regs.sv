// Self-checking testbench for axil_regs: writes every register with a distinct
// value (one with a partial byte strobe), reads each back through the AXI4-Lite read
// channel, checks the regs[] outputs, the SLVERR response for an address past the
// last register, the one-cycle write response and a held read response under
// RREADY back-pressure.
`timescale 1ns/1ps
module tb_axil_regs;
  import txr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr, araddr; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic [31:0] wdata, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic arvalid, arready, rvalid, rready;
  logic [31:0] regs [NREGS];
  int checks = 0, failures = 0;

  axil_regs #(.ADDR_W(6)) dut (.clk, .rst_n, .awaddr, .awvalid, .awready, .wdata, .wstrb,
    .wvalid, .wready, .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata,
    .rresp, .rvalid, .rready, .regs);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axil_write(int idx, logic [31:0] d, logic [3:0] s, output logic [1:0] resp);
    int lat;
    @(negedge clk);
    awaddr = 6'(idx * 4); wdata = d; wstrb = s; awvalid = 1; wvalid = 1; bready = 1;
    while (!awready) @(negedge clk);
    @(posedge clk); #1; awvalid = 0; wvalid = 0;
    lat = 0;
    while (!bvalid) begin @(posedge clk); #1; lat++; end
    check(lat == 0, "write response one cycle after the write");
    resp = bresp;
    @(posedge clk); #1; bready = 0;
  endtask

  task automatic axil_read(int idx, output logic [31:0] d, output logic [1:0] resp, input int stall);
    @(negedge clk);
    araddr = 6'(idx * 4); arvalid = 1; rready = 0;
    while (!arready) @(negedge clk);
    @(posedge clk); #1; arvalid = 0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata;
    repeat (stall) begin @(posedge clk); #1; check(rvalid && rdata == d, "read data held while RREADY low"); end
    rready = 1; resp = rresp;
    @(posedge clk); #1; rready = 0;
  endtask

  logic [31:0] expv [NREGS];
  initial begin
    logic [1:0] resp; logic [31:0] d;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NREGS; i++) check(regs[i] == 0, "reset value zero");
    for (int i = 0; i < NREGS; i++) begin
      expv[i] = $urandom;
      axil_write(i, expv[i], 4'hf, resp);
      check(resp == 2'b00, "OKAY write response");
    end
    // partial strobe on register 3: only byte 1 changes
    axil_write(3, 32'hAABBCCDD, 4'b0010, resp);
    expv[3][15:8] = 8'hCC;
    for (int i = 0; i < NREGS; i++) begin
      axil_read(i, d, resp, i % 3);
      check(d == expv[i], $sformatf("readback reg %0d", i));
      check(resp == 2'b00, "OKAY read response");
      check(regs[i] == expv[i], $sformatf("regs[%0d] output", i));
    end
    axil_write(12, 32'h12345678, 4'hf, resp);
    check(resp == 2'b10, "SLVERR on write past the register file");
    axil_read(13, d, resp, 0);
    check(resp == 2'b10, "SLVERR on read past the register file");
    for (int i = 0; i < NREGS; i++) check(regs[i] == expv[i], "no register changed by bad write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
