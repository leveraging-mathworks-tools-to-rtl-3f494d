// Full-size testbench: txr_top with every parameter at its default (modulators of
// 1024, 512 and 256 points, i.e. 15/30/60 kHz spacing at 15.36 Msample/s; 131072-
// element grid RAM). It runs the transmitter's reference case: a 10 ms downlink grid
// at 30 kHz subcarrier spacing (FFT 512) with 288 subcarriers (24 resource blocks)
// and 280 symbols (80640 elements), and the 28 cyclic prefix lengths of one
// subframe (44 samples for the first symbol of each half subframe, 36 otherwise).
// The grid is loaded over AXI-Stream, transmitted once, and every one of the 153600
// output samples (10 ms at 15.36 MHz) is compared within 4 LSB with a floating-point
// model (inverse DFT of the centred grid / sqrt(N), prefix first, rounded, clipped).
// Also checks that the frame leaves as 153600 consecutive valid cycles and that one
// flush symbol ends the transmission. Grid elements are random QPSK symbols on the
// first 4 symbols of each slot and on a sparse comb elsewhere, the rest zero.
`timescale 1ns/1ps
module tb_txr_full;
  import txr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int N = 512, K = 288, NSYM = 280, NCP = 28, NE = K * NSYM;

  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr, araddr; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic [31:0] wdata, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic arvalid, arready, rvalid, rready;
  logic [31:0] mm2s_data, s2mm_data; logic mm2s_valid, mm2s_ready, s2mm_valid, s2mm_ready;
  logic [15:0] c1i, c1q, c2i, c2q; logic tx_valid;
  int checks = 0, failures = 0;

  txr_top dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .mm2s_dma_data(mm2s_data), .mm2s_dma_valid(mm2s_valid), .mm2s_dma_ready(mm2s_ready),
    .s2mm_dma_data(s2mm_data), .s2mm_dma_valid(s2mm_valid), .s2mm_dma_ready(s2mm_ready),
    .tx_ch1_i_data(c1i), .tx_ch1_q_data(c1q), .tx_ch2_i_data(c2i), .tx_ch2_q_data(c2q),
    .tx_valid(tx_valid));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask
  function automatic int s16(logic [15:0] x); return int'({{16{x[15]}}, x}); endfunction

  task automatic reg_write(reg_idx_e r, logic [31:0] d);
    @(negedge clk);
    awaddr = 6'(r) << 2; wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1; bready = 1;
    while (!awready) @(negedge clk);
    @(posedge clk); #1; awvalid = 0; wvalid = 0;
    while (!bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1; bready = 0;
  endtask

  task automatic stream_word(logic [31:0] d);
    @(negedge clk); mm2s_data = d; mm2s_valid = 1;
    while (!mm2s_ready) @(negedge clk);
    @(posedge clk); #1;
  endtask

  iq16_t grid [NE];
  int    cpt  [NCP];
  real   cs [N], sn [N];
  int    sym_start [NSYM + 1];

  // expected sample p of the frame
  function automatic void expect_sample(int p, output int ei, output int eq);
    int s, q, cp, t; real ai, aq;
    s = p / (N + 36);
    if (s > NSYM - 1) s = NSYM - 1;
    while (sym_start[s + 1] <= p) s++;
    while (sym_start[s] > p) s--;
    cp = cpt[s % NCP];
    q  = p - sym_start[s];
    t  = (q < cp) ? N - cp + q : q - cp;
    ai = 0.0; aq = 0.0;
    for (int e = 0; e < K; e++) begin
      int b, a; real gi, gq;
      if (grid[s * K + e] == '0) continue;
      b  = ((e - K / 2) % N + N) % N;
      a  = (b * t) % N;
      gi = real'(s16(grid[s * K + e].i)); gq = real'(s16(grid[s * K + e].q));
      ai += gi * cs[a] - gq * sn[a];
      aq += gi * sn[a] + gq * cs[a];
    end
    ai = ai / $sqrt(real'(N)); aq = aq / $sqrt(real'(N));
    ei = (ai > 32767.0) ? 32767 : (ai < -32768.0) ? -32768 : int'(ai);
    eq = (aq > 32767.0) ? 32767 : (aq < -32768.0) ? -32768 : int'(aq);
  endfunction

  int outp = 0, first_cycle = -1, last_cycle = -1, cyc = 0, flushes = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_bank.pad_sent) flushes++;
    if (rst_n && tx_valid) begin
      int ei, eq;
      if (first_cycle < 0) first_cycle = cyc;
      last_cycle = cyc;
      if (outp < sym_start[NSYM]) begin
        expect_sample(outp, ei, eq);
        check(s16(c1i) - ei <= 4 && s16(c1i) - ei >= -4 && s16(c1q) - eq <= 4 && s16(c1q) - eq >= -4,
              $sformatf("sample %0d: got %0d,%0d exp %0d,%0d", outp, s16(c1i), s16(c1q), ei, eq));
      end else check(0, "sample beyond the frame");
      outp++;
    end
  end

  initial begin
    localparam int A = 5793;  // QPSK amplitude, 0.177 of full scale
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0;
    wdata = 0; wstrb = 0; mm2s_valid = 0; mm2s_data = 0; s2mm_ready = 1;
    for (int n = 0; n < N; n++) begin
      cs[n] = $cos(2.0 * PI * real'(n) / real'(N));
      sn[n] = $sin(2.0 * PI * real'(n) / real'(N));
    end
    for (int j = 0; j < NCP; j++) cpt[j] = (j % 14 == 0) ? 44 : 36;
    sym_start[0] = 0;
    for (int s = 0; s < NSYM; s++) sym_start[s + 1] = sym_start[s] + N + cpt[s % NCP];
    for (int s = 0; s < NSYM; s++)
      for (int e = 0; e < K; e++) begin
        bit used; used = (s % 14 < 4) || (e % 12 == 3 && s % 14 == 7);
        grid[s * K + e].i = used ? (($urandom % 2) ? 16'(A) : -16'(A)) : '0;
        grid[s * K + e].q = used ? (($urandom % 2) ? 16'(A) : -16'(A)) : '0;
      end
    repeat (3) @(posedge clk); rst_n = 1;
    reg_write(REG_FIFO_RESET, 1);
    reg_write(REG_FIFO_RESET, 0);
    reg_write(REG_NUM_ELEMENTS, NE);
    reg_write(REG_NUM_SUBCARRIER, K);
    reg_write(REG_FFT_SIZE, N);
    reg_write(REG_NUM_CP, NCP);
    reg_write(REG_WRITE_CP, 1);
    for (int j = 0; j < NCP; j++) stream_word(32'(cpt[j]));
    @(negedge clk); mm2s_valid = 0; repeat (4) @(negedge clk);
    reg_write(REG_WRITE_CP, 0);
    for (int e = 0; e < NE; e++) stream_word(grid[e]);
    @(negedge clk); mm2s_valid = 0; repeat (4) @(negedge clk);
    reg_write(REG_TX_START, 1);
    reg_write(REG_TX_START, 0);
    while (outp == 0 || dut.bank_busy || dut.grid_reading) @(posedge clk);
    repeat (20) @(posedge clk);
    check(outp == 153600, $sformatf("frame length %0d samples (10 ms at 15.36 MHz)", outp));
    check(last_cycle - first_cycle + 1 == outp, "samples on consecutive cycles");
    check(flushes == 1, "one flush symbol");
    $display("frame: %0d samples over %0d cycles", outp, last_cycle - first_cycle + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
