// Full-size subcarrier-spacing sweep: txr_top with every parameter at its default
// (15.36 Msample/s; modulators of 1024, 512 and 256 points). It loads and transmits
// a 10 ms grid at 15 kHz spacing (FFT 1024, 624 subcarriers = 52 resource blocks,
// 140 symbols, 14 prefix lengths: 80 for symbols 0 and 7, else 72), then, without
// reset, a 10 ms grid at 60 kHz spacing (FFT 256, 132 subcarriers = 11 resource
// blocks, 560 symbols, 56 prefix lengths: 26 for symbols 0 and 28, else 18). The
// second load switches the active modulator through the FFT size register alone.
// A third grid keeps 60 kHz but uses the extended prefix (64 samples on every
// symbol, 12 symbols per slot, 480 symbols, 48 prefix lengths).
// For each grid every output sample is compared within 4 LSB with a floating-point
// model (inverse DFT of the centred grid / sqrt(N), prefix first, rounded, clipped),
// the largest error is checked against 8.12e-3 of full scale (the error the
// original transmitter reported against its reference waveform), and the frame must
// be 153600 samples (10 ms) on consecutive cycles. Grid elements are random QPSK
// symbols on the first 4 symbols of each slot and on a sparse comb elsewhere.
`timescale 1ns/1ps
module tb_txr_full_scs;
  import txr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NMAX = 1024, NEMAX = 87360;

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

  // current configuration (set by run_grid)
  int    N, K, NSYM, NCP, NE;
  iq16_t grid [NEMAX];
  int    cpt  [64];
  real   cs [NMAX], sn [NMAX];
  int    sym_start [561];
  real   max_err;

  // expected sample p of the frame
  function automatic void expect_sample(int p, output int ei, output int eq,
                                        output real ri, output real rq);
    int s, q, cp, t; real ai, aq;
    s = p / (N + 18);
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
      a  = ((b * t) % N) * (NMAX / N);
      gi = real'(s16(grid[s * K + e].i)); gq = real'(s16(grid[s * K + e].q));
      ai += gi * cs[a] - gq * sn[a];
      aq += gi * sn[a] + gq * cs[a];
    end
    ri = ai / $sqrt(real'(N)); rq = aq / $sqrt(real'(N));
    ei = (ri > 32767.0) ? 32767 : (ri < -32768.0) ? -32768 : int'(ri);
    eq = (rq > 32767.0) ? 32767 : (rq < -32768.0) ? -32768 : int'(rq);
  endfunction

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  bit running = 0;
  int outp = 0, first_cycle = -1, last_cycle = -1, cyc = 0, flushes = 0, frames_checked = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_bank.pad_sent) flushes++;
    if (rst_n && tx_valid) begin
      int ei, eq; real ri, rq, err;
      if (!running) check(0, "output while no grid is being transmitted");
      if (first_cycle < 0) first_cycle = cyc;
      last_cycle = cyc;
      if (running && outp < sym_start[NSYM]) begin
        expect_sample(outp, ei, eq, ri, rq);
        check(s16(c1i) - ei <= 4 && s16(c1i) - ei >= -4 && s16(c1q) - eq <= 4 && s16(c1q) - eq >= -4,
              $sformatf("N=%0d sample %0d: got %0d,%0d exp %0d,%0d", N, outp, s16(c1i), s16(c1q), ei, eq));
        err = fabs(real'(s16(c1i)) - ri) / 32768.0;
        if (err > max_err) max_err = err;
        err = fabs(real'(s16(c1q)) - rq) / 32768.0;
        if (err > max_err) max_err = err;
      end else check(0, "sample beyond the frame");
      outp++;
    end
  end

  // load one grid with its prefix table, transmit it once and check the frame
  task automatic run_grid(int n, int k, int nsym, int ncp, bit ext = 0);
    localparam int A = 5793;  // QPSK amplitude, 0.177 of full scale
    int long_cp, norm_cp;
    N = n; K = k; NSYM = nsym; NCP = ncp; NE = K * NSYM;
    // 5G normal prefix at this sample rate: 144*N/2048 samples, plus 16*NMAX/2048
    // (the same 8 samples for every spacing) for the first symbol of each half subframe
    norm_cp = 144 * N / 2048; long_cp = norm_cp + 16 * NMAX / 2048;
    for (int j = 0; j < NCP; j++) cpt[j] = (j % (NCP / 2) == 0) ? long_cp : norm_cp;
    // extended prefix (60 kHz only): 512*N/2048 samples on every symbol
    if (ext) for (int j = 0; j < NCP; j++) cpt[j] = 512 * N / 2048;
    sym_start[0] = 0;
    for (int s = 0; s < NSYM; s++) sym_start[s + 1] = sym_start[s] + N + cpt[s % NCP];
    for (int s = 0; s < NSYM; s++)
      for (int e = 0; e < K; e++) begin
        bit used; used = (s % 14 < 4) || (e % 12 == 3 && s % 14 == 7);
        grid[s * K + e].i = used ? (($urandom % 2) ? 16'(A) : -16'(A)) : '0;
        grid[s * K + e].q = used ? (($urandom % 2) ? 16'(A) : -16'(A)) : '0;
      end
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
    outp = 0; first_cycle = -1; last_cycle = -1; flushes = 0; max_err = 0.0; running = 1;
    reg_write(REG_TX_START, 1);
    reg_write(REG_TX_START, 0);
    while (outp == 0 || dut.bank_busy || dut.grid_reading) @(posedge clk);
    repeat (20) @(posedge clk);
    running = 0;
    check(sym_start[NSYM] == 153600, "model frame is 10 ms");
    check(outp == 153600, $sformatf("N=%0d frame length %0d samples (10 ms at 15.36 MHz)", N, outp));
    check(last_cycle - first_cycle + 1 == outp, $sformatf("N=%0d samples on consecutive cycles", N));
    check(flushes == 1, $sformatf("N=%0d one flush symbol", N));
    check(max_err < 8.12e-3, $sformatf("N=%0d largest error %f of full scale", N, max_err));
    check(!dut.u_bank.cfg_error, "FFT size selects a modulator");
    $display("N=%0d K=%0d symbols=%0d prefixes=%0d: %0d samples over %0d cycles, largest error %e",
             N, K, NSYM, NCP, outp, last_cycle - first_cycle + 1, max_err);
    frames_checked++;
  endtask

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0;
    wdata = 0; wstrb = 0; mm2s_valid = 0; mm2s_data = 0; s2mm_ready = 1;
    N = 1024; K = 1; NSYM = 1; NCP = 1; NE = 1; max_err = 0.0;
    for (int j = 0; j < 561; j++) sym_start[j] = 0;
    for (int n = 0; n < NMAX; n++) begin
      cs[n] = $cos(2.0 * PI * real'(n) / real'(NMAX));
      sn[n] = $sin(2.0 * PI * real'(n) / real'(NMAX));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    run_grid(1024, 624, 140, 14);   // 15 kHz
    run_grid(256, 132, 560, 56);    // 60 kHz, modulator switch
    run_grid(256, 132, 480, 48, 1); // 60 kHz, extended prefix, 12 symbols per slot
    check(frames_checked == 3, "both spacings transmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
