// End-to-end testbench for txr_top at reduced sizes (FFT_MAX = 64: modulators of
// 64, 32 and 16 points; 1024-word grid RAM).
// Drives the design the way the host does: AXI4-Lite register writes and AXI-Stream
// loading of a cyclic prefix table and a resource grid, then transmission, and
// capture read-back over the second AXI-Stream. Two configurations are run:
//   A: FFT 32, 24 subcarriers, 28 symbols, 28 CP lengths, two frames back to back;
//   B: FFT 16, 12 subcarriers, 56 symbols, 56 CP lengths, one frame.
// Every transmitted sample is compared (within 4 LSB) with a floating-point model:
// inverse DFT of the centred grid symbol, times 1/sqrt(N), its cyclic prefix first,
// rounded and clipped to 16 bits. Also checked: the sample count, no gap in tx_valid
// while frames play, both channels equal, the captured grid elements, CP lengths and
// transmit samples match what entered and left the modulator, and register readback.
// Each mechanism is counted and must occur at least once: input FIFO reset, writes
// to each RAM, frame repetition, end-of-transmission flush, SCS (modulator) switch,
// captures of each source, and stream back-pressure on the loading interface.
`timescale 1ns/1ps
module tb_txr_top;
  import txr_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr, araddr; logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic [31:0] wdata, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic arvalid, arready, rvalid, rready;
  logic [31:0] mm2s_data, s2mm_data; logic mm2s_valid, mm2s_ready, s2mm_valid, s2mm_ready;
  logic [15:0] c1i, c1q, c2i, c2q; logic tx_valid;
  int checks = 0, failures = 0;

  txr_top #(.FFT_MAX(64), .GRID_DEPTH(1024), .CP_DEPTH(64), .IN_FIFO_DEPTH(16),
            .GRID_FIFO_DEPTH(8), .CAP_FIFO_DEPTH(64), .NB(4)) dut (
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

  // ---------------- host-side AXI tasks ----------------
  task automatic reg_write(reg_idx_e r, logic [31:0] d);
    @(negedge clk);
    awaddr = 6'(r) << 2; wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1; bready = 1;
    while (!awready) @(negedge clk);
    @(posedge clk); #1; awvalid = 0; wvalid = 0;
    while (!bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1; bready = 0;
  endtask

  task automatic reg_read(reg_idx_e r, output logic [31:0] d);
    @(negedge clk);
    araddr = 6'(r) << 2; arvalid = 1; rready = 1;
    while (!arready) @(negedge clk);
    @(posedge clk); #1; arvalid = 0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata;
    @(posedge clk); #1; rready = 0;
  endtask

  int n_backpressure = 0;
  task automatic stream_word(logic [31:0] d);
    @(negedge clk); mm2s_data = d; mm2s_valid = 1;
    while (!mm2s_ready) begin n_backpressure++; @(negedge clk); end
    @(posedge clk); #1;
    if ($urandom % 4 == 0) begin mm2s_valid = 0; @(negedge clk); end
  endtask

  // ---------------- configuration and reference ----------------
  int N, K, NSYM, NCP;
  iq16_t grid [];
  int cpt [];
  int exp_i [], exp_q [];
  int frame_len;

  task automatic make_config(int n, int k, int nsym, int ncp);
    int p;
    N = n; K = k; NSYM = nsym; NCP = ncp;
    grid = new[K * NSYM];
    cpt = new[NCP];
    for (int j = 0; j < NCP; j++) cpt[j] = (j % (NCP / 2) == 0) ? N / 8 + 1 : N / 8;
    for (int e = 0; e < K * NSYM; e++) begin
      grid[e].i = 16'($urandom_range(0, 8000) - 4000);
      grid[e].q = 16'($urandom_range(0, 8000) - 4000);
    end
    frame_len = 0;
    for (int s = 0; s < NSYM; s++) frame_len += N + cpt[s % NCP];
    exp_i = new[frame_len]; exp_q = new[frame_len];
    p = 0;
    for (int s = 0; s < NSYM; s++) begin
      int cp; cp = cpt[s % NCP];
      for (int q = 0; q < N + cp; q++) begin
        int t; real ai, aq;
        t = (q < cp) ? N - cp + q : q - cp;
        ai = 0.0; aq = 0.0;
        for (int e = 0; e < K; e++) begin
          int b; real ang, gi, gq;
          b = ((e - K / 2) % N + N) % N;
          ang = 2.0 * PI * real'(b * t) / real'(N);
          gi = real'(s16(grid[s * K + e].i)); gq = real'(s16(grid[s * K + e].q));
          ai += gi * $cos(ang) - gq * $sin(ang);
          aq += gi * $sin(ang) + gq * $cos(ang);
        end
        ai = ai / $sqrt(real'(N)); aq = aq / $sqrt(real'(N));
        exp_i[p] = (ai > 32767.0) ? 32767 : (ai < -32768.0) ? -32768 : int'(ai);
        exp_q[p] = (aq > 32767.0) ? 32767 : (aq < -32768.0) ? -32768 : int'(aq);
        p++;
      end
    end
  endtask

  int n_fifo_reset = 0, n_cp_writes = 0, n_grid_writes = 0, n_frames = 0, n_flush = 0;
  int n_mode_switch = 0, n_cap [4] = '{0, 0, 0, 0};

  task automatic load_config(int fft);
    logic [31:0] d;
    reg_write(REG_TX_START, 0);
    reg_write(REG_FIFO_RESET, 1); n_fifo_reset++;
    // a word offered while the FIFO is held in reset must wait
    @(negedge clk); mm2s_data = 32'hFFFF_FFFF; mm2s_valid = 1;
    repeat (3) begin @(negedge clk); if (!mm2s_ready) n_backpressure++; end
    mm2s_valid = 0;
    reg_write(REG_FIFO_RESET, 0);
    reg_write(REG_NUM_ELEMENTS, 32'(K * NSYM));
    reg_write(REG_NUM_SUBCARRIER, 32'(K));
    reg_read(REG_FFT_SIZE, d);
    if (d != 0 && d != 32'(fft)) n_mode_switch++;
    reg_write(REG_FFT_SIZE, 32'(fft));
    reg_write(REG_NUM_CP, 32'(NCP));
    reg_write(REG_WRITE_CP, 1);
    for (int j = 0; j < NCP; j++) stream_word(32'(cpt[j]));
    @(negedge clk); mm2s_valid = 0; repeat (4) @(negedge clk);
    reg_write(REG_WRITE_CP, 0);
    for (int e = 0; e < K * NSYM; e++) stream_word(grid[e]);
    @(negedge clk); mm2s_valid = 0; repeat (4) @(negedge clk);
    reg_read(REG_NUM_ELEMENTS, d);
    check(d == 32'(K * NSYM), "register readback");
  endtask

  // ---------------- monitors ----------------
  int outp = 0, gaps = 0; bit playing = 0; int out_total = 0;
  int tx_log_i [$], tx_log_q [$];
  logic [31:0] grid_log [$], cp_log [$], mod_log [$];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cp.wr_en) n_cp_writes++;
    if (dut.u_grid.wr_en) n_grid_writes++;
    if (dut.u_bank.pad_sent) n_flush++;
    if (dut.grid_fire) begin grid_log.push_back(dut.grid_data); cp_log.push_back(32'(dut.cp_len)); end
    if (dut.mod_valid) mod_log.push_back({dut.mod_data.q[FFT_W-1 -: 16], dut.mod_data.i[FFT_W-1 -: 16]});
    if (tx_valid) begin
      playing = 1;
      check(s16(c1i) - exp_i[outp] <= 4 && s16(c1i) - exp_i[outp] >= -4 &&
            s16(c1q) - exp_q[outp] <= 4 && s16(c1q) - exp_q[outp] >= -4,
            $sformatf("sample %0d: got %0d,%0d exp %0d,%0d", outp, s16(c1i), s16(c1q), exp_i[outp], exp_q[outp]));
      check(c2i == c1i && c2q == c1q, "channel 2 equals channel 1");
      tx_log_i.push_back(s16(c1i)); tx_log_q.push_back(s16(c1q));
      outp++; out_total++;
      if (outp == frame_len) begin outp = 0; n_frames++; playing = 0; end
    end else if (playing) gaps++;
  end

  // captured words: match a contiguous run of the logged sequence
  task automatic capture(cap_sel_e sel, int len);
    logic [31:0] words [$];
    int off; bit ok;
    reg_write(REG_CAP_SELECT, 32'(sel));
    reg_write(REG_CAP_LENGTH, 32'(len));
    reg_write(REG_CAP_START, 1);
    s2mm_ready = 1;
    while (words.size() < len) begin
      @(posedge clk);
      if (s2mm_valid && s2mm_ready) words.push_back(s2mm_data);
    end
    reg_write(REG_CAP_START, 0);
    ok = 0;
    for (off = 0; off < 6000 && !ok; off++) begin
      bit m; m = 1;
      for (int w = 0; w < len && m; w++) begin
        logic [31:0] r;
        case (sel)
          CAP_TX_WAVE: r = (off + w < tx_log_i.size()) ? {16'(tx_log_q[off + w]), 16'(tx_log_i[off + w])} : 32'hx;
          CAP_GRID:    r = (off + w < grid_log.size()) ? grid_log[off + w] : 32'hx;
          CAP_CP_LEN:  r = (off + w < cp_log.size()) ? cp_log[off + w] : 32'hx;
          default:     r = (off + w < mod_log.size()) ? mod_log[off + w] : 32'hx;
        endcase
        m = (r === words[w]);
      end
      ok = m;
    end
    check(ok, $sformatf("captured source %0d matches the logged signal", sel));
    n_cap[sel]++;
  endtask

  task automatic wait_frames(int n);
    int target; target = n_frames + n;
    while (n_frames < target) @(posedge clk);
  endtask

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0;
    wdata = 0; wstrb = 0; mm2s_valid = 0; mm2s_data = 0; s2mm_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- configuration A: FFT 32 ----
    make_config(32, 24, 28, 28);
    load_config(32);
    check(n_cp_writes == 28 && n_grid_writes == 24 * 28, "words routed to the right RAM");
    reg_write(REG_TX_START, 1);
    fork
      begin
        capture(CAP_GRID, 40);
        capture(CAP_CP_LEN, 30);
        capture(CAP_TX_WAVE, 50);
        capture(CAP_MOD_RAW, 20);
      end
      wait_frames(1);
    join
    wait_frames(1);
    reg_write(REG_TX_START, 0);
    while (dut.bank_busy || dut.grid_reading) @(posedge clk);
    repeat (20) @(posedge clk);
    check(out_total == 3 * frame_len || out_total == 2 * frame_len, $sformatf("config A sample count %0d", out_total));
    check(outp == 0, "transmission ends at a frame boundary");

    // ---- configuration B: FFT 16 ----
    out_total = 0;
    make_config(16, 12, 56, 56);
    load_config(16);
    reg_write(REG_TX_START, 1);
    repeat (20) @(posedge clk);
    reg_write(REG_TX_START, 0);
    while (dut.bank_busy || dut.grid_reading || out_total == 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(out_total == frame_len, $sformatf("config B sample count %0d", out_total));
    check(gaps == 0, $sformatf("tx_valid gaps while playing: %0d", gaps));

    check(n_fifo_reset > 0, "mechanism: input FIFO reset");
    check(n_backpressure > 0, "mechanism: loading stream held off");
    check(n_frames >= 3, "mechanism: frames repeated while enabled");
    check(n_flush == 2, "mechanism: flush at the end of each transmission");
    check(n_mode_switch == 1, "mechanism: modulator switch");
    for (int s = 0; s < 4; s++) check(n_cap[s] > 0, $sformatf("mechanism: capture of source %0d", s));
    $display("mechanisms: fifo_reset=%0d backpressure=%0d cp_writes=%0d grid_writes=%0d frames=%0d flush=%0d switch=%0d captures=%0d/%0d/%0d/%0d",
             n_fifo_reset, n_backpressure, n_cp_writes, n_grid_writes, n_frames, n_flush, n_mode_switch,
             n_cap[0], n_cap[1], n_cap[2], n_cap[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
