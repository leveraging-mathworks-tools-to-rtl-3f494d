// Self-checking testbench for ofdm_mod_bank with FFT_MAX = 32 (modulators of 32, 16
// and 8 points). For each FFT size in turn it sends a short transmission of random
// grid symbols, with the subcarrier count and cyclic prefix lengths changing per
// mode, and compares every output sample with a floating-point inverse DFT of the
// centred grid (tolerance 24 LSB on a 2^21 full scale). It checks the sample count,
// log2n and active for each mode, that a transmission's samples are back to back,
// and that an FFT size matching no modulator raises cfg_error and accepts nothing.
`timescale 1ns/1ps
module tb_ofdm_mod_bank;
  import txr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NSYM = 4;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [31:0] fft_size; logic [15:0] num_sc;
  iq16_t in_data; logic in_valid, in_ready, in_last; logic [CP_W-1:0] in_cp;
  iqw_t out_data; logic out_valid, cfg_error, busy, pad_sent;
  logic [3:0] log2n; logic [1:0] active;
  int checks = 0, failures = 0;

  ofdm_mod_bank #(.FFT_MAX(32), .NB(4)) dut (.clk, .rst_n, .clear, .fft_size, .num_sc,
    .in_data, .in_valid, .in_ready, .in_last, .in_cp_len(in_cp), .out_data, .out_valid,
    .log2n, .active, .cfg_error, .busy, .pad_sent);

  always #5 clk = ~clk;

  function automatic int s24(logic [23:0] x); return int'({{8{x[23]}}, x}); endfunction
  function automatic int s16(logic [15:0] x); return int'({{16{x[15]}}, x}); endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  real exp_i [$], exp_q [$];
  int got = 0, gaps = 0; bit seen = 0;
  int cur_l2 = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      seen = 1;
      if (exp_i.size() == 0) check(0, "unexpected sample");
      else begin
        real di, dq;
        di = real'(s24(out_data.i)) - exp_i.pop_front();
        dq = real'(s24(out_data.q)) - exp_q.pop_front();
        check(di <= 24.0 && di >= -24.0 && dq <= 24.0 && dq >= -24.0,
              $sformatf("sample %0d error %f %f", got, di, dq));
        check(log2n == 4'(cur_l2), "log2n of the active modulator");
      end
      got++;
    end else if (seen && exp_i.size() != 0) gaps++;
  end

  task automatic run_mode(int n, int k, int l2);
    iq16_t g [NSYM][];
    int cps [NSYM];
    cur_l2 = l2;
    @(negedge clk); fft_size = 32'(n); num_sc = 16'(k);
    for (int s = 0; s < NSYM; s++) begin
      g[s] = new[k];
      cps[s] = $urandom_range(1, n / 4);
      for (int e = 0; e < k; e++) begin
        g[s][e].i = 16'($urandom_range(0, 40000) - 20000);
        g[s][e].q = 16'($urandom_range(0, 40000) - 20000);
      end
      for (int p = 0; p < n + cps[s]; p++) begin
        int t; real ai, aq;
        t = (p < cps[s]) ? n - cps[s] + p : p - cps[s];
        ai = 0.0; aq = 0.0;
        for (int e = 0; e < k; e++) begin
          int b; real ang;
          b = ((e - k / 2) % n + n) % n;
          ang = 2.0 * PI * real'(b * t) / real'(n);
          ai += 64.0 * (real'(s16(g[s][e].i)) * $cos(ang) - real'(s16(g[s][e].q)) * $sin(ang));
          aq += 64.0 * (real'(s16(g[s][e].i)) * $sin(ang) + real'(s16(g[s][e].q)) * $cos(ang));
        end
        exp_i.push_back(ai / real'(n));
        exp_q.push_back(aq / real'(n));
      end
    end
    seen = 0; gaps = 0;
    for (int s = 0; s < NSYM; s++)
      for (int e = 0; e < k; e++) begin
        @(negedge clk);
        in_data = g[s][e]; in_cp = CP_W'(cps[s]); in_valid = 1;
        in_last = (s == NSYM - 1) && (e == k - 1);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk); in_valid = 0; in_last = 0;
    check(!cfg_error, "valid FFT size accepted");
    check(active == 2'($clog2(32) - l2), "active modulator index");
    while (exp_i.size() != 0) @(posedge clk);
    check(gaps == 0, $sformatf("no gaps in the waveform (%0d)", gaps));
    while (busy) @(posedge clk);
    // idle: the transmitter clears the modulators between transmissions
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_data = '0; in_cp = '0; fft_size = 32; num_sc = 12;
    repeat (3) @(posedge clk); rst_n = 1;
    run_mode(16, 12, 4);
    run_mode(32, 20, 5);
    run_mode(8, 6, 3);
    run_mode(16, 10, 4);
    @(negedge clk); fft_size = 64; in_valid = 1; in_data = '0;
    #1 check(cfg_error, "cfg_error for an FFT size with no modulator");
    check(!in_ready, "nothing accepted with a bad FFT size");
    @(negedge clk); in_valid = 0;
    repeat (100) @(posedge clk);
    check(exp_i.size() == 0, "all samples produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
