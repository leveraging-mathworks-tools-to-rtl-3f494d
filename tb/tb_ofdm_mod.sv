// Self-checking testbench for ofdm_mod at N = 16.
// Sends two transmissions of random grid symbols (K = 12 subcarriers, differing
// cyclic prefix lengths), the first with random input gaps, the second at full rate.
// Expected samples come from a direct floating-point inverse DFT of each symbol with
// the grid centred on DC; each output must be within a small tolerance. Also checks
// the sample count, that the second transmission plays without a gap once started,
// and that one padding symbol is sent per transmission.
`timescale 1ns/1ps
module tb_ofdm_mod;
  import txr_pkg::*;
  localparam int N = 16, K = 12, S1 = 5, S2 = 3, TOT = S1 + S2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clear = 0;
  iq16_t in_data; logic in_valid, in_ready, in_last; logic [CP_W-1:0] in_cp;
  iqw_t out_data; logic out_valid, busy, pad_sent;
  int checks = 0, failures = 0;

  // Explicit sign extension of a 24-bit field to int.
  function automatic int s24(logic [23:0] x);
    return int'({{8{x[23]}}, x});
  endfunction
  function automatic int s16(logic [15:0] x);
    return int'({{16{x[15]}}, x});
  endfunction

  ofdm_mod #(.N(N), .NB(4)) dut (.clk, .rst_n, .clear, .num_sc(16'(K)), .in_data, .in_valid,
    .in_ready, .in_last, .in_cp_len(in_cp), .out_data, .out_valid, .busy, .pad_sent);

  always #5 clk = ~clk;

  iq16_t grid [TOT][K];
  int    cps  [TOT] = '{4, 2, 3, 1, 4, 2, 4, 3};
  real   exp_i [$], exp_q [$];
  int    pads = 0;

  task automatic ref_symbol(int s);
    for (int p = 0; p < N + cps[s]; p++) begin
      int n; real ai, aq;
      n = (p < cps[s]) ? N - cps[s] + p : p - cps[s];
      ai = 0.0; aq = 0.0;
      for (int k = 0; k < K; k++) begin
        int b; real ang, gi, gq;
        b   = ((k - K/2) % N + N) % N;
        ang = 2.0 * PI * real'(b * n) / real'(N);
        gi  = real'(s16(grid[s][k].i)) * 64.0;
        gq  = real'(s16(grid[s][k].q)) * 64.0;
        ai += gi * $cos(ang) - gq * $sin(ang);
        aq += gi * $sin(ang) + gq * $cos(ang);
      end
      exp_i.push_back(ai / real'(N));
      exp_q.push_back(aq / real'(N));
    end
  endtask

  task automatic send(int s0, int s1, bit gaps);
    for (int s = s0; s < s1; s++)
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        in_data  = grid[s][k];
        in_cp    = CP_W'(cps[s]);
        in_last  = (s == s1 - 1) && (k == K - 1);
        in_valid = 1'b1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        if (gaps && ($urandom % 3 == 0)) begin
          @(negedge clk);
          in_valid = 1'b0;
          repeat ($urandom % 4) @(posedge clk);
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  // output checker
  int got = 0, gap_after_start = 0; bit started2 = 0;
  always @(posedge clk) begin
    if (rst_n && pad_sent) pads++;
    if (rst_n && out_valid) begin
      real di, dq;
      if (exp_i.size() == 0) begin
        failures++; $display("unexpected output sample %0d", got);
      end else begin
        di = real'(s24(out_data.i)) - exp_i.pop_front();
        dq = real'(s24(out_data.q)) - exp_q.pop_front();
        checks++;
        if (di > 24.0 || di < -24.0 || dq > 24.0 || dq < -24.0) begin
          failures++;
          if (failures < 30) $display("sample %0d mismatch: di=%f dq=%f got %0d %0d", got, di, dq, s24(out_data.i), s24(out_data.q));
        end
      end
      got++;
    end
  end

  int expected_total;
  initial begin
    in_valid = 0; in_last = 0; in_data = '0; in_cp = '0;
    for (int s = 0; s < TOT; s++)
      for (int k = 0; k < K; k++) begin
        grid[s][k].i = 16'($urandom_range(0, 40000) - 20000);
        grid[s][k].q = 16'($urandom_range(0, 40000) - 20000);
      end
    for (int s = 0; s < TOT; s++) ref_symbol(s);
    expected_total = 0;
    for (int s = 0; s < TOT; s++) expected_total += N + cps[s];
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    send(0, S1, 1'b1);
    wait (!busy); repeat (5) @(posedge clk);
    send(S1, TOT, 1'b0);
    wait (!busy); repeat (5) @(posedge clk);
    checks++;
    if (got != expected_total) begin failures++; $display("count %0d != %0d", got, expected_total); end
    checks++;
    if (pads != 2) begin failures++; $display("pads %0d != 2", pads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gap check for the full-rate second transmission: once its first sample is out,
  // every following cycle carries a sample until all are out.
  int run2 = 0;
  always @(posedge clk) begin
    if (got >= expected_total - (S2 * N + 9) && got < expected_total && exp_i.size() > 0) begin
      if (out_valid) begin started2 = 1; end
      else if (started2) gap_after_start++;
    end
  end
  final begin
    if (gap_after_start != 0) $display("gaps in second transmission: %0d", gap_after_start);
  end
  always @(posedge clk) if (got == expected_total && run2 == 0) begin
    run2 = 1; checks++;
    if (gap_after_start != 0) begin failures++; $display("playback gaps %0d", gap_after_start); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
