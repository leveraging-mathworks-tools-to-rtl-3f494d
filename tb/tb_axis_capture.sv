// Self-checking testbench for axis_capture (DEPTH = 16). Drives the four sources
// with counting patterns at random valid rates, runs one capture per source with a
// different length, and checks that exactly that many words of the selected source
// arrive, in order, on the stream; that done pulses once per capture; that a level
// held on cap_start starts only one capture; and that a capture longer than the FIFO
// with the stream stalled sets overflow, which the next capture clears.
`timescale 1ns/1ps
module tb_axis_capture;
  import txr_pkg::*;
  logic clk = 0, rst_n = 0, cap_start = 0;
  logic [31:0] cap_length; logic [1:0] cap_select;
  iq16_t tx_wave, grid; iqw_t mod_raw; logic [CP_W-1:0] cp_len;
  logic tx_wave_valid, mod_raw_valid, grid_valid;
  logic [31:0] m_tdata; logic m_tvalid, m_tready, capturing, done, overflow;
  int checks = 0, failures = 0, dones = 0;
  logic [31:0] q [$];
  logic [31:0] cnt = 0;

  axis_capture #(.DEPTH(16)) dut (.clk, .rst_n, .cap_start, .cap_length, .cap_select,
    .tx_wave, .tx_wave_valid, .mod_raw, .mod_raw_valid, .grid, .grid_valid, .cp_len,
    .m_tdata, .m_tvalid, .m_tready, .capturing, .done, .overflow);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // sources change every cycle; the word the selected source would give is recorded
  always @(negedge clk) begin
    cnt++;
    tx_wave = {16'(cnt), 16'(~cnt)};           tx_wave_valid = ($urandom % 2 == 0);
    mod_raw.i = 24'(cnt * 3) ; mod_raw.q = 24'(cnt * 5); mod_raw_valid = ($urandom % 3 != 0);
    grid = {16'(cnt + 7), 16'(cnt * 2)};       grid_valid = ($urandom % 2 == 0);
    cp_len = CP_W'(cnt * 11);
  end

  always @(posedge clk) if (rst_n) begin
    logic [31:0] w; logic v;
    unique case (cap_select)
      2'd0: begin w = tx_wave; v = tx_wave_valid; end
      2'd1: begin w = {mod_raw.q[23:8], mod_raw.i[23:8]}; v = mod_raw_valid; end
      2'd2: begin w = grid; v = grid_valid; end
      default: begin w = 32'(cp_len); v = grid_valid; end
    endcase
    if (capturing && v) q.push_back(w);
    if (done) dones++;
  end

  task automatic capture(int sel, int len, bit drain);
    int got = 0;
    @(negedge clk); cap_select = 2'(sel); cap_length = len; cap_start = 1;
    repeat (3) @(negedge clk);
    cap_start = 0;
    m_tready = drain;
    while (capturing || (drain && (m_tvalid || q.size() != 0)) || (!drain && got == 0 && !done)) begin
      @(posedge clk);
      if (m_tvalid && m_tready) begin
        check(q.size() != 0 && m_tdata == q.pop_front(), $sformatf("word %0d of source %0d", got, sel));
        got++;
      end
      if (!drain && !capturing) break;
      @(negedge clk); m_tready = drain && ($urandom % 4 != 0);
    end
    if (drain) check(got == len, $sformatf("source %0d: %0d words, expected %0d", sel, got, len));
  endtask

  initial begin
    m_tready = 0; cap_length = 0; cap_select = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    capture(0, 10, 1);
    capture(1, 7, 1);
    capture(2, 12, 1);
    capture(3, 5, 1);
    check(dones == 4, "one done per capture");
    check(!overflow, "no overflow while draining");
    // stalled stream, capture longer than the FIFO
    capture(0, 40, 0);
    check(overflow, "overflow with the FIFO full");
    @(negedge clk); m_tready = 1; repeat (40) @(negedge clk); q.delete();
    capture(2, 6, 1);
    check(!overflow, "overflow cleared by the next capture");
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
