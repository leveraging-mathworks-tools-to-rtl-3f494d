// Self-checking testbench for grid_ram_ctrl (DEPTH = 64, FIFO_DEPTH = 4).
// Loads a 20-element grid (with words for the CP RAM interleaved, which must not be
// written), plays it with random back-pressure while tx_enable stays high for a few
// frames, then drops tx_enable and checks that the frame in progress completes and
// ends with out_last. Checks element order, end-of-frame flags, wr_wrap, that a
// fifo_reset restarts the write address, and the one-element-per-cycle read rate
// without back-pressure.
`timescale 1ns/1ps
module tb_grid_ram_ctrl;
  import txr_pkg::*;
  localparam int NE = 20;
  logic clk = 0, rst_n = 0, fifo_reset = 0, write_cp = 0, tx_enable = 0;
  logic [31:0] in_data; logic in_valid, wr_wrap;
  iq16_t out_data; logic out_valid, out_ready, out_eof, out_last, reading;
  int checks = 0, failures = 0;
  logic [31:0] grid [NE];
  int idx = 0, frames = 0, lasts = 0, wraps = 0;
  bit stop_seen = 0;

  grid_ram_ctrl #(.DEPTH(64), .FIFO_DEPTH(4)) dut (.clk, .rst_n, .fifo_reset, .write_cp,
    .num_elements(32'(NE)), .tx_enable, .in_data, .in_valid, .wr_wrap, .out_data, .out_valid,
    .out_ready, .out_eof, .out_last, .reading);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wr_wrap) wraps++;
    if (out_valid && out_ready) begin
      check(out_data == grid[idx], $sformatf("element %0d", idx));
      check(out_eof == (idx == NE - 1), "eof flag");
      check(out_last == (out_eof && stop_seen), "last flag");
      if (out_last) lasts++;
      idx = (idx == NE - 1) ? 0 : idx + 1;
      if (out_eof) frames++;
    end
  end

  task automatic load(int salt);
    for (int k = 0; k < NE; k++) begin
      grid[k] = $urandom ^ salt;
      @(negedge clk); write_cp = 0; in_valid = 1; in_data = grid[k];
      if (k % 5 == 2) begin
        @(negedge clk); write_cp = 1; in_data = 32'hDEAD0000 | k;
      end
    end
    @(negedge clk); in_valid = 0; write_cp = 0;
  endtask

  initial begin
    int t0, t1;
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    load(0);
    check(wraps == 1, "wr_wrap once per loaded grid");
    // play with random back-pressure
    @(negedge clk); tx_enable = 1;
    fork begin
      while (frames < 3) begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
    end join
    @(negedge clk); tx_enable = 0;
    // frames is read when the RAM end is reached by the read counter: the frame
    // being read when tx_enable drops finishes with out_last
    stop_seen = 1;
    while (reading || out_valid) begin @(negedge clk); out_ready = ($urandom % 2 == 0); end
    check(lasts == 1, "exactly one last flag");
    check(idx == 0, "stopped at a frame boundary");
    // reload after fifo_reset: write address back to zero
    @(negedge clk); fifo_reset = 1; @(negedge clk); fifo_reset = 0;
    load(32'h5a5a5a5a);
    stop_seen = 0; lasts = 0;
    @(negedge clk); out_ready = 1; tx_enable = 1;
    @(posedge out_valid); t0 = $time;
    while (frames < 6) @(posedge clk);
    t1 = $time;
    @(negedge clk); tx_enable = 0; stop_seen = 1;
    while (reading || out_valid) @(negedge clk);
    check(lasts == 1, "last flag after second run");
    check(wraps == 2, "second wr_wrap");
    // 2 frames (40 elements) at full rate take 40 cycles
    check(t1 - t0 >= 10 * (2 * NE - 1) && t1 - t0 <= 10 * (2 * NE + 2), $sformatf("full rate: %0d", t1 - t0));
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
