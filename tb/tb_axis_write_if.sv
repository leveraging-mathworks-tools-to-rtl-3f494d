// Self-checking testbench for axis_write_if (DEPTH = 8): pushes random words with
// random source gaps and random sink back-pressure and checks order and content,
// that tready drops (and full_stall rises) when the FIFO is full, and that
// fifo_reset empties the FIFO and holds the stream off.
`timescale 1ns/1ps
module tb_axis_write_if;
  logic clk = 0, rst_n = 0, fifo_reset = 0;
  logic [31:0] s_tdata, m_data; logic s_tvalid, s_tready, m_valid, m_ready, full_stall;
  int checks = 0, failures = 0, stalls = 0;
  logic [31:0] q [$];

  axis_write_if #(.DEPTH(8)) dut (.clk, .rst_n, .fifo_reset, .s_tdata, .s_tvalid, .s_tready,
    .m_data, .m_valid, .m_ready, .full_stall);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scoreboard: record accepted words, compare delivered ones
  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && s_tready) q.push_back(s_tdata);
    if (full_stall) stalls++;
    if (m_valid && m_ready) begin
      if (q.size() == 0) check(0, "output with nothing accepted");
      else check(m_data == q.pop_front(), "word order and content");
    end
  end

  initial begin
    s_tvalid = 0; s_tdata = 0; m_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // phase 1: sink stopped, source fills the FIFO
    for (int n = 0; n < 12; n++) begin
      @(negedge clk); s_tvalid = 1; s_tdata = $urandom;
      @(posedge clk); #1;
      while (!(s_tready === 1'b1) && n < 11) begin
        @(negedge clk); if (full_stall) break;
      end
    end
    @(negedge clk); s_tvalid = 1;
    check(!s_tready, "tready low when full");
    check(full_stall, "full_stall with a word offered to a full FIFO");
    s_tvalid = 0;
    // phase 2: random traffic both sides
    fork
      for (int n = 0; n < 300; n++) begin
        @(negedge clk); s_tvalid = ($urandom % 4 != 0); s_tdata = $urandom;
        @(posedge clk);
        while (s_tvalid && !s_tready) @(posedge clk);
      end
      forever begin @(negedge clk); m_ready = ($urandom % 3 != 0); end
    join_any
    @(negedge clk); s_tvalid = 0; m_ready = 1;
    repeat (20) @(posedge clk);
    check(q.size() == 0, "all accepted words delivered");
    check(stalls > 0, "back-pressure seen");
    // phase 3: fifo_reset drops held words
    m_ready = 0;
    for (int n = 0; n < 4; n++) begin @(negedge clk); s_tvalid = 1; s_tdata = n; end
    @(negedge clk); s_tvalid = 0; fifo_reset = 1;
    #1 check(!s_tready, "tready low during fifo_reset");
    @(negedge clk); fifo_reset = 0; q.delete();
    @(negedge clk);
    check(!m_valid, "FIFO empty after fifo_reset");
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
