// Self-checking testbench for cp_ram_ctrl (DEPTH = 64).
// Loads a table of 6 cyclic prefix lengths (grid words interleaved must be ignored),
// then fires grid elements with random gaps for 3 subcarriers per symbol and checks
// that cp_len is the entry of symbol (element / 3) mod 6, that an end-of-frame element
// and clear restart the count, and that fifo_reset restarts the write address.
`timescale 1ns/1ps
module tb_cp_ram_ctrl;
  import txr_pkg::*;
  localparam int NCP = 6, NSC = 3;
  logic clk = 0, rst_n = 0, clear = 0, fifo_reset = 0, write_cp = 0;
  logic [31:0] in_data; logic in_valid, elem_fire, elem_eof, wr_wrap;
  logic [CP_W-1:0] cp_len; logic [15:0] sym_idx;
  int checks = 0, failures = 0, wraps = 0;
  logic [CP_W-1:0] tbl [NCP];

  cp_ram_ctrl #(.DEPTH(64)) dut (.clk, .rst_n, .clear, .fifo_reset, .write_cp,
    .num_cp(16'(NCP)), .num_sc(16'(NSC)), .in_data, .in_valid, .elem_fire, .elem_eof,
    .cp_len, .sym_idx, .wr_wrap);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && wr_wrap) wraps++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic load(int salt);
    for (int k = 0; k < NCP; k++) begin
      tbl[k] = CP_W'($urandom_range(1, 4000) ^ salt);
      @(negedge clk); write_cp = 1; in_valid = 1; in_data = {20'hABCDE, tbl[k]};
      @(negedge clk); write_cp = 0; in_data = 32'h12345678;
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic run(int nelem, int eof_at);
    int e = 0;
    for (int n = 0; n < nelem; n++) begin
      @(negedge clk);
      check(cp_len == tbl[(e / NSC) % NCP], $sformatf("cp_len at element %0d", e));
      elem_fire = 1; elem_eof = (n == eof_at);
      @(negedge clk); elem_fire = 0; elem_eof = 0;
      e = (n == eof_at) ? 0 : e + 1;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; elem_fire = 0; elem_eof = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    load(0);
    check(wraps == 1, "wr_wrap after a full table");
    run(60, 40);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(sym_idx == 0, "clear restarts the symbol index");
    @(negedge clk); fifo_reset = 1; @(negedge clk); fifo_reset = 0;
    load(12'h0f0);
    run(45, -1);
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
