// Self-checking testbench for wave_scaler: random samples for every log2(N) from 7
// to 12; the expected output is the input times sqrt(2^log2N) computed in floating
// point and must agree within 1 + 2^floor(log2N/2) LSB plus 1e-7 of the value
// (rounding of the product and of the sqrt(2) constant). Also checks the one-cycle latency of valid.
`timescale 1ns/1ps
module tb_wave_scaler;
  import txr_pkg::*;
  logic clk = 0, rst_n = 0;
  iqw_t in_data; logic in_valid, out_valid; logic [3:0] log2n;
  logic signed [31:0] out_i, out_q;
  int checks = 0, failures = 0;

  wave_scaler #(.OUT_W(32)) dut (.clk, .rst_n, .in_data, .in_valid, .log2n, .out_i, .out_q, .out_valid);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(real x); return x < 0.0 ? -x : x; endfunction
  function automatic int s24(logic [23:0] x); return int'({{8{x[23]}}, x}); endfunction

  initial begin
    in_valid = 0; in_data = '0; log2n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int l = 7; l <= 12; l++)
      for (int n = 0; n < 40; n++) begin
        int xi, xq; real ei, eq, tol;
        xi = $urandom_range(0, 1 << 22) - (1 << 21);
        xq = $urandom_range(0, 1 << 22) - (1 << 21);
        if (n == 0) begin xi = -(1 << 23); xq = (1 << 23) - 1; end
        @(negedge clk); in_data.i = 24'(xi); in_data.q = 24'(xq); in_valid = 1; log2n = 4'(l);
        @(negedge clk); in_valid = 0;
        check(out_valid, "valid one cycle later");
        ei = real'(xi) * $sqrt(real'(1 << l));
        eq = real'(xq) * $sqrt(real'(1 << l));
        tol = 1.0 + real'(1 << (l / 2)) + fabs(ei) * 1.0e-7;
        check(fabs(real'(out_i) - ei) <= tol && fabs(real'(out_q) - eq) <= tol,
              $sformatf("l=%0d x=%0d got %0d exp %f", l, xi, out_i, ei));
        @(negedge clk);
        check(!out_valid, "valid for one cycle only");
      end
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
