// Self-checking testbench for tx_output: random and edge-case inputs (values well
// inside range, values that round across a half LSB, and values beyond full scale
// that must saturate). The expected 16-bit sample is round(x / 64) clipped to
// [-32768, 32767]; both channels must carry it, sat must flag clipping, and tx_valid
// must follow in_valid by one cycle.
`timescale 1ns/1ps
module tb_tx_output;
  logic clk = 0, rst_n = 0;
  logic signed [31:0] in_i, in_q; logic in_valid, tx_valid, sat;
  logic [15:0] c1i, c1q, c2i, c2q;
  int checks = 0, failures = 0;

  tx_output #(.IN_W(32)) dut (.clk, .rst_n, .in_i, .in_q, .in_valid, .tx_ch1_i_data(c1i),
    .tx_ch1_q_data(c1q), .tx_ch2_i_data(c2i), .tx_ch2_q_data(c2q), .tx_valid, .sat);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int model(int x, output bit clip);
    longint r;
    r = (longint'(x) + 32) >>> 6;
    clip = 0;
    if (r > 32767) begin r = 32767; clip = 1; end
    if (r < -32768) begin r = -32768; clip = 1; end
    return int'(r);
  endfunction

  initial begin
    in_valid = 0; in_i = 0; in_q = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int xi, xq, ei, eq; bit ci, cq;
      case (n % 4)
        0: begin xi = $urandom_range(0, 1 << 22) - (1 << 21); xq = $urandom_range(0, 1 << 22) - (1 << 21); end
        1: begin xi = 64 * ($urandom_range(0, 2000) - 1000) + 32; xq = 64 * ($urandom_range(0, 2000) - 1000) - 32; end
        2: begin xi = (1 << 21) + $urandom_range(0, 1 << 24); xq = -(1 << 21) - $urandom_range(0, 1 << 24); end
        default: begin xi = 32767 * 64 + $urandom_range(0, 40); xq = -32768 * 64 - $urandom_range(0, 40); end
      endcase
      ei = model(xi, ci); eq = model(xq, cq);
      @(negedge clk); in_i = xi; in_q = xq; in_valid = 1;
      @(negedge clk); in_valid = 0;
      check(tx_valid, "tx_valid one cycle later");
      check(int'($signed(c1i)) == ei && int'($signed(c1q)) == eq,
            $sformatf("x=%0d,%0d got %0d,%0d exp %0d,%0d", xi, xq, $signed(c1i), $signed(c1q), ei, eq));
      check(c2i == c1i && c2q == c1q, "channel 2 equals channel 1");
      check(sat == (ci || cq), "saturation flag");
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
