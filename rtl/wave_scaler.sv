// Scales the modulator output by sqrt(N) to undo the 1/N of the halving butterflies.
//
// sqrt(N) = 2^floor(log2N/2) * (sqrt(2) if log2N is odd). The sample is multiplied
// by 1.0 or sqrt(2) as a Q2.24 constant (2^24 or 23726566), the constant's 24
// fraction bits are dropped with round-half-up, and the result is shifted left by
// floor(log2N/2). Input: iqw_t with valid;
// output: signed OUT_W-bit I and Q on the same scale as the input (grid full scale =
// 2^(FFT_W-3)), with valid. One cycle latency. The scaling itself follows the
// transmitter description; the shift-and-constant form is this design's choice.
module wave_scaler
  import txr_pkg::*;
#(
  parameter int unsigned OUT_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  iqw_t                    in_data,
  input  logic                    in_valid,
  input  logic [3:0]              log2n,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q,
  output logic                    out_valid
);
  localparam int unsigned PW = FFT_W + 27;
  localparam logic signed [26:0] ONE   = 27'sd16777216;
  localparam logic signed [26:0] SQRT2 = 27'sd23726566;

  logic signed [26:0]   m;
  logic [2:0]           sh;
  logic signed [PW-1:0] pi, pq, xi, xq;
  logic signed [OUT_W-1:0] ri, rq;

  assign m  = log2n[0] ? SQRT2 : ONE;
  assign sh = log2n[3:1];

  always_comb begin
    xi = {{27{in_data.i[FFT_W-1]}}, in_data.i};
    xq = {{27{in_data.q[FFT_W-1]}}, in_data.q};
    pi = xi * PW'(m) + PW'(1 << 23);
    pq = xq * PW'(m) + PW'(1 << 23);
    ri = OUT_W'(pi >>> 24) <<< sh;
    rq = OUT_W'(pq >>> 24) <<< sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= ri;
        out_q <= rq;
      end
    end
  end
endmodule
