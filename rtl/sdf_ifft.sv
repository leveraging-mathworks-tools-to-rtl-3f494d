// Streaming N-point inverse FFT built from log2(N) radix-2 SDF stages.
//
// Accepts one complex sample per valid cycle in natural order and produces the
// inverse transform scaled by 1/N, in bit-reversed order, one sample per valid
// output. The pipeline advances only on valid inputs: block b's last outputs appear
// while block b+1 is being fed (total delay N-1 valid samples plus one register per
// stage), so a stream must be followed by one more block to flush it. clear resets
// all stages.
module sdf_ifft
  import txr_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  iqw_t in_data,
  input  logic in_valid,
  output iqw_t out_data,
  output logic out_valid
);
  localparam int unsigned L = $clog2(N);

  iqw_t d [L+1];
  logic v [L+1];

  assign d[0] = in_data;
  assign v[0] = in_valid;

  for (genvar s = 0; s < L; s++) begin : g_stage
    sdf_stage #(.N(N), .S(s)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .in_data  (d[s]),
      .in_valid (v[s]),
      .out_data (d[s+1]),
      .out_valid(v[s+1])
    );
  end

  assign out_data  = d[L];
  assign out_valid = v[L];
endmodule
