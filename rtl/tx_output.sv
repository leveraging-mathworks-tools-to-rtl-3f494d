// Transceiver output logic: adjusts the scaled waveform to the 16-bit sample width
// of the RF transceiver's transmit ports and drives them.
//
// The input carries grid full scale at 2^(FFT_W-3); the output is Q1.15. Each
// component is divided by 2^(FFT_W-3-15) with round-half-up, then saturated to
// [-32768, 32767]; sat pulses when either component was clipped. Both transmit
// channels carry the same waveform. tx_valid follows in_valid. One cycle latency.
// The width adjustment follows the transmitter description; rounding, saturation
// and driving both channels are this design's choice.
module tx_output
  import txr_pkg::*;
#(
  parameter int unsigned IN_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  input  logic                   in_valid,
  output logic [IQ_W-1:0]        tx_ch1_i_data,
  output logic [IQ_W-1:0]        tx_ch1_q_data,
  output logic [IQ_W-1:0]        tx_ch2_i_data,
  output logic [IQ_W-1:0]        tx_ch2_q_data,
  output logic                   tx_valid,
  output logic                   sat
);
  localparam int unsigned SH = FFT_W - 3 - (IQ_W - 1);

  function automatic logic [IQ_W:0] round_sat(input logic signed [IN_W-1:0] x);
    logic signed [IN_W:0] r;
    r = ($signed({x[IN_W-1], x}) + (IN_W+1)'(1 << (SH - 1))) >>> SH;
    if (r > (IN_W+1)'(32767))       return {1'b1, 16'h7fff};
    else if (r < -(IN_W+1)'(32768)) return {1'b1, 16'h8000};
    else                            return {1'b0, r[IQ_W-1:0]};
  endfunction

  logic [IQ_W:0] ri, rq;
  assign ri = round_sat(in_i);
  assign rq = round_sat(in_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_ch1_i_data <= '0;
      tx_ch1_q_data <= '0;
      tx_ch2_i_data <= '0;
      tx_ch2_q_data <= '0;
      tx_valid      <= 1'b0;
      sat           <= 1'b0;
    end else begin
      tx_valid <= in_valid;
      sat      <= in_valid && (ri[IQ_W] || rq[IQ_W]);
      if (in_valid) begin
        tx_ch1_i_data <= ri[IQ_W-1:0];
        tx_ch1_q_data <= rq[IQ_W-1:0];
        tx_ch2_i_data <= ri[IQ_W-1:0];
        tx_ch2_q_data <= rq[IQ_W-1:0];
      end
    end
  end
endmodule
