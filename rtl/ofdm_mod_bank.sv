// OFDM modulator bank: three OFDM modulators for the three subcarrier spacings that
// share one sample rate, and the control that makes one of them active.
//
// At a fixed sample rate Fs the FFT size is Fs / SCS, so the 15, 30 and 60 kHz
// modulators have sizes N15 = FFT_MAX, FFT_MAX/2 and FFT_MAX/4 (defaults 1024, 512
// and 256, i.e. Fs = 15.36 MHz). Each modulator is built for exactly its size, so it
// never inserts idle cycles. The fft_size control value selects the modulator whose
// size matches; grid elements go only to it and only its output is passed on. A
// value matching no modulator accepts nothing and raises cfg_error. clear (high
// while the transmitter is idle) and deselection reset a modulator, so switching the
// subcarrier spacing between transmissions starts from a clean state.
// Outputs: time-domain samples (1/N scaled, see ofdm_mod) with valid, and log2 of the
// active FFT size for the scaling stage. Latency is that of the active modulator
// plus one register.
module ofdm_mod_bank
  import txr_pkg::*;
#(
  parameter int unsigned FFT_MAX = 1024,
  parameter int unsigned NB      = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [31:0]     fft_size,
  input  logic [15:0]     num_sc,
  input  iq16_t           in_data,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_last,
  input  logic [CP_W-1:0] in_cp_len,
  output iqw_t            out_data,
  output logic            out_valid,
  output logic [3:0]      log2n,
  output logic [1:0]      active,
  output logic            cfg_error,
  output logic            busy,
  output logic            pad_sent
);
  localparam int unsigned NMOD = 3;

  logic [NMOD-1:0] sel, rdy, ov, bz, ps;
  iqw_t            od [NMOD];

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    localparam int unsigned NM = FFT_MAX >> m;
    assign sel[m] = (fft_size == 32'(NM));
    ofdm_mod #(.N(NM), .NB(NB)) u_mod (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear || !sel[m]),
      .num_sc   (num_sc),
      .in_data  (in_data),
      .in_valid (in_valid && sel[m]),
      .in_ready (rdy[m]),
      .in_last  (in_last),
      .in_cp_len(in_cp_len),
      .out_data (od[m]),
      .out_valid(ov[m]),
      .busy     (bz[m]),
      .pad_sent (ps[m])
    );
  end

  assign in_ready  = |(rdy & sel);
  assign cfg_error = (sel == '0);
  assign busy      = |(bz & sel);
  assign pad_sent  = |(ps & sel);

  always_comb begin
    active = 2'd0;
    for (int m = 0; m < NMOD; m++) if (sel[m]) active = 2'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      log2n     <= '0;
    end else begin
      out_valid <= |(ov & sel);
      out_data  <= od[active];
      log2n     <= 4'($clog2(FFT_MAX) - active);
    end
  end
endmodule
