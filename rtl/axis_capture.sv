// AXI-Stream read interface with FIFO: records a chosen internal signal for a
// programmed number of samples and streams it to the host (S2MM DMA).
//
// A rising edge of cap_start starts a capture of cap_length samples of the source
// chosen by cap_select (txr_pkg::cap_sel_e): the final transmit samples, the
// modulator output before scaling (its upper 16 bits of I and Q), the grid elements
// entering the modulator, or the cyclic prefix length that goes with each grid
// element. Each valid sample of the source is pushed into a DEPTH-word FIFO as one
// 32-bit word (I in bits 15:0, Q in bits 31:16; the length in bits CP_W-1:0) until
// cap_length samples are taken; capturing is high meanwhile and done pulses after
// the last one. The FIFO drains to m_tdata/m_tvalid/m_tready. A sample arriving with
// the FIFO full is lost and sets overflow, which stays set until the next capture
// starts. The capture controls (start, length, select) follow the transmitter
// description; the sources offered, the word format and the overflow flag are this
// design's choice.
module axis_capture
  import txr_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cap_start,
  input  logic [31:0]     cap_length,
  input  logic [1:0]      cap_select,
  input  iq16_t           tx_wave,
  input  logic            tx_wave_valid,
  input  iqw_t            mod_raw,
  input  logic            mod_raw_valid,
  input  iq16_t           grid,
  input  logic            grid_valid,
  input  logic [CP_W-1:0] cp_len,
  output logic [31:0]     m_tdata,
  output logic            m_tvalid,
  input  logic            m_tready,
  output logic            capturing,
  output logic            done,
  output logic            overflow
);
  logic        start_d, start_edge, src_valid, push, fifo_in_ready;
  logic [31:0] src_data, remaining;

  assign start_edge = cap_start && !start_d;

  always_comb begin
    unique case (cap_sel_e'(cap_select))
      CAP_TX_WAVE: begin src_data = tx_wave;                         src_valid = tx_wave_valid; end
      CAP_MOD_RAW: begin src_data = {mod_raw.q[FFT_W-1 -: IQ_W],
                                     mod_raw.i[FFT_W-1 -: IQ_W]};    src_valid = mod_raw_valid; end
      CAP_GRID:    begin src_data = grid;                            src_valid = grid_valid;    end
      default:     begin src_data = 32'(cp_len);                     src_valid = grid_valid;    end
    endcase
  end

  assign push = capturing && src_valid;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .in_data  (src_data),
    .in_valid (push),
    .in_ready (fifo_in_ready),
    .out_data (m_tdata),
    .out_valid(m_tvalid),
    .out_ready(m_tready),
    .count    ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_d   <= 1'b0;
      capturing <= 1'b0;
      remaining <= '0;
      done      <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      start_d <= cap_start;
      done    <= 1'b0;
      if (start_edge && cap_length != 32'd0) begin
        capturing <= 1'b1;
        remaining <= cap_length;
        overflow  <= 1'b0;
      end else if (push) begin
        if (!fifo_in_ready) overflow <= 1'b1;
        remaining <= remaining - 32'd1;
        if (remaining == 32'd1) begin
          capturing <= 1'b0;
          done      <= 1'b1;
        end
      end
    end
  end
endmodule
