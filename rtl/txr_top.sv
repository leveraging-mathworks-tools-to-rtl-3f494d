// 5G resource grid transmitter: plays a resource grid loaded at run time as a
// continuous OFDM time-domain waveform to an RF transceiver.
//
// Loading path: the host writes the control registers over AXI4-Lite (axil_regs)
// and streams grid elements, then cyclic prefix lengths, over AXI-Stream
// (mm2s_dma_*) into the input FIFO (axis_write_if). The write_cp register decides
// whether a word goes to the resource grid RAM (grid_ram_ctrl) or to the cyclic
// prefix RAM (cp_ram_ctrl); each RAM has its own write address counter.
// Transmit path: with tx_start set, the grid RAM is read element by element (frame
// after frame while tx_start stays set) through a FIFO into the OFDM modulator bank
// (ofdm_mod_bank); the CP block counts the accepted elements and supplies the prefix
// length of the current symbol. The bank's active modulator (picked by the
// fft_size register among N, N/2, N/4 for 15/30/60 kHz spacing) maps the symbol onto
// the FFT bins, transforms it and inserts the prefix. The waveform is scaled by
// sqrt(N) (wave_scaler), rounded and saturated to 16 bits and driven on both
// transmit channels with tx_valid (tx_output).
// Debug path: axis_capture records a selected signal for a programmed length into a
// FIFO read by the host over AXI-Stream (s2mm_dma_*).
// One clock domain; the clock runs at the waveform sample rate (FFT_MAX * 15 kHz,
// 15.36 MHz for the default FFT_MAX = 1024) and, while a frame plays, tx_valid is
// high on every cycle. The modulators go back to their reset state whenever the
// transmitter is idle. Registers (byte address): 0x00 number of grid elements,
// 0x04 subcarriers per symbol, 0x08 FFT size, 0x0C number of CP lengths, 0x10 input
// FIFO reset, 0x14 write-CP flag, 0x18 transmit start, 0x1C capture start,
// 0x20 capture length, 0x24 capture select.
module txr_top
  import txr_pkg::*;
#(
  parameter int unsigned FFT_MAX         = 1024,
  parameter int unsigned GRID_DEPTH      = 131072,
  parameter int unsigned CP_DEPTH        = 64,
  parameter int unsigned IN_FIFO_DEPTH   = 512,
  parameter int unsigned GRID_FIFO_DEPTH = 16,
  parameter int unsigned CAP_FIFO_DEPTH  = 1024,
  parameter int unsigned NB              = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control registers
  input  logic [5:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [5:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI-Stream from the host (grid and cyclic prefix data)
  input  logic [31:0] mm2s_dma_data,
  input  logic        mm2s_dma_valid,
  output logic        mm2s_dma_ready,
  // AXI-Stream to the host (capture)
  output logic [31:0] s2mm_dma_data,
  output logic        s2mm_dma_valid,
  input  logic        s2mm_dma_ready,
  // RF transceiver transmit samples
  output logic [15:0] tx_ch1_i_data,
  output logic [15:0] tx_ch1_q_data,
  output logic [15:0] tx_ch2_i_data,
  output logic [15:0] tx_ch2_q_data,
  output logic        tx_valid
);
  logic [31:0] regs [NREGS];
  logic [31:0] num_elements, fft_size, cap_length;
  logic [15:0] num_sc, num_cp;
  logic        fifo_reset, write_cp, tx_start, cap_start;
  logic [1:0]  cap_select;

  assign num_elements = regs[REG_NUM_ELEMENTS];
  assign num_sc       = regs[REG_NUM_SUBCARRIER][15:0];
  assign fft_size     = regs[REG_FFT_SIZE];
  assign num_cp       = regs[REG_NUM_CP][15:0];
  assign fifo_reset   = regs[REG_FIFO_RESET][0];
  assign write_cp     = regs[REG_WRITE_CP][0];
  assign tx_start     = regs[REG_TX_START][0];
  assign cap_start    = regs[REG_CAP_START][0];
  assign cap_length   = regs[REG_CAP_LENGTH];
  assign cap_select   = regs[REG_CAP_SELECT][1:0];

  axil_regs #(.ADDR_W(6)) u_regs (
    .clk    (clk),
    .rst_n  (rst_n),
    .awaddr (s_axil_awaddr),
    .awvalid(s_axil_awvalid),
    .awready(s_axil_awready),
    .wdata  (s_axil_wdata),
    .wstrb  (s_axil_wstrb),
    .wvalid (s_axil_wvalid),
    .wready (s_axil_wready),
    .bresp  (s_axil_bresp),
    .bvalid (s_axil_bvalid),
    .bready (s_axil_bready),
    .araddr (s_axil_araddr),
    .arvalid(s_axil_arvalid),
    .arready(s_axil_arready),
    .rdata  (s_axil_rdata),
    .rresp  (s_axil_rresp),
    .rvalid (s_axil_rvalid),
    .rready (s_axil_rready),
    .regs   (regs)
  );

  // ---------------- loading path ----------------
  logic [31:0] ld_data;
  logic        ld_valid, in_full_stall;

  axis_write_if #(.DEPTH(IN_FIFO_DEPTH)) u_wr_if (
    .clk       (clk),
    .rst_n     (rst_n),
    .fifo_reset(fifo_reset),
    .s_tdata   (mm2s_dma_data),
    .s_tvalid  (mm2s_dma_valid),
    .s_tready  (mm2s_dma_ready),
    .m_data    (ld_data),
    .m_valid   (ld_valid),
    .m_ready   (1'b1),
    .full_stall(in_full_stall)
  );

  iq16_t           grid_data;
  logic            grid_valid, grid_ready, grid_eof, grid_last, grid_reading, grid_wrap;
  logic            grid_fire, mod_clear, bank_busy, cfg_error, pad_sent, cp_wrap;
  logic [CP_W-1:0] cp_len;
  logic [15:0]     sym_idx;

  grid_ram_ctrl #(.DEPTH(GRID_DEPTH), .FIFO_DEPTH(GRID_FIFO_DEPTH)) u_grid (
    .clk         (clk),
    .rst_n       (rst_n),
    .fifo_reset  (fifo_reset),
    .write_cp    (write_cp),
    .num_elements(num_elements),
    .tx_enable   (tx_start),
    .in_data     (ld_data),
    .in_valid    (ld_valid),
    .wr_wrap     (grid_wrap),
    .out_data    (grid_data),
    .out_valid   (grid_valid),
    .out_ready   (grid_ready),
    .out_eof     (grid_eof),
    .out_last    (grid_last),
    .reading     (grid_reading)
  );

  assign grid_fire = grid_valid && grid_ready;
  assign mod_clear = !tx_start && !grid_reading && !grid_valid && !bank_busy;

  cp_ram_ctrl #(.DEPTH(CP_DEPTH)) u_cp (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (mod_clear),
    .fifo_reset(fifo_reset),
    .write_cp  (write_cp),
    .num_cp    (num_cp),
    .num_sc    (num_sc),
    .in_data   (ld_data),
    .in_valid  (ld_valid),
    .elem_fire (grid_fire),
    .elem_eof  (grid_eof),
    .cp_len    (cp_len),
    .sym_idx   (sym_idx),
    .wr_wrap   (cp_wrap)
  );

  // ---------------- transmit path ----------------
  iqw_t        mod_data;
  logic        mod_valid;
  logic [3:0]  log2n;
  logic [1:0]  active;

  ofdm_mod_bank #(.FFT_MAX(FFT_MAX), .NB(NB)) u_bank (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (mod_clear),
    .fft_size (fft_size),
    .num_sc   (num_sc),
    .in_data  (grid_data),
    .in_valid (grid_valid),
    .in_ready (grid_ready),
    .in_last  (grid_last),
    .in_cp_len(cp_len),
    .out_data (mod_data),
    .out_valid(mod_valid),
    .log2n    (log2n),
    .active   (active),
    .cfg_error(cfg_error),
    .busy     (bank_busy),
    .pad_sent (pad_sent)
  );

  logic signed [31:0] sc_i, sc_q;
  logic               sc_valid, tx_sat;

  wave_scaler #(.OUT_W(32)) u_scale (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (mod_data),
    .in_valid (mod_valid),
    .log2n    (log2n),
    .out_i    (sc_i),
    .out_q    (sc_q),
    .out_valid(sc_valid)
  );

  tx_output #(.IN_W(32)) u_txout (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_i         (sc_i),
    .in_q         (sc_q),
    .in_valid     (sc_valid),
    .tx_ch1_i_data(tx_ch1_i_data),
    .tx_ch1_q_data(tx_ch1_q_data),
    .tx_ch2_i_data(tx_ch2_i_data),
    .tx_ch2_q_data(tx_ch2_q_data),
    .tx_valid     (tx_valid),
    .sat          (tx_sat)
  );

  // ---------------- debug capture path ----------------
  logic cap_busy, cap_done, cap_overflow;

  axis_capture #(.DEPTH(CAP_FIFO_DEPTH)) u_cap (
    .clk          (clk),
    .rst_n        (rst_n),
    .cap_start    (cap_start),
    .cap_length   (cap_length),
    .cap_select   (cap_select),
    .tx_wave      ({tx_ch1_q_data, tx_ch1_i_data}),
    .tx_wave_valid(tx_valid),
    .mod_raw      (mod_data),
    .mod_raw_valid(mod_valid),
    .grid         (grid_data),
    .grid_valid   (grid_fire),
    .cp_len       (cp_len),
    .m_tdata      (s2mm_dma_data),
    .m_tvalid     (s2mm_dma_valid),
    .m_tready     (s2mm_dma_ready),
    .capturing    (cap_busy),
    .done         (cap_done),
    .overflow     (cap_overflow)
  );
endmodule
