// Shared types and constants of the 5G resource grid transmitter.
//
// Sample formats used throughout:
//   iq16_t   grid element / transceiver sample: signed 16-bit I and Q, value = x / 2^15.
//   iqw_t    internal modulator sample: signed FFT_W-bit I and Q, value = x / 2^(FFT_W-1).
// Control register map (AXI4-Lite word index, byte address = 4 * index). The ten
// registers and their meaning follow the transmitter description; the order and the
// addresses are this design's choice.
package txr_pkg;

  localparam int unsigned IQ_W   = 16;  // grid and DAC sample width (I and Q each)
  localparam int unsigned FFT_W  = 24;  // internal modulator width (I and Q each)
  localparam int unsigned CP_W   = 12;  // cyclic prefix length width
  localparam int unsigned NREGS  = 10;  // number of AXI-Lite control registers

  typedef struct packed {
    logic signed [IQ_W-1:0] q;
    logic signed [IQ_W-1:0] i;
  } iq16_t;

  typedef struct packed {
    logic signed [FFT_W-1:0] q;
    logic signed [FFT_W-1:0] i;
  } iqw_t;

  // Control register indices.
  typedef enum logic [3:0] {
    REG_NUM_ELEMENTS   = 4'd0,  // total grid elements in the loaded grid
    REG_NUM_SUBCARRIER = 4'd1,  // subcarriers per grid symbol
    REG_FFT_SIZE       = 4'd2,  // FFT size of the loaded grid (selects the modulator)
    REG_NUM_CP         = 4'd3,  // number of cyclic prefix lengths (symbols per subframe)
    REG_FIFO_RESET     = 4'd4,  // bit 0: reset input FIFO and write address counters
    REG_WRITE_CP       = 4'd5,  // bit 0: stream data goes to the cyclic prefix RAM
    REG_TX_START       = 4'd6,  // bit 0: transmitter enabled
    REG_CAP_START      = 4'd7,  // bit 0: rising edge starts a capture
    REG_CAP_LENGTH     = 4'd8,  // number of samples to capture
    REG_CAP_SELECT     = 4'd9   // which signal the capture interface records
  } reg_idx_e;

  // Capture sources for the AXI-Stream read interface.
  typedef enum logic [1:0] {
    CAP_TX_WAVE  = 2'd0,  // final transmit samples (after scaling and width adjust)
    CAP_MOD_RAW  = 2'd1,  // modulator output before scaling (upper 16 bits)
    CAP_GRID     = 2'd2,  // grid elements entering the modulator
    CAP_CP_LEN   = 2'd3   // cyclic prefix length of the current grid symbol
  } cap_sel_e;

  // Bit reversal of the low L bits of x.
  function automatic logic [15:0] bitrev(input logic [15:0] x, input int unsigned L);
    logic [15:0] r;
    r = '0;
    for (int unsigned b = 0; b < L; b++) r[b] = x[L-1-b];
    return r;
  endfunction

endpackage
