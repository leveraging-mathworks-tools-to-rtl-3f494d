// AXI-Stream write interface with the input FIFO of the grid loading path.
//
// Words from the host DMA (MM2S stream: tdata/tvalid/tready) are buffered in a
// DEPTH-word FIFO and handed on as a valid/ready stream to the grid and cyclic
// prefix RAM controllers. tready is low only while the FIFO is full. fifo_reset
// (control register bit) empties the FIFO synchronously; while it is high the stream
// is also held off (tready low). Data word format: bits 15:0 in-phase, bits 31:16
// quadrature for grid elements, bits CP_W-1:0 for cyclic prefix lengths.
// The FIFO and its reset come from the transmitter description; depth and word
// format are this design's choice. full_stall is high on each cycle the source
// offers a word that the full FIFO refuses.
module axis_write_if
  import txr_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fifo_reset,
  input  logic [31:0] s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  output logic [31:0] m_data,
  output logic        m_valid,
  input  logic        m_ready,
  output logic        full_stall
);
  logic fifo_in_ready;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (fifo_reset),
    .in_data  (s_tdata),
    .in_valid (s_tvalid && !fifo_reset),
    .in_ready (fifo_in_ready),
    .out_data (m_data),
    .out_valid(m_valid),
    .out_ready(m_ready),
    .count    ()
  );

  assign s_tready   = fifo_in_ready && !fifo_reset;
  assign full_stall = s_tvalid && !fifo_in_ready && !fifo_reset;
endmodule
