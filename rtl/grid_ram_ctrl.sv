// Resource grid RAM with its write and read addressing and the FIFO that feeds the
// OFDM modulator.
//
// Loading: while write_cp is low, every word arriving from the input FIFO
// (in_valid) is written at the write address, which counts up from zero and wraps
// after num_elements words; fifo_reset returns it to zero. wr_wrap pulses when the
// last element of the grid is written.
// Transmission: when tx_enable is high the read counter walks the RAM from address 0
// to num_elements-1, one element per cycle while the output FIFO has room, and starts
// again from 0 at the end of the grid while tx_enable is still high, so consecutive
// frames follow without a break. The element that ends a frame carries out_eof; if
// tx_enable is low when the end of the frame is read, it also carries out_last and
// reading stops (a frame is never cut short). The RAM read takes one cycle; the
// output FIFO (FIFO_DEPTH words) decouples it from the modulator's ready.
// Read and write ports are separate (simple dual-port RAM). Grid elements are stored
// in the order they are loaded: subcarrier index fastest, then symbol (the column
// order of a subcarrier-by-symbol grid). The RAM, counters and FIFO follow the
// transmitter description; looping of frames and the end-of-frame flags are this
// design's choice.
module grid_ram_ctrl
  import txr_pkg::*;
#(
  parameter int unsigned DEPTH      = 131072,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fifo_reset,
  input  logic        write_cp,
  input  logic [31:0] num_elements,
  input  logic        tx_enable,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  output logic        wr_wrap,
  output iq16_t       out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_eof,
  output logic        out_last,
  output logic        reading
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0]  gram [DEPTH];
  logic [AW-1:0] waddr, raddr;
  logic         wr_en, rd_en, rd_v, rd_eof, rd_last, at_end;
  logic [31:0]  rd_word;
  logic [$clog2(FIFO_DEPTH):0] fcount;
  logic         fifo_in_ready;
  logic [33:0]  fifo_out;

  assign wr_en   = in_valid && !write_cp;
  assign wr_wrap = wr_en && (32'(waddr) == num_elements - 32'd1);
  assign at_end  = (32'(raddr) == num_elements - 32'd1);
  assign rd_en   = reading && (32'(fcount) + 32'(rd_v) < FIFO_DEPTH);

  always_ff @(posedge clk) begin
    if (wr_en) gram[waddr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_word <= gram[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr   <= '0;
      raddr   <= '0;
      reading <= 1'b0;
      rd_v    <= 1'b0;
      rd_eof  <= 1'b0;
      rd_last <= 1'b0;
    end else begin
      if (fifo_reset)  waddr <= '0;
      else if (wr_en)  waddr <= wr_wrap ? '0 : waddr + 1'b1;

      rd_v    <= rd_en;
      rd_eof  <= rd_en && at_end;
      rd_last <= rd_en && at_end && !tx_enable;
      if (!reading) begin
        raddr <= '0;
        if (tx_enable && num_elements != 32'd0) reading <= 1'b1;
      end else if (rd_en) begin
        if (at_end) begin
          raddr <= '0;
          if (!tx_enable) reading <= 1'b0;
        end else begin
          raddr <= raddr + 1'b1;
        end
      end
    end
  end

  sync_fifo #(.WIDTH(34), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .in_data  ({rd_last, rd_eof, rd_word}),
    .in_valid (rd_v),
    .in_ready (fifo_in_ready),
    .out_data (fifo_out),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .count    (fcount)
  );

  assign out_data = iq16_t'(fifo_out[31:0]);
  assign out_eof  = fifo_out[32];
  assign out_last = fifo_out[33];

  assert property (@(posedge clk) disable iff (!rst_n) rd_v |-> fifo_in_ready);
endmodule
