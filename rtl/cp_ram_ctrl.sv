// Cyclic prefix RAM with its write addressing and the symbol counter that selects
// the cyclic prefix length of the grid symbol currently leaving the grid RAM.
//
// Loading: while write_cp is high each word from the input FIFO is written (its low
// CP_W bits) at the write address, which counts from zero, wraps after num_cp
// entries and returns to zero on fifo_reset. The table holds one length per symbol
// of a subframe (14 * 2^mu entries, or 12 * 4 with extended prefix).
// Transmission: every accepted grid element (elem_fire) advances a subcarrier
// counter modulo num_sc; when it wraps, the symbol index advances modulo num_cp. The
// element that ends a frame (elem_eof) or clear returns both counters to zero.
// cp_len is the table entry of the current symbol index, read combinationally, so
// it is valid with the first element of each symbol.
// The RAM, its control and the per-symbol selection follow the transmitter
// description; the counter details are this design's choice.
module cp_ram_ctrl
  import txr_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            fifo_reset,
  input  logic            write_cp,
  input  logic [15:0]     num_cp,
  input  logic [15:0]     num_sc,
  input  logic [31:0]     in_data,
  input  logic            in_valid,
  input  logic            elem_fire,
  input  logic            elem_eof,
  output logic [CP_W-1:0] cp_len,
  output logic [15:0]     sym_idx,
  output logic            wr_wrap
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CP_W-1:0] cpram [DEPTH];
  logic [AW-1:0]   waddr;
  logic [15:0]     sc;
  logic            wr_en;

  assign wr_en   = in_valid && write_cp;
  assign wr_wrap = wr_en && (16'(waddr) == num_cp - 16'd1);
  assign cp_len  = cpram[AW'(sym_idx)];

  always_ff @(posedge clk) begin
    if (wr_en) cpram[waddr] <= in_data[CP_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr   <= '0;
      sc      <= '0;
      sym_idx <= '0;
    end else begin
      if (fifo_reset) waddr <= '0;
      else if (wr_en) waddr <= wr_wrap ? '0 : waddr + 1'b1;

      if (clear || (elem_fire && elem_eof)) begin
        sc      <= '0;
        sym_idx <= '0;
      end else if (elem_fire) begin
        if (sc == num_sc - 16'd1) begin
          sc      <= '0;
          sym_idx <= (sym_idx == num_cp - 16'd1) ? '0 : sym_idx + 16'd1;
        end else begin
          sc <= sc + 16'd1;
        end
      end
    end
  end
endmodule
