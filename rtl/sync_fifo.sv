// Synchronous first-in first-out buffer with valid/ready handshakes on both sides.
//
// A circular buffer of DEPTH entries (DEPTH a power of two) with write and read
// pointers one bit wider than the address, so full and empty are told apart. The
// read data is registered in a one-entry output stage, so the storage array maps to
// block or distributed RAM. clear empties the FIFO in one cycle (synchronous), as
// rst_n does. in_ready is low when full; out_valid is high when a word is held.
// Throughput is one word per cycle in and out; latency from write to out_valid is
// two cycles when the FIFO was empty.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic        mem_empty, mem_full, do_wr, do_rd;

  assign mem_empty = (wptr == rptr);
  assign mem_full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign in_ready  = !mem_full;
  assign do_wr     = in_valid && in_ready;
  // Move a word from the array into the output register when it is empty or draining.
  assign do_rd     = !mem_empty && (!out_valid || out_ready);
  assign count     = (wptr - rptr) + {{AW{1'b0}}, out_valid};

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      wptr      <= '0;
      rptr      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) begin
        rptr      <= rptr + 1'b1;
        out_valid <= 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_rd) out_data <= mem[rptr[AW-1:0]];
  end
endmodule
