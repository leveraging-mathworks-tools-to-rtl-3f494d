// OFDM modulator for one fixed FFT size N: subcarrier mapping, inverse FFT and
// cyclic prefix insertion, producing an uninterrupted time-domain sample stream.
//
// Input side: grid elements of one OFDM symbol arrive in subcarrier order
// (num_sc = K elements per symbol, K <= N) with the cyclic prefix length of that
// symbol. Element k is written into a ping-pong input buffer at FFT bin
// (k - floor(K/2)) mod N, so the grid is centred on DC as in the 5G OFDM definition;
// bins no element maps to are read as zero (guard bands), so the buffer never needs
// clearing. in_last marks the final element of a transmission.
// Feeder: streams a full buffer, one bin per cycle, into the SDF inverse FFT
// (sdf_ifft). Because the FFT pipeline only advances on input, after a symbol marked
// last the feeder sends one all-zero padding symbol so the real one is flushed out.
// Collector: writes the bit-reversed IFFT output of each symbol into one of NB
// output buffers at its natural index. A small tag FIFO carries each symbol's CP
// length and padding flag from feeder to collector; padding symbols are discarded.
// Player: reads each finished buffer as its last cp samples followed by all N
// samples, back to back, one sample per cycle (out_valid high), so a running grid
// gives a gapless waveform. The feeder starts a symbol only while fewer than NB
// real symbols are between feed start and the end of playback. A padding symbol is
// not counted: its tail stays in the FFT pipeline until the next transmission pushes
// it out, and it is then dropped by the collector.
// Output value = (1/N) * IDFT sum, in iqw_t with grid full scale at 2^(FFT_W-3).
// Latency from the last element of a symbol to its first output sample is about two
// symbol feeds (2N cycles). The buffering structure and the padding flush are this
// design's own; the paper's modulator is a library block given only by its function.
module ofdm_mod
  import txr_pkg::*;
#(
  parameter int unsigned N  = 512,
  parameter int unsigned NB = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [15:0]     num_sc,
  input  iq16_t           in_data,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_last,
  input  logic [CP_W-1:0] in_cp_len,
  output iqw_t            out_data,
  output logic            out_valid,
  output logic            busy,
  output logic            pad_sent
);
  localparam int unsigned L   = $clog2(N);
  localparam int unsigned SW  = $clog2(NB);
  localparam int unsigned OW  = $clog2(NB + 1);

  // ---------------- input ping-pong buffer ----------------
  iq16_t           ibuf [2*N];
  logic [15:0]     wcnt;
  logic            wbank;
  logic [1:0]      bank_full, bank_last;
  logic [CP_W-1:0] bank_cp [2];
  logic [15:0]     half;
  logic [L-1:0]    waddr;

  assign half     = num_sc >> 1;
  assign waddr    = L'(wcnt - half);
  assign in_ready = !bank_full[wbank];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) ibuf[{wbank, waddr}] <= in_data;
  end

  // ---------------- feeder ----------------
  logic            feeding, feed_pad, pad_pending, rbank;
  logic [L-1:0]    fcnt;
  logic [OW-1:0]   outstanding;
  logic            feed_start, feed_end;
  logic            tag_in_ready, tag_valid, tag_pop;
  logic [CP_W:0]   tag_data;
  logic [CP_W-1:0] feed_cp;
  iq16_t           rd_data;
  logic            rd_v, rd_occ;
  iqw_t            fft_in, fft_out;
  logic            fft_out_v;

  assign feed_start = !feeding && (pad_pending || bank_full[rbank])
                      && (outstanding < OW'(NB)) && tag_in_ready;
  assign feed_end   = feeding && (fcnt == L'(N - 1));
  assign feed_cp    = bank_cp[rbank];

  sync_fifo #(.WIDTH(CP_W + 1), .DEPTH(2 * NB)) u_tags (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .in_data  ({pad_pending, feed_cp}),
    .in_valid (feed_start),
    .in_ready (tag_in_ready),
    .out_data (tag_data),
    .out_valid(tag_valid),
    .out_ready(tag_pop),
    .count    ()
  );

  always_ff @(posedge clk) begin
    rd_data <= ibuf[{rbank, fcnt}];
  end

  always_comb begin
    fft_in = '0;
    if (rd_occ) begin
      fft_in.i = {{2{rd_data.i[IQ_W-1]}}, rd_data.i, {(FFT_W-IQ_W-2){1'b0}}};
      fft_in.q = {{2{rd_data.q[IQ_W-1]}}, rd_data.q, {(FFT_W-IQ_W-2){1'b0}}};
    end
  end

  sdf_ifft #(.N(N)) u_ifft (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .in_data  (fft_in),
    .in_valid (rd_v),
    .out_data (fft_out),
    .out_valid(fft_out_v)
  );

  // ---------------- collector ----------------
  iqw_t            obuf [NB*N];
  logic [L-1:0]    ocnt;
  logic [SW-1:0]   wslot;
  logic [NB-1:0]   slot_ready;
  logic [CP_W-1:0] slot_cp [NB];
  logic            coll_end;

  assign coll_end   = fft_out_v && (ocnt == L'(N - 1));
  assign tag_pop    = coll_end;

  always_ff @(posedge clk) begin
    if (fft_out_v) obuf[{wslot, L'(bitrev(16'(ocnt), L))}] <= fft_out;
  end

  // ---------------- player ----------------
  logic            playing;
  logic [SW-1:0]   pslot, pslot_nx;
  logic [15:0]     pcnt;
  logic [CP_W-1:0] pcp;
  logic            play_end, retire_play;
  logic [L-1:0]    paddr;

  assign pslot_nx    = (pslot == SW'(NB - 1)) ? '0 : pslot + 1'b1;
  assign play_end    = playing && (pcnt == 16'(N) + 16'(pcp) - 16'd1);
  assign retire_play = play_end;
  assign paddr       = (pcnt < 16'(pcp)) ? L'(16'(N) - 16'(pcp) + pcnt) : L'(pcnt - 16'(pcp));

  always_ff @(posedge clk) begin
    out_data <= obuf[{pslot, paddr}];
  end

  assign busy = feeding || pad_pending || (|bank_full) || (outstanding != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt        <= '0;
      wbank       <= 1'b0;
      bank_full   <= '0;
      bank_last   <= '0;
      bank_cp     <= '{default: '0};
      feeding     <= 1'b0;
      feed_pad    <= 1'b0;
      pad_pending <= 1'b0;
      rbank       <= 1'b0;
      fcnt        <= '0;
      outstanding <= '0;
      rd_v        <= 1'b0;
      rd_occ      <= 1'b0;
      ocnt        <= '0;
      wslot       <= '0;
      slot_ready  <= '0;
      slot_cp     <= '{default: '0};
      playing     <= 1'b0;
      pslot       <= '0;
      pcnt        <= '0;
      pcp         <= '0;
      out_valid   <= 1'b0;
      pad_sent    <= 1'b0;
    end else if (clear) begin
      wcnt        <= '0;
      wbank       <= 1'b0;
      bank_full   <= '0;
      bank_last   <= '0;
      feeding     <= 1'b0;
      feed_pad    <= 1'b0;
      pad_pending <= 1'b0;
      rbank       <= 1'b0;
      fcnt        <= '0;
      outstanding <= '0;
      rd_v        <= 1'b0;
      rd_occ      <= 1'b0;
      ocnt        <= '0;
      wslot       <= '0;
      slot_ready  <= '0;
      playing     <= 1'b0;
      pslot       <= '0;
      pcnt        <= '0;
      out_valid   <= 1'b0;
      pad_sent    <= 1'b0;
    end else begin
      // writer
      if (in_valid && in_ready) begin
        if (wcnt == '0) bank_cp[wbank] <= in_cp_len;
        if (wcnt == num_sc - 16'd1) begin
          wcnt             <= '0;
          bank_full[wbank] <= 1'b1;
          bank_last[wbank] <= in_last;
          wbank            <= ~wbank;
        end else begin
          wcnt <= wcnt + 16'd1;
        end
      end
      // feeder
      pad_sent <= 1'b0;
      if (feed_start) begin
        feeding  <= 1'b1;
        feed_pad <= pad_pending;
        fcnt     <= '0;
      end else if (feeding) begin
        fcnt <= fcnt + 1'b1;
        if (feed_end) begin
          feeding <= 1'b0;
          if (feed_pad) begin
            pad_pending <= 1'b0;
            pad_sent    <= 1'b1;
          end else begin
            bank_full[rbank] <= 1'b0;
            pad_pending      <= bank_last[rbank];
            rbank            <= ~rbank;
          end
        end
      end
      rd_v   <= feeding;
      rd_occ <= feeding && !feed_pad &&
                ((16'(fcnt) < num_sc - half) || (16'(fcnt) >= 16'(N) - half));
      outstanding <= outstanding + OW'(feed_start && !pad_pending) - OW'(retire_play);
      // collector
      if (fft_out_v) begin
        ocnt <= ocnt + 1'b1;
        if (coll_end && !tag_data[CP_W]) begin
          slot_ready[wslot] <= 1'b1;
          slot_cp[wslot]    <= tag_data[CP_W-1:0];
          wslot             <= (wslot == SW'(NB - 1)) ? '0 : wslot + 1'b1;
        end
      end
      // player
      out_valid <= playing;
      if (playing) begin
        if (play_end) begin
          slot_ready[pslot] <= 1'b0;
          pslot             <= pslot_nx;
          pcnt              <= '0;
          if (slot_ready[pslot_nx]) pcp <= slot_cp[pslot_nx];
          else                      playing <= 1'b0;
        end else begin
          pcnt <= pcnt + 16'd1;
        end
      end else if (slot_ready[pslot]) begin
        playing <= 1'b1;
        pcnt    <= '0;
        pcp     <= slot_cp[pslot];
      end
    end
  end

  // The collector must never overwrite a buffer that is still waiting to be played.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (coll_end && !tag_data[CP_W]) |-> !slot_ready[wslot] || (play_end && pslot == wslot));
  assert property (@(posedge clk) disable iff (!rst_n) coll_end |-> tag_valid);
endmodule
