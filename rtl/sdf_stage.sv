// One radix-2 decimation-in-frequency stage of a single-path delay-feedback (SDF)
// inverse FFT.
//
// The stage owns a delay line of D = N >> (S+1) complex words. Input samples are
// counted modulo 2D (only cycles with in_valid count; the stage holds still
// otherwise). In the first half of a 2D block the input is pushed into the delay line
// and the word leaving the line (the previous block's twiddled difference) is sent
// out. In the second half the stage takes a = word leaving the line and b = input,
// outputs (a+b)/2 and pushes ((a-b)/2) * exp(+j*2*pi*k*2^S/N), k = position in the half.
// Halving at every stage keeps the word width constant; the full IFFT therefore
// computes (1/N) * sum. Outputs come D valid samples after their inputs; out_valid is
// held low until the delay line holds real data (the first D outputs of the first
// block are skipped), so the output stream is exactly the transformed input stream.
// clear restarts the block counter and forgets the delay line.
// Twiddles are 18-bit signed with 1.0 = 2^16, computed at elaboration. The delay line
// is read asynchronously (distributed RAM); out is registered.
module sdf_stage
  import txr_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned S = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  iqw_t in_data,
  input  logic in_valid,
  output iqw_t out_data,
  output logic out_valid
);
  localparam int unsigned D    = N >> (S + 1);
  localparam int unsigned CW   = $clog2(2 * D);
  localparam int unsigned PW   = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned TW_W = 18;
  localparam int unsigned TW_F = 16;
  localparam int unsigned PROD_W = FFT_W + TW_W;

  function automatic logic [D*TW_W-1:0] gen_tw(input bit imag);
    logic [D*TW_W-1:0] r;
    real ang, v;
    r = '0;
    for (int unsigned k = 0; k < D; k++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(k * (1 << S)) / real'(N);
      v   = imag ? $sin(ang) : $cos(ang);
      r[k*TW_W +: TW_W] = TW_W'($rtoi(v * real'(1 << TW_F) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return r;
  endfunction

  localparam logic [D*TW_W-1:0] TW_RE = gen_tw(1'b0);
  localparam logic [D*TW_W-1:0] TW_IM = gen_tw(1'b1);

  iqw_t             dl [D];
  logic [PW-1:0]    ptr;
  logic [CW-1:0]    cnt;
  logic             primed;
  logic             second_half;
  iqw_t             a, b, sum, push;
  logic signed [TW_W-1:0]   tr, ti;
  logic signed [PROD_W-1:0] pr, pi;
  logic [CW-1:0]    k;

  assign a           = dl[ptr];
  assign b           = in_data;
  assign second_half = (cnt >= CW'(D));
  assign k           = cnt - CW'(D);

  logic signed [FFT_W:0]   sr, si, dr, di;
  logic signed [PROD_W-1:0] dre, dim, tre, tim;
  logic signed [FFT_W-1:0]  rot_i, rot_q;

  always_comb begin
    sr     = {a.i[FFT_W-1], a.i} + {b.i[FFT_W-1], b.i};
    si     = {a.q[FFT_W-1], a.q} + {b.q[FFT_W-1], b.q};
    dr     = {a.i[FFT_W-1], a.i} - {b.i[FFT_W-1], b.i};
    di     = {a.q[FFT_W-1], a.q} - {b.q[FFT_W-1], b.q};
    sum.i  = sr[FFT_W:1];
    sum.q  = si[FFT_W:1];
    tr     = TW_RE[k*TW_W +: TW_W];
    ti     = TW_IM[k*TW_W +: TW_W];
    dre    = {{TW_W{dr[FFT_W]}}, dr[FFT_W:1]};
    dim    = {{TW_W{di[FFT_W]}}, di[FFT_W:1]};
    tre    = {{FFT_W{tr[TW_W-1]}}, tr};
    tim    = {{FFT_W{ti[TW_W-1]}}, ti};
    pr     = dre * tre - dim * tim + PROD_W'(1 << (TW_F - 1));
    pi     = dre * tim + dim * tre + PROD_W'(1 << (TW_F - 1));
    rot_i  = pr[TW_F+FFT_W-1:TW_F];
    rot_q  = pi[TW_F+FFT_W-1:TW_F];
    push.i = rot_i;
    push.q = rot_q;
    if (!second_half) push = b;
  end

  always_ff @(posedge clk) begin
    if (in_valid) dl[ptr] <= push;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      ptr       <= '0;
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (second_half || primed);
      if (in_valid) begin
        out_data <= second_half ? sum : a;
        ptr      <= (ptr == PW'(D - 1)) ? '0 : ptr + 1'b1;
        cnt      <= (cnt == CW'(2 * D - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(2 * D - 1)) primed <= 1'b1;
      end
    end
  end
endmodule
