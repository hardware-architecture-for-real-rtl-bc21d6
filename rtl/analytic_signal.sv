// analytic_signal: analytic signal x(t) + j x~(t) of one channel window, by
// FFT, frequency mask and inverse FFT (x~ is the Hilbert transform of x).
//
// One radix-2 butterfly engine works in place on an L-point complex register
// array, one butterfly per clock:
//   LOAD  L real samples are written at bit-reversed addresses (L clocks).
//   FWD   decimation-in-time FFT, log2(L) stages of L/2 butterflies, each
//         stage halving its outputs, so the spectrum ends as X(f)/L in
//         natural order.
//   INV   decimation-in-frequency inverse FFT (conjugate twiddles, no
//         scaling). The mask is applied as the first stage reads its inputs:
//         bin 0 and bin L/2 are kept, bins 1..L/2-1 doubled, the rest zeroed.
//         The result lands in bit-reversed order.
//   OUT   L complex samples in time order (valid/ready, L clocks or more).
// A window therefore takes 2L + L*log2(L) clocks (1152 for L = 128).
// Samples are sign-extended and shifted up by SHIFT bits before the FFT to
// keep precision; the output carries the same scale (x * 2^SHIFT).
// Twiddles are round(2^(TW_W-2) * cos / sin(2 pi k / L)), computed at
// elaboration.
// The FFT -> mask -> IFFT structure and the mask rule follow the document
// (which takes its FFT from elsewhere); keeping the bin L/2 at unit gain, the
// radix-2 in-place engine and all widths are this design's choices.
module analytic_signal #(
  parameter int L     = fc_pkg::WIN_L,
  parameter int IN_W  = fc_pkg::EEG_W,
  parameter int DW    = 24,
  parameter int TW_W  = 16,
  parameter int SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IN_W-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam int LOG = $clog2(L);
  localparam int TF  = TW_W - 2;          // twiddle fraction bits
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t twtab_t [L/2];
  typedef logic signed [DW-1:0] d_t;

  function automatic twtab_t mk_tw(input bit use_sin);
    twtab_t t;
    real a, v;
    for (int k = 0; k < L / 2; k++) begin
      a = 2.0 * 3.14159265358979323846 * k / L;
      v = (use_sin ? $sin(a) : $cos(a)) * (2.0 ** TF);
      t[k] = tw_t'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam twtab_t COS = mk_tw(1'b0);
  localparam twtab_t SIN = mk_tw(1'b1);

  function automatic logic [LOG-1:0] bitrev(input logic [LOG-1:0] a);
    for (int b = 0; b < LOG; b++) bitrev[b] = a[LOG-1-b];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_FWD, S_INV, S_OUT} state_t;
  state_t state;

  d_t re [L];
  d_t im [L];
  logic [LOG-1:0] cnt;        // sample index (LOAD/OUT) or butterfly index
  logic [$clog2(LOG+1)-1:0] stg;

  // ---------------- butterfly address generation ----------------
  logic [LOG-1:0] top, bot;
  logic [LOG-2:0] kk;
  logic [LOG-2:0] b;
  int             hs;          // log2 of the butterfly span
  always_comb begin
    b  = cnt[LOG-2:0];
    hs = (state == S_FWD) ? int'(stg) : LOG - 1 - int'(stg);
    top = LOG'((({1'b0, b} >> hs) << (hs + 1)) | ({1'b0, b} & LOG'((1 << hs) - 1)));
    bot = top | LOG'(1 << hs);
    kk  = (state == S_FWD) ? (LOG-1)'(({1'b0, b} & LOG'((1 << hs) - 1)) << (LOG - 1 - hs))
                           : (LOG-1)'(({1'b0, b} & LOG'((1 << hs) - 1)) << stg);
  end

  // Hilbert mask gain (0, 1 or 2) of bin a
  function automatic d_t masked(input d_t v, input logic [LOG-1:0] a);
    if (a == '0 || a == LOG'(L / 2)) return v;
    else if (a < LOG'(L / 2))       return v <<< 1;
    else                             return '0;
  endfunction

  // ---------------- butterfly datapath ----------------
  d_t ar, ai, br, bi, wr, wi;
  logic signed [DW+TW_W-1:0] pr, pi_;
  d_t tr, ti, xr, xi;
  d_t nar, nai, nbr, nbi;
  always_comb begin
    tr = '0; ti = '0; xr = '0; xi = '0;
    ar = re[top]; ai = im[top]; br = re[bot]; bi = im[bot];
    wr = d_t'(COS[kk]);
    wi = (state == S_FWD) ? -d_t'(SIN[kk]) : d_t'(SIN[kk]);
    if (state == S_INV && stg == '0) begin
      ar = masked(ar, top); ai = masked(ai, top);
      br = masked(br, bot); bi = masked(bi, bot);
    end
    if (state == S_FWD) begin
      // DIT: t = W*b, a' = (a + t)/2, b' = (a - t)/2
      pr  = (DW+TW_W)'(br) * (DW+TW_W)'(wr) - (DW+TW_W)'(bi) * (DW+TW_W)'(wi);
      pi_ = (DW+TW_W)'(br) * (DW+TW_W)'(wi) + (DW+TW_W)'(bi) * (DW+TW_W)'(wr);
      tr  = d_t'(pr >>> TF);
      ti  = d_t'(pi_ >>> TF);
      nar = (ar + tr) >>> 1; nai = (ai + ti) >>> 1;
      nbr = (ar - tr) >>> 1; nbi = (ai - ti) >>> 1;
    end else begin
      // DIF: a' = a + b, b' = (a - b)*W
      xr  = ar - br; xi = ai - bi;
      pr  = (DW+TW_W)'(xr) * (DW+TW_W)'(wr) - (DW+TW_W)'(xi) * (DW+TW_W)'(wi);
      pi_ = (DW+TW_W)'(xr) * (DW+TW_W)'(wi) + (DW+TW_W)'(xi) * (DW+TW_W)'(wr);
      nar = ar + br; nai = ai + bi;
      nbr = d_t'(pr >>> TF); nbi = d_t'(pi_ >>> TF);
    end
  end

  // ---------------- control ----------------
  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_re    = re[bitrev(cnt)];
  assign out_im    = im[bitrev(cnt)];

  logic last_bfly;
  assign last_bfly = (cnt == LOG'(L / 2 - 1)) && (stg == ($bits(stg))'(LOG - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD; cnt <= '0; stg <= '0;
      for (int a = 0; a < L; a++) begin re[a] <= '0; im[a] <= '0; end
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          re[bitrev(cnt)] <= d_t'(in_data) <<< SHIFT;
          im[bitrev(cnt)] <= '0;
          cnt <= cnt + 1'b1;
          if (cnt == LOG'(L - 1)) begin state <= S_FWD; cnt <= '0; stg <= '0; end
        end
        S_FWD, S_INV: begin
          re[top] <= nar; im[top] <= nai;
          re[bot] <= nbr; im[bot] <= nbi;
          if (cnt == LOG'(L / 2 - 1)) begin
            cnt <= '0;
            stg <= stg + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
          if (last_bfly) begin
            stg   <= '0;
            state <= (state == S_FWD) ? S_INV : S_OUT;
          end
        end
        S_OUT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG'(L - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
