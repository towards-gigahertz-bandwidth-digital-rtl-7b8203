// fft_combine: merges the 8 lane transforms of a parallel sample stream into
// one N-point discrete Fourier transform (N = 8*M).
//
// Lane m carries the samples x[8n+m]; its M-point transform F_m[k] comes
// from an fft_lane. Splitting a transform into its even and odd samples
// gives X[k] = E[k] + W_L^k O[k] and X[k+L/2] = E[k] - W_L^k O[k] for a
// transform of length L (W_L = exp(-2*pi*i/L)). Applied three times this
// rebuilds the full transform from the lanes, following the even/odd tree:
//   level 1 (L = 2M): lanes r and r+4 give the transform of x[4n+r]
//   level 2 (L = 4M): those of x[4n+r] and x[4n+r+2] give that of x[2n+r]
//   level 3 (L = 8M): those of x[2n] and x[2n+1] give X
// Every level works on coefficient k of all lanes at once, so all 8
// coefficients X[k + q*M], q = 0..7, are produced in the same clock cycle.
// Twiddles are W_N^e for e < N/2, one table computed at elaboration.
//
// Interface: in_k is the lane coefficient index (any order); out_bin[q]
// holds X[out_k + q*M]. One register per level: latency 3 cycles,
// one set of 8 coefficients per clock. W does not grow; it must hold the
// full growth of the N-point transform.
module fft_combine #(
  parameter int W    = 28,
  parameter int M    = 1024,
  parameter int TW_W = 18
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic                   in_start,
  input  logic [$clog2(M)-1:0]   in_k,
  input  logic signed [W-1:0]    in_re  [8],
  input  logic signed [W-1:0]    in_im  [8],
  output logic                   out_valid,
  output logic                   out_start,
  output logic [$clog2(M)-1:0]   out_k,
  output logic signed [W-1:0]    out_re [8],
  output logic signed [W-1:0]    out_im [8]
);
  localparam int N  = 8 * M;
  localparam int H  = N / 2;
  localparam int KW = $clog2(M);
  localparam int EW = $clog2(H);
  localparam int TW_ONE = (1 << (TW_W - 1)) - 1;

  typedef logic signed [TW_W-1:0] tw_tab_t [H];

  function automatic tw_tab_t make_tab(input bit sine);
    tw_tab_t t;
    real a;
    for (int e = 0; e < H; e++) begin
      a = 2.0 * 3.14159265358979323846 * e / N;
      t[e] = TW_W'($rtoi($floor((sine ? $sin(a) : $cos(a)) * TW_ONE + 0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t COS_TAB = make_tab(1'b0);
  localparam tw_tab_t SIN_TAB = make_tab(1'b1);

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  // a * W_N^e
  function automatic cplx_t rot(input cplx_t a, input logic [EW-1:0] e);
    logic signed [W+TW_W:0] pr, pi;
    cplx_t r;
    pr = (W+TW_W+1)'(a.re * COS_TAB[e]) + (W+TW_W+1)'(a.im * SIN_TAB[e])
       + (W+TW_W+1)'(1 <<< (TW_W - 2));
    pi = (W+TW_W+1)'(a.im * COS_TAB[e]) - (W+TW_W+1)'(a.re * SIN_TAB[e])
       + (W+TW_W+1)'(1 <<< (TW_W - 2));
    r.re = W'(pr >>> (TW_W - 1));
    r.im = W'(pi >>> (TW_W - 1));
    return r;
  endfunction

  function automatic cplx_t add(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t sub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  cplx_t f [8];
  always_comb
    for (int m = 0; m < 8; m++) begin
      f[m].re = in_re[m];
      f[m].im = in_im[m];
    end

  // level 1: g[r][h] = transform of x[4n+r] at index k + h*M
  cplx_t g_d [4][2];
  cplx_t g   [4][2];
  always_comb
    for (int r = 0; r < 4; r++) begin
      cplx_t t;
      t = rot(f[r+4], EW'(4 * int'(in_k)));
      g_d[r][0] = add(f[r], t);
      g_d[r][1] = sub(f[r], t);
    end

  // level 2: hh[r][h] = transform of x[2n+r] at index k + h*M
  cplx_t h_d [2][4];
  cplx_t hh  [2][4];
  logic [KW-1:0] k1, k2;
  always_comb
    for (int r = 0; r < 2; r++)
      for (int h = 0; h < 2; h++) begin
        cplx_t t;
        t = rot(g[r+2][h], EW'(2 * (int'(k1) + h * M)));
        h_d[r][h]   = add(g[r][h], t);
        h_d[r][h+2] = sub(g[r][h], t);
      end

  // level 3: x_d[q] = X[k + q*M]
  cplx_t x_d [8];
  always_comb
    for (int h = 0; h < 4; h++) begin
      cplx_t t;
      t = rot(hh[1][h], EW'(int'(k2) + h * M));
      x_d[h]   = add(hh[0][h], t);
      x_d[h+4] = sub(hh[0][h], t);
    end

  logic [2:0] v_sr, s_sr;
  always_ff @(posedge clk) begin
    if (rst) begin
      v_sr <= '0;
      s_sr <= '0;
    end else begin
      v_sr <= {v_sr[1:0], in_valid};
      s_sr <= {s_sr[1:0], in_start};
    end
    g  <= g_d;
    k1 <= in_k;
    hh <= h_d;
    k2 <= k1;
    for (int q = 0; q < 8; q++) begin
      out_re[q] <= x_d[q].re;
      out_im[q] <= x_d[q].im;
    end
    out_k <= k2;
  end

  assign out_valid = v_sr[2];
  assign out_start = s_sr[2];
endmodule
