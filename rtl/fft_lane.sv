// fft_lane: streaming M-point FFT of one parallel lane of the sample stream.
//
// A chain of log2(M) radix-2 SDF stages (fft_sdf_stage) with feedback
// lengths M/2, M/4, ..., 1 turns a contiguous frame of M complex samples,
// one per clock, into its M discrete Fourier coefficients
// X[k] = sum_n x[n] exp(-2*pi*i*k*n/M). The coefficients leave in
// bit-reversed order; out_k gives the coefficient index of every output
// sample, so downstream logic can use it directly as an address.
//
// Interface: in_start marks the first sample of a frame (frames must be
// contiguous, M samples long; a new frame may follow directly). Latency from
// the first input sample to the first output sample is M - 1 + log2(M)
// cycles. W must hold the input plus log2(M) bits of growth.
module fft_lane #(
  parameter int W    = 28,
  parameter int M    = 1024,
  parameter int TW_W = 18
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic                   in_start,
  input  logic signed [W-1:0]    in_re,
  input  logic signed [W-1:0]    in_im,
  output logic                   out_valid,
  output logic                   out_start,
  output logic [$clog2(M)-1:0]   out_k,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im
);
  localparam int S  = $clog2(M);
  localparam int KW = $clog2(M);

  initial assert (M == (1 << S) && M >= 2) else $error("M must be a power of two");

  logic                v [S+1];
  logic                st[S+1];
  logic signed [W-1:0] re[S+1];
  logic signed [W-1:0] im[S+1];

  assign v[0]  = in_valid;
  assign st[0] = in_start;
  assign re[0] = in_re;
  assign im[0] = in_im;

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_sdf_stage #(.W(W), .D(M >> (s + 1)), .TW_W(TW_W)) u_stage (
      .clk, .rst,
      .in_valid (v[s]),   .in_start (st[s]),
      .in_re    (re[s]),  .in_im    (im[s]),
      .out_valid(v[s+1]), .out_start(st[s+1]),
      .out_re   (re[s+1]),.out_im   (im[s+1])
    );
  end

  // output position counter, reported bit-reversed
  logic [KW-1:0] pos_q, pos;
  always_ff @(posedge clk) begin
    if (rst) pos_q <= '0;
    else if (v[S]) pos_q <= pos + 1'b1;
  end
  assign pos = st[S] ? '0 : pos_q;

  always_comb
    for (int b = 0; b < KW; b++) out_k[b] = pos[KW-1-b];

  assign out_valid = v[S];
  assign out_start = st[S];
  assign out_re    = re[S];
  assign out_im    = im[S];
endmodule
