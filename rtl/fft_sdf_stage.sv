// fft_sdf_stage: one radix-2 decimation-in-frequency stage of a streaming
// single-path delay-feedback (SDF) FFT, for transforms of length L = 2*D.
//
// The stage sees one complex sample per clock. During the first half of
// each L-sample block (phase 0) the incoming samples are parked in a D-entry
// feedback memory while the differences left there by the previous block
// leave the stage, multiplied by the twiddle factor W_L^j = exp(-2*pi*i*j/L).
// During the second half (phase 1) the stored sample x[j] meets x[j+D]: the
// sum leaves at once and the difference goes back into the memory. Blocks
// therefore come out in two halves, the sums first, with a latency of D+1
// cycles (D in the memory, one output register).
//
// The block phase is reset by in_start, which marks the first sample of a
// frame; frames must be contiguous and a multiple of L long. The stage runs
// on every clock; in_valid and in_start only travel alongside the data so
// that the last block of a frame drains without any following input.
// The data width W does not grow from stage to stage: the instantiating
// transform sizes W for the full growth of the transform, so no scaling or
// overflow handling is needed here. Twiddles are TW_W-bit signed with
// 2^(TW_W-1)-1 standing for 1.0, computed at elaboration from cos/sin, and
// products are rounded to nearest.
module fft_sdf_stage #(
  parameter int W    = 28,
  parameter int D    = 512,
  parameter int TW_W = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic                in_start,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_start,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int CW = $clog2(2 * D);      // block counter width
  localparam int JW = (D > 1) ? $clog2(D) : 1;
  localparam int TW_ONE = (1 << (TW_W - 1)) - 1;

  typedef logic signed [TW_W-1:0] tw_tab_t [D];

  function automatic tw_tab_t make_cos();
    tw_tab_t t;
    for (int j = 0; j < D; j++)
      t[j] = TW_W'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * j / (2.0 * D)) * TW_ONE + 0.5)));
    return t;
  endfunction

  function automatic tw_tab_t make_sin();
    tw_tab_t t;
    for (int j = 0; j < D; j++)
      t[j] = TW_W'($rtoi($floor($sin(2.0 * 3.14159265358979323846 * j / (2.0 * D)) * TW_ONE + 0.5)));
    return t;
  endfunction

  localparam tw_tab_t COS_TAB = make_cos();
  localparam tw_tab_t SIN_TAB = make_sin();

  // block position
  logic [CW-1:0] cnt_q, cnt;
  logic          phase;
  logic [JW-1:0] j;

  always_ff @(posedge clk) begin
    if (rst) cnt_q <= '0;
    else     cnt_q <= cnt + 1'b1;
  end
  assign cnt   = in_start ? '0 : cnt_q;
  assign phase = cnt[CW-1];
  if (D > 1) begin : g_j
    assign j = cnt[JW-1:0];
  end else begin : g_j1
    assign j = '0;
  end

  // feedback memory, read before write at the same address
  logic signed [W-1:0] mem_re [D];
  logic signed [W-1:0] mem_im [D];
  logic signed [W-1:0] head_re, head_im;
  logic signed [W-1:0] fb_re, fb_im;
  assign head_re = mem_re[j];
  assign head_im = mem_im[j];

  always_comb begin
    if (phase) begin
      fb_re = head_re - in_re;
      fb_im = head_im - in_im;
    end else begin
      fb_re = in_re;
      fb_im = in_im;
    end
  end

  always_ff @(posedge clk) begin
    mem_re[j] <= fb_re;
    mem_im[j] <= fb_im;
  end

  // twiddle multiply of the parked difference: (a+ib)(c-is)
  logic signed [TW_W-1:0]    c_tw, s_tw;
  logic signed [W+TW_W:0]    p_re, p_im;
  logic signed [W-1:0]       rot_re, rot_im;
  assign c_tw = COS_TAB[j];
  assign s_tw = SIN_TAB[j];
  assign p_re = (W+TW_W+1)'(head_re * c_tw) + (W+TW_W+1)'(head_im * s_tw)
              + (W+TW_W+1)'(1 <<< (TW_W - 2));
  assign p_im = (W+TW_W+1)'(head_im * c_tw) - (W+TW_W+1)'(head_re * s_tw)
              + (W+TW_W+1)'(1 <<< (TW_W - 2));
  assign rot_re = W'(p_re >>> (TW_W - 1));
  assign rot_im = W'(p_im >>> (TW_W - 1));

  // flags follow the data with a delay of D cycles
  logic [D-1:0] v_sr, s_sr;
  always_ff @(posedge clk) begin
    if (rst) begin
      v_sr <= '0;
      s_sr <= '0;
    end else if (D > 1) begin
      v_sr <= D'({v_sr, in_valid});
      s_sr <= D'({s_sr, in_start});
    end else begin
      v_sr <= D'(in_valid);
      s_sr <= D'(in_start);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_start <= 1'b0;
    end else begin
      out_valid <= v_sr[D-1];
      out_start <= s_sr[D-1];
    end
    if (phase) begin
      out_re <= head_re + in_re;
      out_im <= head_im + in_im;
    end else if (D > 1) begin
      out_re <= rot_re;
      out_im <= rot_im;
    end else begin
      out_re <= head_re;
      out_im <= head_im;
    end
  end
endmodule
