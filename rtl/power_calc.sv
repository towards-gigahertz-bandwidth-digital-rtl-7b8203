// power_calc: squared magnitude of PAR complex Fourier coefficients.
//
// Each coefficient a + ib becomes a^2 + b^2 (the product of the coefficient
// with its complex conjugate), is shifted right by SHIFT bits and saturated
// to OUT_W unsigned bits, the increment width stored by the averager. SHIFT
// and OUT_W are this design's choice of how much of the full 2*W-bit power
// to keep. One register stage; the bin index and flags travel alongside.
module power_calc #(
  parameter int PAR   = 8,
  parameter int W     = 28,
  parameter int KW    = 10,
  parameter int SHIFT = 16,
  parameter int OUT_W = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic                 in_start,
  input  logic [KW-1:0]        in_k,
  input  logic signed [W-1:0]  in_re [PAR],
  input  logic signed [W-1:0]  in_im [PAR],
  output logic                 out_valid,
  output logic                 out_start,
  output logic [KW-1:0]        out_k,
  output logic [OUT_W-1:0]     out_pwr [PAR]
);
  localparam int PW = 2 * W;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_start <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_start <= in_start;
    end
    out_k <= in_k;
    for (int q = 0; q < PAR; q++) begin
      logic [PW-1:0] p;
      p = PW'(unsigned'(PW'(in_re[q] * in_re[q]))) + PW'(unsigned'(PW'(in_im[q] * in_im[q])));
      p = p >> SHIFT;
      out_pwr[q] <= (p > PW'({OUT_W{1'b1}})) ? {OUT_W{1'b1}} : OUT_W'(p);
    end
  end
endmodule
