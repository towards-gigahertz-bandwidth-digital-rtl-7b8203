// ddc_fs4: complex digital down conversion by a quarter of the sample rate
// for a bundle of PAR parallel real samples.
//
// Mixing with exp(-2*pi*i*n/4) multiplies sample n by 1, -i, -1, +i in turn,
// so no multiplier is needed: within each bundle sample 4k goes to I
// unchanged, 4k+1 goes to Q negated, 4k+2 goes to I negated and 4k+3 goes
// to Q unchanged; the other output of each sample is zero. PAR is a
// multiple of 4, so the pattern lines up with every bundle. The outputs are
// one bit wider than the input so that negating the most negative code
// cannot overflow. Lane 0 is the earliest sample of a bundle.
//
// Timing: one register stage, as in the reference structure (every path
// through a z^-1 box); in_valid is carried alongside with the same delay.
module ddc_fs4 #(
  parameter int PAR = 8,
  parameter int W   = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] din   [PAR],
  output logic                out_valid,
  output logic signed [W:0]   i_out [PAR],
  output logic signed [W:0]   q_out [PAR]
);
  initial assert (PAR % 4 == 0) else $error("PAR must be a multiple of 4");

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    for (int n = 0; n < PAR; n++) begin
      unique case (n % 4)
        0: begin i_out[n] <=  (W+1)'(din[n]); q_out[n] <= '0;              end
        1: begin i_out[n] <= '0;              q_out[n] <= -((W+1)'(din[n])); end
        2: begin i_out[n] <= -((W+1)'(din[n])); q_out[n] <= '0;            end
        default: begin i_out[n] <= '0;        q_out[n] <=  (W+1)'(din[n]); end
      endcase
    end
  end
endmodule
