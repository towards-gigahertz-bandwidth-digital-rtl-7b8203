// adc_lines_model: behavioural model of one ADC's 13 serial bit lines as
// they reach the FPGA deserializers, including the programmable input delay
// of each line.
//
// Test mode (prbs = 1): every line carries the PRBS-7 sequence of a 7-bit
// LFSR shifted left with the two leftmost bits XORed into the right end.
// Data mode: line b carries bit b of a sample (bit 12 = over-range), the
// samples being a ramp that steps by RAMP_STEP per sample clock, modulo
// 4096 (ovr set when the ramp's low 4 bits are zero).
// Line l is late by skew[l] whole samples. The input delay is modelled only
// by its effect on the data eye: if the line's tap lies inside its eye
// (eye_lo[l] .. eye_lo[l] + EYE_W - 1, modulo TAP_WRAP) the bit arrives
// intact, otherwise it is replaced by a random bit.
module adc_lines_model #(
  parameter int LINES    = 13,
  parameter int TAP_WRAP = 26,
  parameter int EYE_W    = 10,
  parameter int MAXSKEW  = 8,
  parameter int RAMP_STEP = 1
) (
  input  logic             clk_fast,
  input  logic             prbs,
  input  int               skew   [LINES],
  input  int               eye_lo [LINES],
  input  logic [4:0]       tap    [LINES],
  output logic [LINES-1:0] line,
  output int               ramp
);
  logic [6:0]       lfsr = 7'h5A;
  logic [LINES-1:0] hist [MAXSKEW+1];

  function automatic bit in_eye(input int t, input int lo);
    int d;
    d = (t - lo + TAP_WRAP) % TAP_WRAP;
    return d < EYE_W;
  endfunction

  initial begin
    ramp = 0;
    for (int i = 0; i <= MAXSKEW; i++) hist[i] = '0;
  end

  always @(posedge clk_fast) begin
    logic [LINES-1:0] now;
    if (prbs) now = {LINES{lfsr[6]}};
    else      now = {(ramp[3:0] == 0), ramp[11:0]};
    lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    ramp <= (ramp + RAMP_STEP) % 4096;
    for (int i = MAXSKEW; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = now;
    for (int l = 0; l < LINES; l++)
      line[l] <= in_eye(int'(tap[l]), eye_lo[l]) ? hist[skew[l]][l] : 1'($urandom);
  end
endmodule
