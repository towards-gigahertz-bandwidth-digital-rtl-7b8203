// prbs_checker: counts bit errors of a PRBS-7 test pattern on one bit line.
//
// In test mode the ADC sends, on every bit line, the output of a 7-bit LFSR
// whose two leftmost bits are XORed and fed back, so the bit stream obeys
// s[n] = s[n-7] XOR s[n-6] and repeats every 127 bits. Each 8-bit word is
// compared with the bits predicted from the bits before it (the previous
// word and the earlier bits of the same word), and the number of mismatching
// bits is added to a running sum. A check started by `start` sums the errors
// of CHECK_CYCLES consecutive words, then pulses `done` with the total on
// `err_sum`, which holds until the next start. The checker locks onto the
// pattern by itself: no seed is needed.
//
// Timing: done follows start by CHECK_CYCLES + 1 clocks.
module prbs_checker #(
  parameter int RATIO        = 8,
  parameter int CHECK_CYCLES = 1 << 27,
  parameter int ERR_W        = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [RATIO-1:0] word,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [ERR_W-1:0] err_sum,
  output logic [$clog2(RATIO+1)-1:0] word_errs   // errors in the current word
);
  localparam int CW = $clog2(CHECK_CYCLES + 1);

  logic [RATIO-1:0]   prev;
  logic [2*RATIO-1:0] s;
  logic [RATIO-1:0]   err_bits;

  always_ff @(posedge clk) prev <= word;

  assign s = {word, prev};
  always_comb begin
    for (int j = 0; j < RATIO; j++)
      err_bits[j] = s[RATIO + j] ^ s[RATIO + j - 7] ^ s[RATIO + j - 6];
    word_errs = '0;
    for (int j = 0; j < RATIO; j++)
      word_errs += $bits(word_errs)'(err_bits[j]);
  end

  logic [CW-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cnt     <= '0;
      err_sum <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        cnt     <= '0;
        err_sum <= '0;
      end else if (busy) begin
        err_sum <= err_sum + ERR_W'(word_errs);
        cnt     <= cnt + 1'b1;
        if (cnt == CW'(CHECK_CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
