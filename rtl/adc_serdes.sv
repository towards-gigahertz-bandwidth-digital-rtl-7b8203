// adc_serdes: 1:8 deserializer for one ADC bit line.
//
// The line carries one bit of every ADC sample at the sample rate. A shift
// register clocked by the sample clock collects the bits; the divided clock
// (sample clock / 8, rising edges coincident with sample-clock rising edges,
// both from the same PLL) copies the last 8 bits into a parallel word.
// Bit 0 of the word is the earliest sample. Where within the stream a word
// starts is arbitrary; the bit slip logic downstream fixes the word boundary.
// This is an RTL stand-in for the FPGA's SerDes primitive,
// written at single data rate on the sample clock rather than with the
// primitive's half-rate DDR clock.
//
// Timing: word updates once per clk_div cycle and holds the 8 bits that
// arrived in the preceding 8 sample-clock cycles.
module adc_serdes #(
  parameter int RATIO = 8
) (
  input  logic             clk_fast,   // sample clock (1 GHz)
  input  logic             clk_div,    // parallel clock (125 MHz)
  input  logic             din,        // serial bit line
  output logic [RATIO-1:0] word
);
  logic [RATIO-1:0] sr;

  always_ff @(posedge clk_fast)
    sr <= {din, sr[RATIO-1:1]};

  always_ff @(posedge clk_div)
    word <= sr;
endmodule
