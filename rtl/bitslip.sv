// bitslip: delays the sample stream of one bit line by a whole number of
// samples, across the boundary of the 8-bit parallel words.
//
// The last three words are kept; the output word is an 8-bit window into
// them, `slip` samples back from the newest, so a sample can "slip" from one
// word into the next. Bit 0 is the earliest sample of a word.
// slip = 0 passes the word with one register of latency; slip = MAX_SLIP
// delays by two full words. The bit align controller sets slip.
module bitslip #(
  parameter int RATIO    = 8,
  parameter int MAX_SLIP = 2 * RATIO,
  localparam int SW      = $clog2(MAX_SLIP + 1)
) (
  input  logic             clk,
  input  logic [RATIO-1:0] din,
  input  logic [SW-1:0]    slip,
  output logic [RATIO-1:0] dout
);
  initial assert (MAX_SLIP <= 2 * RATIO) else $error("bitslip: MAX_SLIP above two words");

  logic [RATIO-1:0]   w1, w2;
  logic [3*RATIO-1:0] hist;

  always_ff @(posedge clk) begin
    w1 <= din;
    w2 <= w1;
  end

  assign hist = {din, w1, w2};

  always_ff @(posedge clk)
    dout <= hist[2*RATIO - int'(slip) +: RATIO];
endmodule
