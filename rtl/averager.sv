// averager: accumulates power spectra of successive measurement shots in a
// block RAM, with optional alternating-sign ("diff") accumulation.
//
// Each RAM word holds the running sums of the PAR frequency bins that the
// parallel FFT delivers together (bins k + q*M, q = 0..PAR-1, at address k),
// so one word is read, PAR adders update it, and it is written back, every
// clock: the incoming powers are delayed one cycle to meet the stored sums
// from the RAM's registered read port. The first shot overwrites the RAM,
// so no separate clear pass is needed. In diff mode odd shots are
// subtracted, which removes a background measured in alternate shots.
//
// The word width follows W_RAM = PAR*(W_INC + log2 D_max): each sum has
// W_INC + log2(DAVG_MAX) bits plus one sign bit, the sign bit being this
// design's addition for diff mode.
//
// Control: a pulse on arm starts a run of `depth` shots (depth >= 1). A
// shot is one frame of M words, in_start marking its first word. After the
// last word of shot depth-1 is written, busy falls and done rises; later
// frames are ignored until the next arm. While not busy, rd_addr reads the
// RAM (word at rd_addr appears on rd_data one cycle later).
module averager #(
  parameter int PAR      = 8,
  parameter int M        = 1024,
  parameter int W_INC    = 32,
  parameter int DAVG_MAX = 1 << 25,
  localparam int KW      = $clog2(M),
  localparam int ACC_W   = W_INC + $clog2(DAVG_MAX) + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  // run control
  input  logic                    arm,
  input  logic [31:0]             depth,
  input  logic                    diff_mode,
  output logic                    busy,
  output logic                    done,
  output logic [31:0]             shots,
  // spectrum input
  input  logic                    in_valid,
  input  logic                    in_start,
  input  logic [KW-1:0]           in_k,
  input  logic [W_INC-1:0]        in_pwr [PAR],
  // result readout
  input  logic [KW-1:0]           rd_addr,
  output logic signed [ACC_W-1:0] rd_data [PAR]
);
  typedef logic signed [ACC_W-1:0] word_t [PAR];

  // one RAM word = PAR packed sums, bin q in bits q*ACC_W +: ACC_W
  logic [PAR*ACC_W-1:0] ram [M];

  // shot bookkeeping
  logic          in_shot;          // current frame is being accumulated
  logic [KW-1:0] word_cnt;
  logic          sub_now, first_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      shots    <= '0;
      in_shot  <= 1'b0;
      word_cnt <= '0;
    end else if (arm) begin
      busy     <= 1'b1;
      done     <= 1'b0;
      shots    <= '0;
      in_shot  <= 1'b0;
      word_cnt <= '0;
    end else if (busy && in_valid) begin
      if (in_start) begin
        in_shot  <= 1'b1;
        word_cnt <= KW'(1);
      end else if (in_shot) begin
        word_cnt <= word_cnt + 1'b1;
        if (word_cnt == KW'(M - 1)) begin
          in_shot <= 1'b0;
          shots   <= shots + 1;
          if (shots + 1 >= depth) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // a word takes part if it is the start of a shot or inside one
  logic acc_en;
  assign acc_en    = busy && in_valid && (in_start || in_shot);
  assign sub_now   = diff_mode && shots[0];
  assign first_now = (shots == 0);

  // stage 1: RAM read; inputs delayed to meet the read data
  logic [KW-1:0]    ra;
  logic [PAR*ACC_W-1:0] rdq;
  logic             en1, sub1, first1;
  logic [KW-1:0]    k1;
  logic [W_INC-1:0] p1 [PAR];

  assign ra = busy ? in_k : rd_addr;

  always_ff @(posedge clk) begin
    rdq <= ram[ra];
    if (rst) en1 <= 1'b0;
    else     en1 <= acc_en;
    sub1   <= sub_now;
    first1 <= first_now;
    k1     <= in_k;
    p1     <= in_pwr;
  end

  // stage 2: add and write back
  word_t sum;
  always_comb
    for (int q = 0; q < PAR; q++) begin
      logic signed [ACC_W-1:0] inc, base;
      inc    = sub1 ? -ACC_W'(p1[q]) : ACC_W'(p1[q]);
      base   = first1 ? '0 : signed'(rdq[q*ACC_W +: ACC_W]);
      sum[q] = base + inc;
    end

  logic [PAR*ACC_W-1:0] sum_packed;
  always_comb
    for (int q = 0; q < PAR; q++) sum_packed[q*ACC_W +: ACC_W] = sum[q];

  always_ff @(posedge clk)
    if (en1) ram[k1] <= sum_packed;

  always_comb
    for (int q = 0; q < PAR; q++) rd_data[q] = signed'(rdq[q*ACC_W +: ACC_W]);

  // consecutive words of one shot must use distinct addresses
  property p_no_rmw_hazard;
    @(posedge clk) disable iff (rst) (en1 && acc_en) |-> (in_k != k1);
  endproperty
  assert property (p_no_rmw_hazard) else $error("averager: address reused back to back");
endmodule
