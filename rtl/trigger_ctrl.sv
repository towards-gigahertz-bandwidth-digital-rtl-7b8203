// trigger_ctrl: selects and generates the measurement trigger.
//
// Sources: a software trigger written by the host, the rising, falling or
// both edges of the external trigger input, or the appearance of a chosen
// 8-bit word on an ADC line while the ADC sends its PRBS test pattern.
// The external input is asynchronous and passes a two-flop synchronizer
// before edge detection. The output is a one-clock pulse.
//
// Registers (reg_req/reg_rsp; read data one cycle after rd):
//   1 select   bits 2:0 source (trig_src_e), bits 15:8 pattern word
//   2 software writing bit0 = 1 fires a software trigger
//   3 count    number of triggers issued (read only)
// The source selection living at address 1 follows the source; the codes,
// the pattern field and registers 2 and 3 are this design's own.
//
// Timing: an external edge gives a pulse 3 clocks after it reaches the
// input (two synchronizer flops and the edge register); software and
// pattern triggers follow in the next clock.
module trigger_ctrl
  import fmc110_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  reg_req_t   reg_req,
  output reg_rsp_t   reg_rsp,
  input  logic       ext_trig,      // asynchronous external trigger
  input  logic [7:0] pattern_word,  // ADC line word, PRBS mode
  output logic       trigger
);
  trig_src_e   src_q;
  logic [7:0]  pat_q;
  logic [31:0] count_q;
  logic [2:0]  sync;
  logic        rise, fall, sw_trig, pat_hit;

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], ext_trig};
  end
  assign rise    = sync[1] && !sync[2];
  assign fall    = !sync[1] && sync[2];
  assign sw_trig    = reg_req.wr && reg_req.addr == 4'd2 && reg_req.wdata[0];
  assign pat_hit = pattern_word == pat_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      src_q   <= TRIG_SOFTWARE;
      pat_q   <= '0;
      count_q <= '0;
      trigger <= 1'b0;
      reg_rsp <= '0;
    end else begin
      if (reg_req.wr && reg_req.addr == 4'd1) begin
        src_q <= trig_src_e'(reg_req.wdata[2:0]);
        pat_q <= reg_req.wdata[15:8];
      end
      unique case (src_q)
        TRIG_SOFTWARE: trigger <= sw_trig;
        TRIG_RISING:   trigger <= rise;
        TRIG_FALLING:  trigger <= fall;
        TRIG_BOTH:     trigger <= rise || fall;
        TRIG_PATTERN:  trigger <= pat_hit;
        default:       trigger <= 1'b0;
      endcase
      if (trigger) count_q <= count_q + 1;
      reg_rsp.rvalid <= reg_req.rd;
      unique case (reg_req.addr)
        4'd1:    reg_rsp.rdata <= {16'd0, pat_q, 5'd0, src_q};
        4'd3:    reg_rsp.rdata <= count_q;
        default: reg_rsp.rdata <= '0;
      endcase
    end
  end
endmodule
