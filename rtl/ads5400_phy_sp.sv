// ads5400_phy_sp: receiver for one 12-bit, 1 GSPS ADC with over-range flag.
//
// Each of the 13 bit lines (12 data bits + OVR) passes through an external
// input delay (tap value driven from here), an adc_serdes that makes 8-bit
// words at 125 MHz, and a bitslip stage. Calibration uses the ADC's PRBS-7
// test pattern, present on every line:
//   * eye search: per line, a bit_align_machine with its own prbs_checker
//     steps the delay tap to the centre of the data eye;
//   * word alignment: line 0 is the master. Every slave compares its words
//     with the master's for CMP_WORDS words. Always equal: aligned. Never
//     equal: delay the slave one more sample (bit slip). Sometimes equal:
//     the eye search was not good enough, restart everything. A slave that
//     reaches MAX_SLIP makes the master slip by one sample instead, and all
//     slaves start over from zero slip.
// When every slave is aligned, the 13 lines are reassembled into 8 samples
// per clock (sample 0 earliest) and dval rises.
//
// Registers (reg_req/reg_rsp; read data one cycle after rd):
//   0 command/state  write: bit2 = 1 starts the calibration,
//                           bit0 = force dval (use the data uncalibrated)
//                    read:  bits 2:0 controller state, bit4 force,
//                           bit5 aligned, bit6 a line failed its eye search
//   1 errors         sum of the last PRBS check's errors over all lines
//   2 slips          bits 4:0 master slip, bits 23:8 restarts
//   3 taps           line selected by bits 3:0 of the last write to reg 3:
//                    bits 4:0 tap, 13:8 window, 20:16 first edge
// Start bit position (bit 2) follows the source; the other fields are this
// design's own.
module ads5400_phy_sp
  import fmc110_pkg::*;
#(
  parameter int LINES        = 13,
  parameter int RATIO        = 8,
  parameter int CHECK_CYCLES = 1 << 27,
  parameter int CMP_WORDS    = 32,
  parameter int MAX_SLIP     = 16,
  parameter int TAP_W        = 5,
  parameter int TAP_WRAP     = 26,
  localparam int SW          = $clog2(MAX_SLIP + 1)
) (
  input  logic                        clk_fast,
  input  logic                        clk,
  input  logic                        rst,
  input  logic [LINES-1:0]            line_in,        // delayed serial lines
  output logic [TAP_W-1:0]            tap [LINES],     // to the input delays
  input  reg_req_t                    reg_req,
  output reg_rsp_t                    reg_rsp,
  output logic                        dval,
  output logic signed [LINES-2:0]     data [RATIO],
  output logic [RATIO-1:0]            ovr,
  output logic [RATIO-1:0]            master_word      // for pattern triggers
);
  typedef enum logic [2:0] {C_IDLE, C_EYES, C_SETTLE, C_CMP, C_DECIDE, C_ALIGNED, C_FAIL} cstate_e;

  logic [RATIO-1:0] ser_word [LINES];
  logic [RATIO-1:0] word     [LINES];
  logic [SW-1:0]    slip     [LINES];

  logic             eye_start;
  logic [LINES-1:0] eye_busy, eye_done, eye_fail;
  logic [TAP_W-1:0] first_edge [LINES];
  logic [TAP_W:0]   window     [LINES];
  logic [31:0]      err_sum    [LINES];

  for (genvar l = 0; l < LINES; l++) begin : g_line
    logic chk_start, chk_done, chk_busy;
    logic [$clog2(RATIO+1)-1:0] word_errs;

    adc_serdes #(.RATIO(RATIO)) u_serdes (
      .clk_fast, .clk_div(clk), .din(line_in[l]), .word(ser_word[l])
    );

    bitslip #(.RATIO(RATIO), .MAX_SLIP(MAX_SLIP)) u_slip (
      .clk, .din(ser_word[l]), .slip(slip[l]), .dout(word[l])
    );

    prbs_checker #(.RATIO(RATIO), .CHECK_CYCLES(CHECK_CYCLES)) u_chk (
      .clk, .rst, .word(word[l]), .start(chk_start),
      .busy(chk_busy), .done(chk_done), .err_sum(err_sum[l]), .word_errs(word_errs)
    );

    bit_align_machine #(.TAP_W(TAP_W), .TAP_WRAP(TAP_WRAP)) u_bam (
      .clk, .rst, .start(eye_start), .tap(tap[l]),
      .chk_start(chk_start), .chk_done(chk_done), .chk_err(err_sum[l] != 0),
      .busy(eye_busy[l]), .done(eye_done[l]), .fail(eye_fail[l]),
      .first_edge(first_edge[l]), .window(window[l])
    );
  end

  // --------------------------------------------------- word alignment control
  cstate_e                    cst;
  logic                       force_q;
  logic [$clog2(CMP_WORDS+1)-1:0] cmp_cnt;
  logic [$clog2(CMP_WORDS+1)-1:0] match_cnt [LINES];
  logic [3:0]                 settle_cnt;
  logic [15:0]                restarts;
  logic                       cal_cmd;
  logic [3:0]                 tap_sel;

  assign cal_cmd = reg_req.wr && reg_req.addr == 4'd0 && reg_req.wdata[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      cst        <= C_IDLE;
      eye_start  <= 1'b0;
      force_q    <= 1'b0;
      restarts   <= '0;
      cmp_cnt    <= '0;
      settle_cnt <= '0;
      tap_sel    <= '0;
      for (int l = 0; l < LINES; l++) begin
        slip[l]      <= '0;
        match_cnt[l] <= '0;
      end
    end else begin
      eye_start <= 1'b0;
      if (reg_req.wr && reg_req.addr == 4'd0) force_q <= reg_req.wdata[0];
      if (reg_req.wr && reg_req.addr == 4'd3) tap_sel <= reg_req.wdata[3:0];
      if (cal_cmd) begin
        cst       <= C_EYES;
        eye_start <= 1'b1;
        restarts  <= '0;
        for (int l = 0; l < LINES; l++) slip[l] <= '0;
      end else begin
        unique case (cst)
          C_EYES:
            if (!eye_start && eye_busy == '0) begin
              if (eye_fail != '0) cst <= C_FAIL;
              else begin
                cst        <= C_SETTLE;
                settle_cnt <= '0;
              end
            end
          C_SETTLE: begin
            settle_cnt <= settle_cnt + 1'b1;
            if (settle_cnt == 4'd7) begin
              cst     <= C_CMP;
              cmp_cnt <= '0;
              for (int l = 0; l < LINES; l++) match_cnt[l] <= '0;
            end
          end
          C_CMP: begin
            for (int l = 1; l < LINES; l++)
              if (word[l] == word[0]) match_cnt[l] <= match_cnt[l] + 1'b1;
            cmp_cnt <= cmp_cnt + 1'b1;
            if (int'(cmp_cnt) == CMP_WORDS - 1) cst <= C_DECIDE;
          end
          C_DECIDE: begin
            logic partial, master_req, all_ok;
            partial    = 1'b0;
            master_req = 1'b0;
            all_ok     = 1'b1;
            for (int l = 1; l < LINES; l++) begin
              if (match_cnt[l] != 0 && int'(match_cnt[l]) != CMP_WORDS) partial = 1'b1;
              if (int'(match_cnt[l]) != CMP_WORDS) all_ok = 1'b0;
              if (match_cnt[l] == 0 && int'(slip[l]) == MAX_SLIP) master_req = 1'b1;
            end
            if (all_ok) begin
              cst <= C_ALIGNED;
            end else if (partial) begin
              cst       <= C_EYES;
              eye_start <= 1'b1;
              restarts  <= restarts + 1'b1;
              for (int l = 0; l < LINES; l++) slip[l] <= '0;
            end else if (master_req) begin
              if (int'(slip[0]) == MAX_SLIP) cst <= C_FAIL;
              else begin
                slip[0] <= slip[0] + 1'b1;
                for (int l = 1; l < LINES; l++) slip[l] <= '0;
                cst        <= C_SETTLE;
                settle_cnt <= '0;
              end
            end else begin
              for (int l = 1; l < LINES; l++)
                if (match_cnt[l] == 0) slip[l] <= slip[l] + 1'b1;
              cst        <= C_SETTLE;
              settle_cnt <= '0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ----------------------------------------------------------------- registers
  logic [31:0] err_total;
  always_comb begin
    err_total = '0;
    for (int l = 0; l < LINES; l++) err_total += err_sum[l];
  end

  always_ff @(posedge clk) begin
    if (rst) reg_rsp <= '0;
    else begin
      reg_rsp.rvalid <= reg_req.rd;
      unique case (reg_req.addr)
        4'd0: reg_rsp.rdata <= {25'd0, eye_fail != '0, cst == C_ALIGNED, force_q, 1'b0, cst};
        4'd1: reg_rsp.rdata <= err_total;
        4'd2: reg_rsp.rdata <= {8'd0, restarts, 3'd0, 5'(slip[0])};
        4'd3: reg_rsp.rdata <= (int'(tap_sel) < LINES)
                 ? {11'd0, 5'(first_edge[tap_sel]), 2'd0, 6'(window[tap_sel]), 3'd0, 5'(tap[tap_sel])}
                 : 32'd0;
        default: reg_rsp.rdata <= '0;
      endcase
    end
  end

  // ------------------------------------------------------------------- output
  always_comb begin
    for (int n = 0; n < RATIO; n++) begin
      for (int b = 0; b < LINES - 1; b++) data[n][b] = word[b][n];
      ovr[n] = word[LINES-1][n];
    end
  end
  assign dval        = force_q || (cst == C_ALIGNED);
  assign master_word = word[0];
endmodule
