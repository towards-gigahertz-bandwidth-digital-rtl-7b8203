// wrapper_virtex6: FPGA top level of a 1 GSPS, 500 MHz-bandwidth spectrum
// analyser for a dual-ADC mezzanine card.
//
// Data path: two ADC receivers (ads5400_phy_sp) turn 13 serial bit lines
// per ADC into 8 samples per 125 MHz clock; the correlator application
// captures N samples after every trigger (trigger_ctrl), down-converts them
// by fs/4, transforms them with an 8-lane parallel FFT, squares and averages
// the spectra; the averaged spectrum streams into the memory interface
// (sip_mem_if), which stores it in external DDR3 memory and reads it back to
// the host link.
//
// Clock domains:
//   clk_fast  1 GHz sample clock of the bit lines (deserializers only)
//   clk_app   125 MHz = clk_fast / 8, edges aligned with clk_fast: receivers,
//             trigger, correlator, FIFO write side
//   clk_mem   200 MHz DDR3 controller user clock
//   clk_host  125 MHz host link clock (independent of clk_app)
// Each domain has its own synchronous, active-high reset.
//
// Parts outside this RTL are reached through ports: the programmable input
// delays of the bit lines (adcN_tap out, delayed lines back in adcN_line),
// the DDR3 controller (app_* user interface) and the host link (register
// buses and the read-out stream). Application registers are reached through
// app_reg_req in the clk_app domain, with app_reg_sel choosing the module
// (0 ADC0 receiver, 1 ADC1 receiver, 2 trigger, 3 correlator); the memory
// interface registers through host_reg_req in the clk_host domain. This
// split of the register space is this design's own.
module wrapper_virtex6
  import fmc110_pkg::*;
#(
  parameter int N            = 8192,
  parameter int CHECK_CYCLES = 1 << 27,
  parameter int DAVG_MAX     = 1 << 25,
  parameter int FIFO_DEPTH   = 512
) (
  input  logic                       clk_fast,
  input  logic                       clk_app,
  input  logic                       rst_app,
  input  logic                       clk_mem,
  input  logic                       rst_mem,
  input  logic                       clk_host,
  input  logic                       rst_host,
  // ADC bit lines (after the input delays) and delay taps
  input  logic [ADC_LINES-1:0]       adc0_line,
  input  logic [ADC_LINES-1:0]       adc1_line,
  output logic [4:0]                 adc0_tap [ADC_LINES],
  output logic [4:0]                 adc1_tap [ADC_LINES],
  input  logic                       ext_trig,
  // application registers (clk_app)
  input  reg_req_t                   app_reg_req,
  input  logic [1:0]                 app_reg_sel,
  output reg_rsp_t                   app_reg_rsp,
  // memory interface registers and read-out stream (clk_host)
  input  reg_req_t                   host_reg_req,
  output reg_rsp_t                   host_reg_rsp,
  output logic                       host_rd_valid,
  input  logic                       host_rd_ready,
  output logic [63:0]                host_rd_data,
  // DDR3 controller user interface (clk_mem)
  output logic [27:0]                app_addr,
  output logic [2:0]                 app_cmd,
  output logic                       app_en,
  input  logic                       app_rdy,
  output logic [255:0]               app_wdf_data,
  output logic                       app_wdf_wren,
  output logic                       app_wdf_end,
  input  logic                       app_wdf_rdy,
  input  logic [255:0]               app_rd_data,
  input  logic                       app_rd_data_valid
);
  // register bus fan-out
  reg_req_t req_phy0, req_phy1, req_trig, req_corr;
  reg_rsp_t rsp_phy0, rsp_phy1, rsp_trig, rsp_corr;

  always_comb begin
    req_phy0 = app_reg_req;
    req_phy1 = app_reg_req;
    req_trig = app_reg_req;
    req_corr = app_reg_req;
    req_phy0.wr = app_reg_req.wr && app_reg_sel == 2'd0;
    req_phy0.rd = app_reg_req.rd && app_reg_sel == 2'd0;
    req_phy1.wr = app_reg_req.wr && app_reg_sel == 2'd1;
    req_phy1.rd = app_reg_req.rd && app_reg_sel == 2'd1;
    req_trig.wr = app_reg_req.wr && app_reg_sel == 2'd2;
    req_trig.rd = app_reg_req.rd && app_reg_sel == 2'd2;
    req_corr.wr = app_reg_req.wr && app_reg_sel == 2'd3;
    req_corr.rd = app_reg_req.rd && app_reg_sel == 2'd3;
  end

  always_comb begin
    app_reg_rsp = '0;
    if (rsp_phy0.rvalid) app_reg_rsp = rsp_phy0;
    if (rsp_phy1.rvalid) app_reg_rsp = rsp_phy1;
    if (rsp_trig.rvalid) app_reg_rsp = rsp_trig;
    if (rsp_corr.rvalid) app_reg_rsp = rsp_corr;
  end

  // ADC receivers
  logic                       adc0_dval, adc1_dval;
  logic signed [SAMPLE_W-1:0] adc0_data [PAR];
  logic signed [SAMPLE_W-1:0] adc1_data [PAR];
  logic [PAR-1:0]             adc0_ovr, adc1_ovr;
  logic [PAR-1:0]             adc0_word, adc1_word;

  ads5400_phy_sp #(.LINES(ADC_LINES), .RATIO(PAR), .CHECK_CYCLES(CHECK_CYCLES)) u_phy0 (
    .clk_fast, .clk(clk_app), .rst(rst_app),
    .line_in(adc0_line), .tap(adc0_tap),
    .reg_req(req_phy0), .reg_rsp(rsp_phy0),
    .dval(adc0_dval), .data(adc0_data), .ovr(adc0_ovr), .master_word(adc0_word)
  );

  ads5400_phy_sp #(.LINES(ADC_LINES), .RATIO(PAR), .CHECK_CYCLES(CHECK_CYCLES)) u_phy1 (
    .clk_fast, .clk(clk_app), .rst(rst_app),
    .line_in(adc1_line), .tap(adc1_tap),
    .reg_req(req_phy1), .reg_rsp(rsp_phy1),
    .dval(adc1_dval), .data(adc1_data), .ovr(adc1_ovr), .master_word(adc1_word)
  );

  // trigger
  logic trigger;
  trigger_ctrl u_trig (
    .clk(clk_app), .rst(rst_app),
    .reg_req(req_trig), .reg_rsp(rsp_trig),
    .ext_trig, .pattern_word(adc0_word), .trigger
  );

  // correlator application
  logic        mem_stop, corr_dval;
  logic [63:0] corr_data;

  correlator_app #(.N(N), .DAVG_MAX(DAVG_MAX)) u_corr (
    .clk(clk_app), .rst(rst_app),
    .reg_req(req_corr), .reg_rsp(rsp_corr),
    .trigger_in(trigger),
    .adc0_dval, .adc0_data, .adc1_dval, .adc1_data,
    .mem_write_stop(mem_stop),
    .mem_dval(corr_dval), .mem_data(corr_data)
  );

  // memory interface
  sip_mem_if #(.ADDR_W(28), .FIFO_DEPTH(FIFO_DEPTH)) u_mem (
    .app_clk(clk_app), .app_rst(rst_app),
    .app_dval(corr_dval), .app_data(corr_data), .app_stop(mem_stop),
    .host_clk(clk_host), .host_rst(rst_host),
    .reg_req(host_reg_req), .reg_rsp(host_reg_rsp),
    .host_rd_valid, .host_rd_ready, .host_rd_data,
    .mem_clk(clk_mem), .mem_rst(rst_mem),
    .app_addr, .app_cmd, .app_en, .app_rdy,
    .app_wdf_data, .app_wdf_wren, .app_wdf_end, .app_wdf_rdy,
    .app_rd_data, .app_rd_data_valid
  );
endmodule
