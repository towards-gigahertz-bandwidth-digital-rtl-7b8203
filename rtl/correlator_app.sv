// correlator_app: real-time averaged power spectrum of a 1 GSPS ADC stream.
//
// After each trigger the next N samples (N/8 words of 8 parallel samples)
// of the selected ADC are captured and pass through four stages:
//   1. ddc_fs4      complex down conversion by fs/4 (I/Q per sample)
//   2. parallel FFT 8 fft_lane blocks, one per parallel sample position,
//                   each an (N/8)-point transform, then fft_combine, which
//                   rebuilds the N-point transform 8 coefficients per clock
//   3. power_calc   |X|^2 of every coefficient
//   4. averager     sum over `depth` shots in block RAM, optionally with
//                   alternating sign (diff mode, background subtraction)
// The inverse transform to the autocorrelation is left to the host.
// When the run is over the host starts a readout, which streams the N sums
// in bin order (bin b = X[b], b = 0..N-1, each sign-extended to 64 bits) to
// the memory interface, pausing while mem_write_stop is high.
//
// Registers (reg_req/reg_rsp, read data one cycle after rd):
//   0  control   bit0 enable: a 0->1 write arms a run of `depth` shots
//                bit1 adc_sel: 0 = ADC0, 1 = ADC1
//                bit2 readout: writing 1 starts the readout of the sums
//   1  average   bits 30:0 depth (shots per run), bit 31 diff mode
//   2  status    bit0 busy, bit1 done, bit2 readout active
//   3  shots     shots accumulated in the current run
//   4  trig_skip triggers ignored because a capture was still running or
//                had just ended (see below)
// The register map and the readout stream format are this design's own.
//
// The input words must arrive on consecutive clocks during a capture (the
// aligned ADC stream is continuous); a gap aborts nothing but is flagged by
// an assertion, as the streaming FFT needs contiguous frames.
// Trigger spacing: once a capture ends, triggers are ignored for M/2 more
// clocks. The first FFT stage keeps the second half of a frame in its
// feedback memory for M/2 clocks after the frame's last word, and a new
// frame starting earlier would overwrite it. A trigger is thus taken at
// most every 3M/2 clocks (12.3 us at N = 8192, 125 MHz). After `depth`
// captures in a run, further triggers are ignored and not counted.
module correlator_app
  import fmc110_pkg::*;
#(
  parameter int N        = 8192,
  parameter int FFT_W    = 28,
  parameter int TW_W     = 18,
  parameter int PWR_SHIFT = 16,
  parameter int W_INC    = 32,
  parameter int DAVG_MAX = 1 << 25
) (
  input  logic                        clk,
  input  logic                        rst,
  input  reg_req_t                    reg_req,
  output reg_rsp_t                    reg_rsp,
  input  logic                        trigger_in,
  input  logic                        adc0_dval,
  input  logic signed [SAMPLE_W-1:0]  adc0_data [PAR],
  input  logic                        adc1_dval,
  input  logic signed [SAMPLE_W-1:0]  adc1_data [PAR],
  input  logic                        mem_write_stop,
  output logic                        mem_dval,
  output logic [63:0]                 mem_data
);
  localparam int M     = N / PAR;
  localparam int KW    = $clog2(M);
  localparam int BW    = $clog2(N);
  localparam int ACC_W = W_INC + $clog2(DAVG_MAX) + 1;

  initial assert (PAR == 8) else $error("the parallel FFT is built for 8 lanes");

  // ---------------------------------------------------------------- registers
  logic        enable_q, adc_sel_q, diff_q;
  logic [30:0] depth_q;
  logic        arm, ro_start;
  logic        avg_busy, avg_done;
  logic [31:0] avg_shots;
  logic [31:0] trig_skip_q;
  logic        ro_active;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable_q  <= 1'b0;
      adc_sel_q <= 1'b0;
      diff_q    <= 1'b0;
      depth_q   <= 31'd1;
      reg_rsp   <= '0;
    end else begin
      if (reg_req.wr) begin
        unique case (reg_req.addr)
          4'd0: begin
            enable_q  <= reg_req.wdata[0];
            adc_sel_q <= reg_req.wdata[1];
          end
          4'd1: begin
            depth_q <= reg_req.wdata[30:0];
            diff_q  <= reg_req.wdata[31];
          end
          default: ;
        endcase
      end
      reg_rsp.rvalid <= reg_req.rd;
      unique case (reg_req.addr)
        4'd0:    reg_rsp.rdata <= {29'd0, 1'b0, adc_sel_q, enable_q};
        4'd1:    reg_rsp.rdata <= {diff_q, depth_q};
        4'd2:    reg_rsp.rdata <= {29'd0, ro_active, avg_done, avg_busy};
        4'd3:    reg_rsp.rdata <= avg_shots;
        4'd4:    reg_rsp.rdata <= trig_skip_q;
        default: reg_rsp.rdata <= '0;
      endcase
    end
  end

  assign arm      = reg_req.wr && reg_req.addr == 4'd0 && reg_req.wdata[0] && !enable_q;
  assign ro_start = reg_req.wr && reg_req.addr == 4'd0 && reg_req.wdata[2];

  // ------------------------------------------------------------------ capture
  logic                       src_dval;
  logic signed [SAMPLE_W-1:0] src_data [PAR];
  assign src_dval = adc_sel_q ? adc1_dval : adc0_dval;
  assign src_data = adc_sel_q ? adc1_data : adc0_data;

  logic          capturing;
  logic [KW-1:0] cap_cnt;
  logic [30:0]   cap_shots;   // captures started in this run
  logic [KW-1:0] guard;       // clocks left before the next capture may start
  logic          cap_valid, cap_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      capturing   <= 1'b0;
      cap_cnt     <= '0;
      cap_shots   <= '0;
      guard       <= '0;
      trig_skip_q <= '0;
    end else begin
      if (guard != '0) guard <= guard - 1'b1;
      if (arm) begin
        trig_skip_q <= '0;
        cap_shots   <= '0;
      end
      // the averager stays busy while the last frames pass the pipeline:
      // once `depth` captures have started, further triggers are ignored
      if (trigger_in && enable_q && avg_busy && cap_shots < depth_q) begin
        if (!capturing && guard == '0) begin
          capturing <= 1'b1;
          cap_cnt   <= '0;
          cap_shots <= cap_shots + 1'b1;
        end else begin
          trig_skip_q <= trig_skip_q + 1;
        end
      end
      if (capturing && src_dval) begin
        cap_cnt <= cap_cnt + 1'b1;
        if (cap_cnt == KW'(M - 1)) begin
          capturing <= 1'b0;
          guard     <= KW'(M / 2);
        end
      end
    end
  end

  assign cap_valid = capturing && src_dval;
  assign cap_start = cap_valid && cap_cnt == '0;

  property p_contiguous;
    @(posedge clk) disable iff (rst) (capturing && cap_cnt != '0) |-> src_dval;
  endproperty
  assert property (p_contiguous) else $error("correlator_app: gap in the ADC stream during a capture");

  // ---------------------------------------------------------------------- DDC
  logic                       ddc_valid, ddc_start;
  logic signed [SAMPLE_W:0]   ddc_i [PAR];
  logic signed [SAMPLE_W:0]   ddc_q [PAR];

  ddc_fs4 #(.PAR(PAR), .W(SAMPLE_W)) u_ddc (
    .clk, .rst,
    .in_valid (cap_valid),
    .din      (src_data),
    .out_valid(ddc_valid),
    .i_out    (ddc_i),
    .q_out    (ddc_q)
  );

  always_ff @(posedge clk)
    if (rst) ddc_start <= 1'b0;
    else     ddc_start <= cap_start;

  // ------------------------------------------------------------- lane FFTs
  logic                    lane_valid [PAR];
  logic                    lane_start [PAR];
  logic [KW-1:0]           lane_k     [PAR];
  logic signed [FFT_W-1:0] lane_re    [PAR];
  logic signed [FFT_W-1:0] lane_im    [PAR];

  for (genvar m = 0; m < PAR; m++) begin : g_lane
    fft_lane #(.W(FFT_W), .M(M), .TW_W(TW_W)) u_fft (
      .clk, .rst,
      .in_valid (ddc_valid),
      .in_start (ddc_start),
      .in_re    (FFT_W'(ddc_i[m])),
      .in_im    (FFT_W'(ddc_q[m])),
      .out_valid(lane_valid[m]),
      .out_start(lane_start[m]),
      .out_k    (lane_k[m]),
      .out_re   (lane_re[m]),
      .out_im   (lane_im[m])
    );
  end

  // -------------------------------------------------- combination to N points
  logic                    x_valid, x_start;
  logic [KW-1:0]           x_k;
  logic signed [FFT_W-1:0] x_re [PAR];
  logic signed [FFT_W-1:0] x_im [PAR];

  fft_combine #(.W(FFT_W), .M(M), .TW_W(TW_W)) u_comb (
    .clk, .rst,
    .in_valid (lane_valid[0]),
    .in_start (lane_start[0]),
    .in_k     (lane_k[0]),
    .in_re    (lane_re),
    .in_im    (lane_im),
    .out_valid(x_valid),
    .out_start(x_start),
    .out_k    (x_k),
    .out_re   (x_re),
    .out_im   (x_im)
  );

  // -------------------------------------------------------------------- power
  logic             p_valid, p_start;
  logic [KW-1:0]    p_k;
  logic [W_INC-1:0] p_pwr [PAR];

  power_calc #(.PAR(PAR), .W(FFT_W), .KW(KW), .SHIFT(PWR_SHIFT), .OUT_W(W_INC)) u_pwr (
    .clk, .rst,
    .in_valid (x_valid),
    .in_start (x_start),
    .in_k     (x_k),
    .in_re    (x_re),
    .in_im    (x_im),
    .out_valid(p_valid),
    .out_start(p_start),
    .out_k    (p_k),
    .out_pwr  (p_pwr)
  );

  // ---------------------------------------------------------------- averaging
  logic [KW-1:0]           ro_addr;
  logic signed [ACC_W-1:0] ro_word [PAR];

  averager #(.PAR(PAR), .M(M), .W_INC(W_INC), .DAVG_MAX(DAVG_MAX)) u_avg (
    .clk, .rst,
    .arm      (arm),
    .depth    ({1'b0, depth_q}),
    .diff_mode(diff_q),
    .busy     (avg_busy),
    .done     (avg_done),
    .shots    (avg_shots),
    .in_valid (p_valid),
    .in_start (p_start),
    .in_k     (p_k),
    .in_pwr   (p_pwr),
    .rd_addr  (ro_addr),
    .rd_data  (ro_word)
  );

  // ----------------------------------------------------------------- readout
  logic [BW-1:0]    ro_bin;
  logic             ro_rd;         // a read was issued last cycle
  logic [2:0]       ro_q;          // which bin of the word was requested

  assign ro_addr = KW'(ro_bin);    // bin b lives at address b mod M

  always_ff @(posedge clk) begin
    if (rst) begin
      ro_active <= 1'b0;
      ro_bin    <= '0;
      ro_rd     <= 1'b0;
      ro_q      <= '0;
      mem_dval  <= 1'b0;
      mem_data  <= '0;
    end else begin
      ro_rd    <= 1'b0;
      mem_dval <= ro_rd;
      if (ro_rd) mem_data <= 64'(ro_word[ro_q]);
      if (ro_start && !avg_busy && !ro_active) begin
        ro_active <= 1'b1;
        ro_bin    <= '0;
      end else if (ro_active && !mem_write_stop) begin
        ro_rd  <= 1'b1;
        ro_q   <= 3'(ro_bin >> KW);
        ro_bin <= ro_bin + 1'b1;
        if (ro_bin == BW'(N - 1)) ro_active <= 1'b0;
      end
    end
  end
endmodule
