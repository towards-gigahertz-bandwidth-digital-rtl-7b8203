// tb_wrapper_virtex6: end-to-end run of the whole FPGA design at reduced
// sizes (N = 64-point spectra, 64-clock PRBS checks, 32-word write FIFO).
//
// Two ADC line models (PRBS-7 test pattern, then sample ramps with steps 1
// and 7, per-line skews and data eyes) feed the receivers; a DDR3 controller
// model sits on the memory user interface. The test:
//   1. calibrates both receivers (eye search on every line, bit slips)
//   2. run A: ADC0, diff mode, 2 shots, one software and one external
//      rising-edge trigger, plus a software trigger during a capture that
//      must be skipped
//   3. streams the averaged spectrum through the write FIFO into DDR3
//      (write sequence, application data) and reads it back to the host
//      (read sequence) under host back-pressure
//   4. writes an address-pattern and a zero-pattern sequence
//   5. run B: ADC1, normal mode, 3 shots started by the pattern trigger
//      (a chosen word on ADC0's master line), read out the same way
// Every spectrum read back from memory is compared with a reference: the
// samples each shot captured (taken from the receivers' outputs and the
// trigger pulses), mixed by exp(-i pi n/2), transformed by a direct DFT,
// squared, scaled by 2^-16 and summed with the run's signs.
// Mechanisms counted (each must occur): line calibration, slave bit slip,
// master bit slip, software / external / pattern trigger, skipped trigger,
// diff mode, ADC select, stop back-pressure on the readout, host
// back-pressure, each write pattern, read sequence.
module tb_wrapper_virtex6;
  import fmc110_pkg::*;
  localparam int N = 64, M = N / 8, CHECK = 64, DAVG = 16, FDEPTH = 32;
  localparam int TAP_WRAP = 26, EYE_W = 10, SH = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk_fast = 0, clk_app = 0, clk_mem = 0, clk_host = 0;
  logic rst_app = 1, rst_mem = 1, rst_host = 1;
  logic [ADC_LINES-1:0] adc0_line, adc1_line;
  logic [4:0] adc0_tap [ADC_LINES], adc1_tap [ADC_LINES];
  logic ext_trig = 0;
  reg_req_t app_reg_req = '0, host_reg_req = '0;
  logic [1:0] app_reg_sel = 0;
  reg_rsp_t app_reg_rsp, host_reg_rsp;
  logic host_rd_valid, host_rd_ready = 0;
  logic [63:0] host_rd_data;
  logic [27:0] app_addr; logic [2:0] app_cmd; logic app_en, app_rdy;
  logic [255:0] app_wdf_data; logic app_wdf_wren, app_wdf_end, app_wdf_rdy;
  logic [255:0] app_rd_data; logic app_rd_data_valid;
  int checks = 0, failures = 0;

  wrapper_virtex6 #(.N(N), .CHECK_CYCLES(CHECK), .DAVG_MAX(DAVG), .FIFO_DEPTH(FDEPTH)) dut (.*);

  logic prbs = 1;
  int skew0 [ADC_LINES], skew1 [ADC_LINES], eye0 [ADC_LINES], eye1 [ADC_LINES];
  int ramp0, ramp1;
  adc_lines_model #(.TAP_WRAP(TAP_WRAP), .EYE_W(EYE_W), .RAMP_STEP(1)) u_adc0 (
    .clk_fast, .prbs, .skew(skew0), .eye_lo(eye0), .tap(adc0_tap), .line(adc0_line), .ramp(ramp0));
  adc_lines_model #(.TAP_WRAP(TAP_WRAP), .EYE_W(EYE_W), .RAMP_STEP(7)) u_adc1 (
    .clk_fast, .prbs, .skew(skew1), .eye_lo(eye1), .tap(adc1_tap), .line(adc1_line), .ramp(ramp1));
  memc_ui_model #(.ADDR_W(28)) u_ddr (.clk(clk_mem), .*);

  always #500 clk_fast = ~clk_fast;
  always #4000 clk_app = ~clk_app;
  initial begin #700;  forever #2500 clk_mem  = ~clk_mem;  end
  initial begin #1300; forever #4150 clk_host = ~clk_host; end

  initial begin
    repeat (5_000_000) @(posedge clk_app);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int {
    MC_CALIB, MC_SLAVE_SLIP, MC_MASTER_SLIP, MC_TRIG_SW, MC_TRIG_EXT, MC_TRIG_PAT,
    MC_TRIG_SKIP, MC_DIFF, MC_ADC_SEL, MC_STOP, MC_HOST_BP, MC_PAT_USER,
    MC_PAT_ADDR, MC_PAT_ZERO, MC_READ_SEQ, MC_NUM
  } mech_e;
  int mech [MC_NUM];
  string mech_name [MC_NUM] = '{"line calibration", "slave bit slip", "master bit slip",
    "software trigger", "external trigger", "pattern trigger", "skipped trigger",
    "diff mode", "ADC select", "stop back-pressure", "host back-pressure",
    "write sequence (application data)", "write sequence (address pattern)",
    "write sequence (zero pattern)", "read sequence"};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // register access
  task automatic awr(input int sel, input int a, input logic [31:0] d);
    @(negedge clk_app);
    app_reg_sel = 2'(sel); app_reg_req.wr = 1; app_reg_req.addr = a[3:0]; app_reg_req.wdata = d;
    @(negedge clk_app); app_reg_req.wr = 0;
  endtask
  task automatic ard(input int sel, input int a, output logic [31:0] d);
    @(negedge clk_app);
    app_reg_sel = 2'(sel); app_reg_req.rd = 1; app_reg_req.addr = a[3:0];
    @(negedge clk_app); app_reg_req.rd = 0; d = app_reg_rsp.rdata;
  endtask
  task automatic hwr(input int a, input logic [31:0] d);
    @(negedge clk_host); host_reg_req.wr = 1; host_reg_req.addr = a[3:0]; host_reg_req.wdata = d;
    @(negedge clk_host); host_reg_req.wr = 0;
  endtask
  task automatic hrd(input int a, output logic [31:0] d);
    @(negedge clk_host); host_reg_req.rd = 1; host_reg_req.addr = a[3:0];
    @(negedge clk_host); host_reg_req.rd = 0; d = host_reg_rsp.rdata;
  endtask
  task automatic mem_wait();
    logic [31:0] s;
    repeat (8) @(negedge clk_host);
    do hrd(7, s); while (!s[0]);
  endtask
  task automatic mem_cmd(input mem_cmd_e c);
    hwr(0, 32'(MEM_NOP)); mem_wait(); hwr(0, 32'(c));
  endtask

  // history of the receivers' outputs and trigger pulses, per clk_app cycle
  int cyc = 0;
  int h0 [int][PAR], h1 [int][PAR];
  int trig_cycles [$];
  always @(negedge clk_app) begin
    for (int n = 0; n < PAR; n++) begin
      h0[cyc][n] = int'(dut.adc0_data[n]);
      h1[cyc][n] = int'(dut.adc1_data[n]);
    end
    if (dut.trigger) trig_cycles.push_back(cyc);
    cyc++;
  end
  always @(posedge clk_app) if (!rst_app && dut.mem_stop) mech[MC_STOP]++;
  always @(posedge clk_host) if (!rst_host && host_rd_valid && !host_rd_ready) mech[MC_HOST_BP]++;

  // host read-out collector
  logic [63:0] rx [$];
  always @(posedge clk_host) if (host_rd_valid && host_rd_ready) rx.push_back(host_rd_data);
  always @(negedge clk_host) host_rd_ready <= $urandom_range(3) != 0;

  // reference spectrum of a run: shots start at the given trigger cycles
  real ref_pwr [N], tol [N];
  task automatic reference(input int adc, input int c0 [$], input bit diff);
    for (int b = 0; b < N; b++) begin ref_pwr[b] = 0; tol[b] = 0; end
    foreach (c0[s]) begin
      real xr [N], xi [N];
      for (int n = 0; n < N; n++) begin
        int x;
        x = (adc == 0) ? h0[c0[s] + 1 + n / 8][n % 8] : h1[c0[s] + 1 + n / 8][n % 8];
        case (n % 4)
          0: begin xr[n] = x;  xi[n] = 0;  end
          1: begin xr[n] = 0;  xi[n] = -x; end
          2: begin xr[n] = -x; xi[n] = 0;  end
          default: begin xr[n] = 0; xi[n] = x; end
        endcase
      end
      for (int b = 0; b < N; b++) begin
        real er, ei, p;
        er = 0; ei = 0;
        for (int n = 0; n < N; n++) begin
          er += xr[n] * $cos(2*PI*b*n/N) + xi[n] * $sin(2*PI*b*n/N);
          ei += xi[n] * $cos(2*PI*b*n/N) - xr[n] * $sin(2*PI*b*n/N);
        end
        p = (er*er + ei*ei) / 65536.0;
        ref_pwr[b] += (diff && s % 2 == 1) ? -p : p;
        tol[b] += (40.0 * $sqrt(er*er + ei*ei) + 200.0) / 65536.0 + 2.0;
      end
    end
  endtask

  // stream the averaged spectrum into DDR3 at `addr`, read it back, compare
  task automatic store_and_check(input int addr, input string run);
    logic [31:0] d;
    // the readout starts first and fills the FIFO until `stop` holds it;
    // the write sequence then drains it into memory
    awr(3, 0, 32'h4 | (run == "B" ? 32'h2 : 32'h0));   // readout (enable off)
    repeat (60) @(negedge clk_app);
    hwr(1, addr); hwr(2, N); hwr(5, 32'(PAT_USER));
    mem_cmd(MEM_WRITE);
    mech[MC_PAT_USER]++;
    mem_wait();
    do ard(3, 2, d); while (d[2]);
    rx.delete();
    mem_cmd(MEM_READ);
    mech[MC_READ_SEQ]++;
    mem_wait();
    repeat (20) @(negedge clk_host);
    check(rx.size() == N, $sformatf("run %s: %0d words read back", run, rx.size()));
    for (int b = 0; b < N && b < rx.size(); b++) begin
      real g;
      g = real'($signed(rx[b]));
      check(g - ref_pwr[b] <= tol[b] && ref_pwr[b] - g <= tol[b],
            $sformatf("run %s bin %0d: %f, expected %f", run, b, g, ref_pwr[b]));
    end
  endtask

  initial begin
    logic [31:0] d;
    int shots_c [$];
    int t0;
    for (int l = 0; l < ADC_LINES; l++) begin
      skew0[l] = (l == 0) ? 1 : (l * 5) % 4;
      skew1[l] = (l * 3) % 4;
      eye0[l]  = (l * 7 + 18) % TAP_WRAP;
      eye1[l]  = (l * 11 + 5) % TAP_WRAP;
    end
    repeat (3) @(posedge clk_app);
    rst_app = 0; rst_mem = 0; rst_host = 0;
    repeat (4) @(posedge clk_app);

    // 1. calibration of both receivers
    awr(0, 0, 32'h4);
    awr(1, 0, 32'h4);
    for (int a = 0; a < 2; a++) begin
      do ard(a, 0, d); while (!d[5] && !d[6]);
      check(d[5] && !d[6], $sformatf("ADC%0d calibration", a));
      if (d[5]) mech[MC_CALIB]++;
      ard(a, 2, d);
      if (d[4:0] != 0) mech[MC_MASTER_SLIP]++;
    end
    for (int l = 1; l < ADC_LINES; l++) begin
      if (dut.u_phy0.slip[l] != 0) mech[MC_SLAVE_SLIP]++;
      if (dut.u_phy1.slip[l] != 0) mech[MC_SLAVE_SLIP]++;
    end
    prbs = 0;
    repeat (20) @(negedge clk_app);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk_app);
      for (int n = 1; n < PAR; n++) begin
        check(dut.adc0_data[n] == 12'(dut.adc0_data[n-1] + 1), "ADC0 ramp after calibration");
        check(dut.adc1_data[n] == 12'(dut.adc1_data[n-1] + 7), "ADC1 ramp after calibration");
      end
    end

    // 2. run A: ADC0, diff mode, 2 shots
    awr(3, 1, 32'h8000_0002);
    awr(3, 0, 32'h1);
    mech[MC_DIFF]++;
    awr(2, 1, 32'(TRIG_SOFTWARE));
    trig_cycles.delete();
    awr(2, 2, 1);                       // software trigger: shot 0
    mech[MC_TRIG_SW]++;
    awr(2, 2, 1);                       // during the capture: skipped
    repeat (M + 40) @(negedge clk_app);
    awr(2, 1, 32'(TRIG_RISING));
    #1234 ext_trig = 1;                 // shot 1
    repeat (10) @(negedge clk_app);
    #2000 ext_trig = 0;
    do ard(3, 2, d); while (!d[1]);
    ard(3, 4, d);
    check(d == 1, $sformatf("skipped triggers %0d", d));
    if (d >= 1) mech[MC_TRIG_SKIP]++;
    check(trig_cycles.size() == 3, $sformatf("run A trigger pulses %0d", trig_cycles.size()));
    if (trig_cycles.size() == 3) begin
      mech[MC_TRIG_EXT]++;
      shots_c = '{trig_cycles[0], trig_cycles[2]};
      reference(0, shots_c, 1);
    end
    store_and_check('h0, "A");

    // 4. generated patterns
    hwr(1, 'h400); hwr(2, 16); hwr(5, 32'(PAT_ADDRESS));
    mem_cmd(MEM_WRITE); mem_wait();
    mech[MC_PAT_ADDR]++;
    for (int a = 'h400; a < 'h410; a++) check(u_ddr.peek(longint'(a)) == 64'(a), "address pattern");
    hwr(1, 'h408); hwr(2, 8); hwr(5, 32'(PAT_ZERO));
    mem_cmd(MEM_WRITE); mem_wait();
    mech[MC_PAT_ZERO]++;
    check(u_ddr.peek('h408) == 0 && u_ddr.peek('h40F) == 0 && u_ddr.peek('h407) == 'h407, "zero pattern");

    // 5. run B: ADC1, 3 shots, pattern trigger on ADC0's master line word
    awr(3, 0, 32'h2);
    awr(3, 1, 32'd3);
    awr(3, 0, 32'h3);
    mech[MC_ADC_SEL]++;
    trig_cycles.delete();
    @(negedge clk_app);
    awr(2, 1, 32'(TRIG_PATTERN) | (32'(dut.adc0_word) << 8));
    do ard(3, 2, d); while (!d[1]);
    awr(2, 1, 32'(TRIG_SOFTWARE));
    begin
      // the pattern fires on every matching word; a shot takes the first
      // trigger after the previous capture plus its M/2-clock guard
      int last;
      shots_c.delete();
      last = -1000;
      foreach (trig_cycles[i])
        if (shots_c.size() < 3 && trig_cycles[i] > last + M + M / 2) begin
          shots_c.push_back(trig_cycles[i]);
          last = trig_cycles[i];
        end
      check(shots_c.size() == 3, "run B shots");
      if (shots_c.size() == 3) mech[MC_TRIG_PAT]++;
    end
    ard(3, 3, d);
    check(d == 3, $sformatf("run B shots register %0d", d));
    reference(1, shots_c, 0);
    store_and_check('h800, "B");
    check(u_ddr.bad_cmds == 0, "DDR3 user interface protocol");
    hrd(6, d);
    check(d == 0, $sformatf("FIFO overflows %0d with stop honoured", d));

    for (int i = 0; i < MC_NUM; i++) begin
      $display("mechanism %-36s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
