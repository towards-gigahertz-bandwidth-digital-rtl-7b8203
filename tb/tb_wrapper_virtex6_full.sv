// tb_wrapper_virtex6_full: the top level at its default sizes (8192-point
// spectra, 2^25 maximum averages, 2^27-clock PRBS checks, 512-word write
// FIFO), through one complete measurement.
//
// A full calibration would take 2^27 clocks per PRBS check and cannot be
// simulated, so the line models here present aligned lines (no skew, every
// data eye around tap 0) and the receivers' force-valid bit is set instead.
// The measurement: diff mode, 2 shots, software triggers 2000 clocks apart
// (16 us at 125 MHz, the trigger period of the intended experiment), then
// the 8192-bin spectrum is streamed into DDR3 (model) and read back to the
// host. Checks: every bin against a direct-DFT reference computed from the
// captured samples; the capture takes exactly N/8 = 1024 clocks (real-time
// at 1 GS/s); the run is done within 3 * 1024 clocks of the last trigger;
// the readout delivers 8192 words.
module tb_wrapper_virtex6_full;
  import fmc110_pkg::*;
  localparam int N = 8192, M = N / 8;
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

  wrapper_virtex6 dut (.*);

  logic prbs = 0;
  int skew [ADC_LINES], eye [ADC_LINES];
  int ramp0, ramp1;
  adc_lines_model #(.RAMP_STEP(1)) u_adc0 (
    .clk_fast, .prbs, .skew, .eye_lo(eye), .tap(adc0_tap), .line(adc0_line), .ramp(ramp0));
  adc_lines_model #(.RAMP_STEP(5)) u_adc1 (
    .clk_fast, .prbs, .skew, .eye_lo(eye), .tap(adc1_tap), .line(adc1_line), .ramp(ramp1));
  memc_ui_model #(.ADDR_W(28)) u_ddr (.clk(clk_mem), .*);

  always #500 clk_fast = ~clk_fast;
  always #4000 clk_app = ~clk_app;
  initial begin #700;  forever #2500 clk_mem  = ~clk_mem;  end
  initial begin #1300; forever #4150 clk_host = ~clk_host; end

  initial begin
    repeat (250_000) @(posedge clk_app);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
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

  // receiver output history and trigger pulses per clk_app cycle
  int cyc = 0;
  int h0 [int][PAR];
  int trig_cycles [$];
  int cap_clocks = 0;
  always @(negedge clk_app) begin
    for (int n = 0; n < PAR; n++) h0[cyc][n] = int'(dut.adc0_data[n]);
    if (dut.trigger) trig_cycles.push_back(cyc);
    if (dut.u_corr.capturing) cap_clocks++;
    cyc++;
  end

  logic [63:0] rx [$];
  always @(posedge clk_host) if (host_rd_valid && host_rd_ready) rx.push_back(host_rd_data);
  always @(negedge clk_host) host_rd_ready <= $urandom_range(3) != 0;

  real ctab [N], stab [N], ref_pwr [N], tol [N];

  task automatic reference(input int c0 [$]);
    for (int i = 0; i < N; i++) begin
      ctab[i] = $cos(2*PI*i/N); stab[i] = $sin(2*PI*i/N);
      ref_pwr[i] = 0; tol[i] = 0;
    end
    foreach (c0[s]) begin
      real xr [N], xi [N];
      for (int n = 0; n < N; n++) begin
        int x;
        x = h0[c0[s] + 1 + n / 8][n % 8];
        case (n % 4)
          0: begin xr[n] = x;  xi[n] = 0;  end
          1: begin xr[n] = 0;  xi[n] = -x; end
          2: begin xr[n] = -x; xi[n] = 0;  end
          default: begin xr[n] = 0; xi[n] = x; end
        endcase
      end
      for (int b = 0; b < N; b++) begin
        real er, ei, p;
        int e;
        er = 0; ei = 0; e = 0;
        for (int n = 0; n < N; n++) begin
          er += xr[n] * ctab[e] + xi[n] * stab[e];
          ei += xi[n] * ctab[e] - xr[n] * stab[e];
          e = (e + b) % N;
        end
        p = er*er + ei*ei;
        ref_pwr[b] += (s % 2 == 1) ? -p / 65536.0 : p / 65536.0;
        tol[b] += (400.0 * $sqrt(p) + 2000.0) / 65536.0 + 2.0;
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    int shots [$];
    int t_last;
    for (int l = 0; l < ADC_LINES; l++) begin skew[l] = 0; eye[l] = 20; end
    repeat (3) @(posedge clk_app);
    rst_app = 0; rst_mem = 0; rst_host = 0;
    repeat (4) @(posedge clk_app);
    awr(0, 0, 32'h1);                         // force valid, ADC0
    awr(1, 0, 32'h1);                         // force valid, ADC1
    repeat (10) @(negedge clk_app);
    for (int n = 1; n < PAR; n++)
      check(dut.adc0_data[n] == 12'(dut.adc0_data[n-1] + 1), "ADC0 stream continuous");

    awr(3, 1, 32'h8000_0002);                 // diff mode, 2 shots
    awr(3, 0, 32'h1);
    awr(2, 1, 32'(TRIG_SOFTWARE));
    awr(2, 2, 1);
    repeat (2000 - 2) @(negedge clk_app);
    awr(2, 2, 1);
    t_last = cyc;
    do ard(3, 2, d); while (!d[1]);
    check(cyc - t_last < 3 * M, $sformatf("run done %0d clocks after the last trigger", cyc - t_last));
    check(trig_cycles.size() == 2, "two triggers");
    if (trig_cycles.size() == 2) check(trig_cycles[1] - trig_cycles[0] == 2000, "trigger period 2000 clocks");
    ard(3, 3, d); check(d == 2, $sformatf("shots %0d", d));
    check(cap_clocks == 2 * M, $sformatf("capture clocks %0d for 2 shots", cap_clocks));
    ard(3, 4, d); check(d == 0, "no skipped trigger at a 16 us period");
    shots = trig_cycles;
    reference(shots);

    // readout into DDR3, then back to the host
    hwr(1, 0); hwr(2, N); hwr(5, 32'(PAT_USER));
    mem_wait();
    hwr(0, 32'(MEM_WRITE));
    awr(3, 0, 32'h4);
    mem_wait();
    do ard(3, 2, d); while (d[2]);
    hwr(0, 32'(MEM_READ));
    mem_wait();
    repeat (20) @(negedge clk_host);
    check(rx.size() == N, $sformatf("%0d words read back", rx.size()));
    for (int b = 0; b < N && b < rx.size(); b++) begin
      real g;
      g = real'($signed(rx[b]));
      check(g - ref_pwr[b] <= tol[b] && ref_pwr[b] - g <= tol[b],
            $sformatf("bin %0d: %f, expected %f", b, g, ref_pwr[b]));
    end
    hrd(6, d); check(d == 0, "no FIFO overflow");
    hrd(3, d); check(d == N, $sformatf("words-read register %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
