// bit_align_machine: finds the centre of the data eye of one ADC bit line by
// stepping its input delay and checking the PRBS test pattern.
//
// Procedure (one PRBS check per tap setting, a setting passes only with zero
// errors):
//   1. Check at tap 0.
//   2a. If it passes, the clock already sits inside an eye: decrease the tap
//       until a check fails. That failing tap is the first edge.
//   2b. If it fails, increase the tap until a check passes; the tap before
//       it is the first edge.
//   3. Increase the tap until a check fails again. The window size is the
//       number of tap steps from the first edge to this second edge.
//   4. Step back by half the window, which puts the clock edge in the middle
//       of the eye, and report done.
// The tap setting is periodic: stepping below 0 gives TAP_WRAP - 1, the tap
// count of one period of the 500 MHz bit clock (2 ns / 78 ps per tap,
// rounded). A search that needs more than TAP_WRAP steps ends in `fail`.
//
// Interface: `start` (re)starts the procedure at tap 0. The machine drives
// the checker through chk_start and reads chk_done / chk_err (error sum of
// the finished check is non-zero). After each tap change it waits SETTLE
// clocks so that the delayed data has reached the checker.
module bit_align_machine #(
  parameter int TAP_W    = 5,
  parameter int TAP_WRAP = 26,
  parameter int SETTLE   = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic [TAP_W-1:0] tap,
  output logic             chk_start,
  input  logic             chk_done,
  input  logic             chk_err,
  output logic             busy,
  output logic             done,
  output logic             fail,
  output logic [TAP_W-1:0] first_edge,
  output logic [TAP_W:0]   window
);
  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_CHECK, S_DONE, S_FAIL} state_e;
  typedef enum logic [1:0] {M_INIT, M_DOWN, M_UP, M_WIDTH} mode_e;

  state_e state;
  mode_e  mode;
  logic [$clog2(SETTLE+1)-1:0] wait_cnt;
  logic [TAP_W:0]              steps;

  function automatic logic [TAP_W-1:0] tap_inc(input logic [TAP_W-1:0] t);
    return (int'(t) == TAP_WRAP - 1) ? '0 : t + 1'b1;
  endfunction
  function automatic logic [TAP_W-1:0] tap_dec(input logic [TAP_W-1:0] t);
    return (t == '0) ? TAP_W'(TAP_WRAP - 1) : t - 1'b1;
  endfunction
  function automatic logic [TAP_W-1:0] tap_sub(input logic [TAP_W-1:0] t, input logic [TAP_W:0] h);
    return (int'(t) >= int'(h)) ? TAP_W'(int'(t) - int'(h)) : TAP_W'(int'(t) + TAP_WRAP - int'(h));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      mode       <= M_INIT;
      tap        <= '0;
      wait_cnt   <= '0;
      steps      <= '0;
      chk_start  <= 1'b0;
      first_edge <= '0;
      window     <= '0;
    end else begin
      chk_start <= 1'b0;
      if (start) begin
        state    <= S_SETTLE;
        mode     <= M_INIT;
        tap      <= '0;
        wait_cnt <= '0;
        steps    <= '0;
        window   <= '0;
      end else begin
        unique case (state)
          S_SETTLE: begin
            wait_cnt <= wait_cnt + 1'b1;
            if (int'(wait_cnt) == SETTLE - 1) begin
              chk_start <= 1'b1;
              state     <= S_CHECK;
            end
          end
          S_CHECK: if (chk_done) begin
            wait_cnt <= '0;
            state    <= S_SETTLE;
            steps    <= steps + 1'b1;
            unique case (mode)
              M_INIT:
                if (!chk_err) begin mode <= M_DOWN; tap <= tap_dec(tap); end
                else          begin mode <= M_UP;   tap <= tap_inc(tap); end
              M_DOWN:
                if (chk_err) begin
                  first_edge <= tap;
                  mode       <= M_WIDTH;
                  tap        <= tap_inc(tap);
                  window     <= 1;
                  steps      <= '0;
                end else begin
                  tap <= tap_dec(tap);
                end
              M_UP:
                if (!chk_err) begin
                  first_edge <= tap_dec(tap);
                  mode       <= M_WIDTH;
                  tap        <= tap_inc(tap);
                  window     <= 2;   // counted from the first edge
                  steps      <= '0;
                end else begin
                  tap <= tap_inc(tap);
                end
              default: // M_WIDTH
                if (chk_err) begin
                  tap   <= tap_sub(tap, window >> 1);
                  state <= S_DONE;
                end else begin
                  tap    <= tap_inc(tap);
                  window <= window + 1'b1;
                end
            endcase
            if (int'(steps) >= TAP_WRAP && !(mode == M_WIDTH && chk_err))
              state <= S_FAIL;
          end
          default: ;
        endcase
      end
    end
  end

  assign busy = (state == S_SETTLE) || (state == S_CHECK);
  assign done = (state == S_DONE);
  assign fail = (state == S_FAIL);
endmodule
