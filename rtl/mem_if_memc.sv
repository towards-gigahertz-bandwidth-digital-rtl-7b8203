// mem_if_memc: sequencer that reads or writes a run of consecutive 64-bit
// words in DDR3 memory through the user interface of a DDR3 controller.
//
// The memory is only efficient in bursts of 8 consecutive words, so every
// access is a full burst: a write gathers 8 words, hands them to the
// controller as two 256-bit beats (4 words each, the controller's half-rate
// width) and issues one write command; a read issues one read command,
// collects the two returned beats and passes the 8 words on one at a time.
// A run of `length` words starting at `start_addr` is therefore rounded out
// to whole bursts (start_addr low 3 bits are ignored, length is rounded up
// to a multiple of 8); partial bursts would need the controller's write mask.
//
// Write data comes from the write FIFO (pattern PAT_USER), or is generated:
// all zeros (PAT_ZERO) or each word equal to its own address (PAT_ADDRESS).
// Read words leave on rd_valid/rd_ready towards the clock-crossing stage.
//
// Control: `go` (one clock) starts a run with cmd/start_addr/length/pattern,
// honoured only in the wait state; `idle` is high in the wait state.
// Controller handshake: a command is accepted when app_en && app_rdy, a data
// beat when app_wdf_wren && app_wdf_rdy; read beats arrive with
// app_rd_data_valid in issue order.
module mem_if_memc
  import fmc110_pkg::*;
#(
  parameter int ADDR_W = 28
) (
  input  logic              clk,
  input  logic              rst,
  // command
  input  logic              go,
  input  mem_cmd_e          cmd,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [31:0]       length,
  input  mem_pat_e          pattern,
  output logic              idle,
  output logic [31:0]       words_done,
  // write FIFO (first-word fall-through)
  input  logic [63:0]       fifo_data,
  input  logic              fifo_empty,
  output logic              fifo_rd,
  // read words out
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [63:0]       rd_data,
  // DDR3 controller user interface
  output logic [ADDR_W-1:0] app_addr,
  output logic [2:0]        app_cmd,
  output logic              app_en,
  input  logic              app_rdy,
  output logic [255:0]      app_wdf_data,
  output logic              app_wdf_wren,
  output logic              app_wdf_end,
  input  logic              app_wdf_rdy,
  input  logic [255:0]      app_rd_data,
  input  logic              app_rd_data_valid
);
  typedef enum logic [2:0] {S_WAIT, S_FILL, S_WBEAT, S_WCMD, S_RCMD, S_RDATA, S_XFER} state_e;

  state_e            st;
  mem_pat_e          pat_q;
  logic [ADDR_W-1:0] addr_q;       // address of the current burst
  logic [28:0]       bursts_left;
  logic [63:0]       buf_q [8];
  logic [2:0]        idx;
  logic              beat;         // which 256-bit beat

  logic [63:0] gen_word;
  always_comb
    unique case (pat_q)
      PAT_ZERO:    gen_word = '0;
      PAT_ADDRESS: gen_word = 64'(addr_q) + 64'(idx);
      default:     gen_word = fifo_data;
    endcase

  assign fifo_rd = (st == S_FILL) && (pat_q == PAT_USER) && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_WAIT;
      pat_q       <= PAT_USER;
      addr_q      <= '0;
      bursts_left <= '0;
      idx         <= '0;
      beat        <= 1'b0;
      words_done  <= '0;
    end else begin
      unique case (st)
        S_WAIT: if (go && cmd != MEM_NOP) begin
          pat_q       <= pattern;
          addr_q      <= {start_addr[ADDR_W-1:3], 3'b000};
          bursts_left <= 29'((length + 32'd7) >> 3);
          idx         <= '0;
          beat        <= 1'b0;
          words_done  <= '0;
          if (length == 0)           st <= S_WAIT;
          else if (cmd == MEM_WRITE) st <= S_FILL;
          else                       st <= S_RCMD;
        end
        S_FILL: if (pat_q != PAT_USER || !fifo_empty) begin
          buf_q[idx] <= gen_word;
          idx        <= idx + 1'b1;
          if (idx == 3'd7) begin
            st   <= S_WBEAT;
            beat <= 1'b0;
          end
        end
        S_WBEAT: if (app_wdf_rdy) begin
          beat <= 1'b1;
          if (beat) st <= S_WCMD;
        end
        S_WCMD: if (app_rdy) begin
          words_done  <= words_done + 8;
          addr_q      <= addr_q + ADDR_W'(8);
          bursts_left <= bursts_left - 1'b1;
          st          <= (bursts_left == 1) ? S_WAIT : S_FILL;
        end
        S_RCMD: if (app_rdy) begin
          st   <= S_RDATA;
          beat <= 1'b0;
        end
        S_RDATA: if (app_rd_data_valid) begin
          for (int w = 0; w < 4; w++) buf_q[{beat, 2'(w)}] <= app_rd_data[64*w +: 64];
          beat <= 1'b1;
          if (beat) begin
            st  <= S_XFER;
            idx <= '0;
          end
        end
        default: if (rd_ready) begin  // S_XFER
          idx        <= idx + 1'b1;
          words_done <= words_done + 1;
          if (idx == 3'd7) begin
            addr_q      <= addr_q + ADDR_W'(8);
            bursts_left <= bursts_left - 1'b1;
            st          <= (bursts_left == 1) ? S_WAIT : S_RCMD;
          end
        end
      endcase
    end
  end

  assign idle     = (st == S_WAIT);
  assign rd_valid = (st == S_XFER);
  assign rd_data  = buf_q[idx];

  assign app_addr     = addr_q;
  assign app_cmd      = (st == S_RCMD) ? 3'd1 : 3'd0;
  assign app_en       = (st == S_WCMD) || (st == S_RCMD);
  assign app_wdf_wren = (st == S_WBEAT);
  assign app_wdf_end  = (st == S_WBEAT) && beat;
  always_comb
    for (int w = 0; w < 4; w++) app_wdf_data[64*w +: 64] = buf_q[{beat, 2'(w)}];
endmodule
