// mem_if_read_data_sync: moves words read from external memory out of the
// memory clock domain (200 MHz) into the host-link clock domain (125 MHz).
//
// Four-phase request/acknowledge handshake. The source side raises `req`
// with the word held stable; the destination side synchronizes req through
// two flops, captures the word, offers it on out_valid/out_data until the
// consumer takes it (out_ready), then raises `ack`. The source side sees ack
// through two flops, drops req, and the destination drops ack once it sees
// req low. Only then is the next word accepted. The destination state is
// readable by the host (state output, encoded as dst_state_e).
//
// Source side: in_valid/in_ready (in_ready high means the word on in_data is
// taken this clock). Throughput is one word per roughly 3 + 3 clocks of the
// slower side, enough for the host link.
module mem_if_read_data_sync #(
  parameter int DW = 64
) (
  input  logic          src_clk,
  input  logic          src_rst,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  input  logic          dst_clk,
  input  logic          dst_rst,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic [1:0]    state
);
  typedef enum logic [1:0] {D_IDLE, D_OFFER, D_ACK} dst_state_e;

  logic          ack;      // destination -> source
  // source side
  logic          req;
  logic [DW-1:0] hold;
  logic          ack_s1, ack_s2;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      req    <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
      if (in_ready) req <= 1'b1;
      else if (req && ack_s2) req <= 1'b0;
    end
    if (in_ready) hold <= in_data;
  end
  assign in_ready = in_valid && !req && !ack_s2;

  // destination side
  dst_state_e dst;
  logic       req_d1, req_d2;

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      dst       <= D_IDLE;
      ack       <= 1'b0;
      req_d1    <= 1'b0;
      req_d2    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      req_d1 <= req;
      req_d2 <= req_d1;
      unique case (dst)
        D_IDLE: if (req_d2) begin
          out_data  <= hold;
          out_valid <= 1'b1;
          dst       <= D_OFFER;
        end
        D_OFFER: if (out_ready) begin
          out_valid <= 1'b0;
          ack       <= 1'b1;
          dst       <= D_ACK;
        end
        default: if (!req_d2) begin
          ack <= 1'b0;
          dst <= D_IDLE;
        end
      endcase
    end
  end
  assign state = dst;
endmodule
