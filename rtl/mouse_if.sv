// mouse_if: PS/2 mouse interface.
//
// After reset a PS/2 mouse is in stream mode with data reporting off, so
// the interface first sends the "enable data reporting" command (0xF4)
// with ps2_tx and waits for the mouse's acknowledge byte (0xFA). From then
// on the mouse sends a 3-byte packet whenever it moves or a button
// changes:
//   byte 0: Yovf Xovf Ysign Xsign 1 Middle Right Left
//   byte 1: X movement (low 8 bits of a 9-bit two's complement value)
//   byte 2: Y movement (same, positive = away from the user)
// Bytes are collected by ps2_rx; a first byte without bit 3 set is taken as
// being out of step and dropped, which resynchronises the stream. When a
// packet is complete, pkt_valid pulses for one cycle with the decoded
// packet in pkt. Overflow bits are ignored. If the command is not
// acknowledged (a transmit error, or another byte arrives instead of
// 0xFA, e.g. the 0xAA 0x00 power-up message) the command is sent again.
// The PS/2 lines are open-collector: ps2_*_low are drive-low enables.
// The source says only that a mouse on the board's PS/2 connector controls
// the instrument; the protocol handling is the standard one.
module mouse_if
  import osc_pkg::*;
#(
  parameter int unsigned INHIBIT_CYCLES = 10000,  // 100 us at 100 MHz
  parameter int unsigned RX_TIMEOUT     = 20000   // 200 us at 100 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk_i,
  input  logic       ps2_data_i,
  output logic       ps2_clk_low,
  output logic       ps2_data_low,
  output logic       ready,          // reporting enabled, packets flow
  output mouse_pkt_t pkt,
  output logic       pkt_valid
);
  localparam logic [7:0] CMD_ENABLE = 8'hF4;
  localparam logic [7:0] RSP_ACK    = 8'hFA;

  typedef enum logic [1:0] {M_SEND, M_WAIT_TX, M_WAIT_ACK, M_STREAM} mstate_e;
  mstate_e state;

  logic       fall, data_s;
  logic [7:0] rx_byte;
  logic       rx_valid, rx_err;
  logic       tx_start, tx_busy, tx_done, tx_ack_err;

  ps2_rx #(.TIMEOUT(RX_TIMEOUT)) u_rx (
    .clk, .rst,
    .enable  (!tx_busy),
    .ps2_clk (ps2_clk_i),
    .ps2_data(ps2_data_i),
    .fall, .data_s,
    .data    (rx_byte),
    .valid   (rx_valid),
    .err     (rx_err)
  );

  ps2_tx #(.INHIBIT_CYCLES(INHIBIT_CYCLES)) u_tx (
    .clk, .rst,
    .start   (tx_start),
    .byte_in (CMD_ENABLE),
    .fall, .data_s,
    .busy    (tx_busy),
    .clk_low (ps2_clk_low),
    .data_low(ps2_data_low),
    .done    (tx_done),
    .ack_err (tx_ack_err)
  );

  logic [1:0] idx;
  logic [7:0] b0, b1;

  assign tx_start = (state == M_SEND);
  assign ready    = (state == M_STREAM);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= M_SEND;
      idx       <= '0;
      b0        <= '0;
      b1        <= '0;
      pkt       <= '0;
      pkt_valid <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      unique case (state)
        M_SEND:     state <= M_WAIT_TX;
        M_WAIT_TX:  if (tx_done) state <= tx_ack_err ? M_SEND : M_WAIT_ACK;
        M_WAIT_ACK: if (rx_valid) state <= (rx_byte == RSP_ACK) ? M_STREAM : M_SEND;
        M_STREAM: begin
          if (rx_err) begin
            idx <= '0;
          end else if (rx_valid) begin
            unique case (idx)
              2'd0: if (rx_byte[3]) begin b0 <= rx_byte; idx <= 2'd1; end
              2'd1: begin b1 <= rx_byte; idx <= 2'd2; end
              default: begin
                pkt.left   <= b0[0];
                pkt.right  <= b0[1];
                pkt.middle <= b0[2];
                pkt.dx     <= {b0[4], b1};
                pkt.dy     <= {b0[5], rx_byte};
                pkt_valid  <= 1'b1;
                idx        <= 2'd0;
              end
            endcase
          end
        end
        default: state <= M_SEND;
      endcase
    end
  end

endmodule
