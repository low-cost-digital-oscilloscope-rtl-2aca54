// ps2_tx: host-to-device transmitter for a PS/2 port.
//
// The lines are open-collector: the host can only pull them low, so the
// outputs are "drive low" enables (clk_low, data_low) for external
// open-drain buffers. To send a byte the host
//   1. pulls the clock low for INHIBIT_CYCLES board cycles (>= 100 us),
//   2. pulls data low (start bit) and releases the clock,
//   3. on each falling edge generated by the device puts out the next bit:
//      eight data bits LSB first, then odd parity, then releases data
//      (stop bit),
//   4. on the next falling edge reads the device's acknowledge (data low).
// done pulses when the acknowledge has been read, with ack_err set if the
// device did not pull data low. The falling-edge strobe and synchronised
// data come from ps2_rx. This is the standard PS/2 host-to-device
// sequence; the source does not describe the mouse protocol.
module ps2_tx #(
  parameter int unsigned INHIBIT_CYCLES = 10000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] byte_in,
  input  logic       fall,
  input  logic       data_s,
  output logic       busy,
  output logic       clk_low,
  output logic       data_low,
  output logic       done,
  output logic       ack_err
);
  typedef enum logic [1:0] {T_IDLE, T_INHIBIT, T_SEND, T_ACK} tstate_e;
  tstate_e state;

  logic [$clog2(INHIBIT_CYCLES+1)-1:0] cnt;
  logic [8:0] shreg;       // parity, d7..d0
  logic [3:0] bit_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= T_IDLE;
      cnt      <= '0;
      shreg    <= '0;
      bit_cnt  <= '0;
      clk_low  <= 1'b0;
      data_low <= 1'b0;
      done     <= 1'b0;
      ack_err  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: begin
          if (start) begin
            shreg   <= {~^byte_in, byte_in};
            cnt     <= '0;
            clk_low <= 1'b1;
            state   <= T_INHIBIT;
          end
        end
        T_INHIBIT: begin
          if (32'(cnt) >= INHIBIT_CYCLES - 1) begin
            data_low <= 1'b1;     // start bit
            clk_low  <= 1'b0;
            bit_cnt  <= '0;
            state    <= T_SEND;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        T_SEND: begin
          if (fall) begin
            if (bit_cnt == 4'd9) begin
              data_low <= 1'b0;   // stop bit: release
              state    <= T_ACK;
            end else begin
              data_low <= !shreg[0];
              shreg    <= {1'b0, shreg[8:1]};
              bit_cnt  <= bit_cnt + 1'b1;
            end
          end
        end
        T_ACK: begin
          if (fall) begin
            ack_err <= data_s;
            done    <= 1'b1;
            state   <= T_IDLE;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy = (state != T_IDLE);

endmodule
