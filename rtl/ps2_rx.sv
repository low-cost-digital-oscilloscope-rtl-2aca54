// ps2_rx: receiver for PS/2 device-to-host frames.
//
// The device drives both lines. A frame is 11 bits, each read on a falling
// edge of ps2_clk: a start bit (0), eight data bits LSB first, an odd
// parity bit and a stop bit (1). Both lines are brought into the board
// clock domain with two flip-flops and the falling edge is detected there.
// When the stop bit arrives, valid pulses for one cycle with the byte in
// data; a frame with a bad start, parity or stop bit pulses err instead.
// If the clock line stays quiet for TIMEOUT board cycles in the middle of
// a frame, the partial frame is dropped. enable low (while the host is
// transmitting) holds the receiver idle. The frame format is the standard
// PS/2 protocol; the source only names the PS/2 mouse connector.
module ps2_rx #(
  parameter int unsigned TIMEOUT = 20000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       fall,       // synchronised falling edge of ps2_clk
  output logic       data_s,     // synchronised ps2_data
  output logic [7:0] data,
  output logic       valid,
  output logic       err
);
  logic [2:0] clk_sync;
  logic [1:0] dat_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= '1;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_data};
    end
  end

  assign fall   = clk_sync[2] && !clk_sync[1];
  assign data_s = dat_sync[1];

  logic [3:0]  bit_cnt;
  logic [9:0]  shreg;            // bits received after the start bit
  logic [$clog2(TIMEOUT+1)-1:0] idle;

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt <= '0;
      shreg   <= '0;
      idle    <= '0;
      data    <= '0;
      valid   <= 1'b0;
      err     <= 1'b0;
    end else begin
      valid <= 1'b0;
      err   <= 1'b0;
      if (!enable) begin
        bit_cnt <= '0;
        idle    <= '0;
      end else if (fall) begin
        idle <= '0;
        if (bit_cnt == 4'd0) begin
          // start bit: must be 0, otherwise ignore the edge
          if (!data_s) bit_cnt <= 4'd1;
        end else if (bit_cnt == 4'd10) begin
          bit_cnt <= '0;
          // shreg[8:0] = parity, d7..d0 ; data_s = stop bit
          if (data_s && (^shreg[9:1] == 1'b1)) begin
            data  <= shreg[8:1];
            valid <= 1'b1;
          end else begin
            err <= 1'b1;
          end
        end else begin
          shreg   <= {data_s, shreg[9:1]};
          bit_cnt <= bit_cnt + 1'b1;
        end
      end else if (bit_cnt != '0) begin
        if (32'(idle) >= TIMEOUT) begin
          bit_cnt <= '0;
          idle    <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
