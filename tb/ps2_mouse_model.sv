// ps2_mouse_model: behavioural model of a PS/2 mouse for testbenches.
//
// Both lines are open collector: the line levels are the AND of the host's
// and the device's release, so the model takes the host's drive-low
// enables and produces the line levels that the host reads back. The model
//   - watches for a host request (clock held low, then data low with the
//     clock released), clocks in the 8 data bits, parity and stop bit,
//     acknowledges, records the byte in last_cmd and answers with 0xFA
//     (0xFE if the parity was wrong);
//   - sends bytes and 3-byte movement packets on request (send_byte,
//     send_packet), one bit per HALF_NS*2 ns clock period.
// bad_parity_next makes the next byte sent carry a wrong parity bit.
module ps2_mouse_model #(
  parameter int HALF_NS = 200
) (
  input  logic host_clk_low,
  input  logic host_data_low,
  output logic ps2_clk,
  output logic ps2_data
);
  logic dev_clk_low = 0, dev_data_low = 0;
  logic [7:0] last_cmd = 0;
  int   cmds = 0;
  bit   busy = 0;
  bit   bad_parity_next = 0;

  assign ps2_clk  = !(host_clk_low  || dev_clk_low);
  assign ps2_data = !(host_data_low || dev_data_low);

  task automatic send_byte(input logic [7:0] b);
    logic [10:0] frame;
    wait (!busy && ps2_clk);
    busy = 1;
    frame = {1'b1, (~^b) ^ bad_parity_next, b, 1'b0};
    bad_parity_next = 0;
    for (int i = 0; i < 11; i++) begin
      dev_data_low = !frame[i];
      #(HALF_NS / 2);
      dev_clk_low = 1;
      #(HALF_NS);
      dev_clk_low = 0;
      #(HALF_NS / 2);
    end
    dev_data_low = 0;
    #(HALF_NS * 2);
    busy = 0;
  endtask

  task automatic send_packet(input bit l, input bit r, input bit m,
                             input logic signed [8:0] dx, input logic signed [8:0] dy);
    send_byte({2'b00, dy[8], dx[8], 1'b1, m, r, l});
    send_byte(dx[7:0]);
    send_byte(dy[7:0]);
  endtask

  // host-to-device request handling
  initial begin
    forever begin
      logic [9:0] bits;
      logic [7:0] rsp;
      @(negedge ps2_clk);
      if (!host_clk_low) continue;
      wait (!host_clk_low);
      if (ps2_data) continue;        // no start bit: just an inhibit
      busy = 1;
      #(HALF_NS);
      for (int i = 0; i < 10; i++) begin
        dev_clk_low = 1;
        #(HALF_NS);
        dev_clk_low = 0;             // host data is read on the rising edge
        bits[i] = ps2_data;
        #(HALF_NS);
      end
      // acknowledge
      dev_data_low = 1;
      dev_clk_low = 1;
      #(HALF_NS);
      dev_clk_low = 0;
      #(HALF_NS);
      dev_data_low = 0;
      last_cmd = bits[7:0];
      cmds++;
      rsp = (^bits[8:0] == 1'b1 && bits[9]) ? 8'hFA : 8'hFE;
      #(HALF_NS * 4);
      busy = 0;
      send_byte(rsp);
    end
  end
endmodule
