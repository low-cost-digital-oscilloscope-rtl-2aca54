// sample_ram: dual-port sample memory, DEPTH words of WIDTH bits.
//
// Port A writes captured ADC samples, port B is read by the image
// generator at the same time, so the screen can be refreshed while a new
// record is written. Both ports run on the board clock; the read is
// synchronous with an enable (rd_data holds its value while rd_en is low)
// and has one cycle of latency. A read of the address being written in
// the same cycle returns the old word. Size follows the source: one 8-bit
// sample per horizontal pixel of a 640-pixel line, 640 bytes. The memory is
// written as an array so that the FPGA tools map it to block RAM.
module sample_ram #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // read port
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= (int'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end

endmodule
