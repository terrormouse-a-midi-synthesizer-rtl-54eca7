// delayline: single-port RAM that holds one waveguide's delay line.
//
// 256 words of 16 bits, the size of one FPGA block RAM. The port is
// synchronous: when en is high on a rising clock edge the word at addr is
// copied to the data_out register and, if we is high, overwritten with
// data_in. A read therefore takes one clock, and a write returns the word as
// it was before the write (read-first). With en low data_out holds. The size and the port list follow the original design; the
// read-first behaviour is this implementation's choice.
module delayline #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,        // port enable
  input  logic             we,        // write enable
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= data_in;
      data_out <= mem[addr];
    end
  end

endmodule
