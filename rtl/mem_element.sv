// mem_element: the basic memory element of the array, a dual-port
// 512-bit RAM organised as 64 words of 8 bits.
//
// Port W is the configuration port: a word is written on the rising clock
// edge when wr_en is high. Port R is the operation port: the read is
// asynchronous (rd_data follows rd_addr in the same cycle), so that a
// lookup-table access sits in the same cycle as the shift register that
// addresses it and the accumulator that consumes it.
//
// The element can be switched on and off on its own (input on). When off it
// ignores writes and its read port outputs zero, so an unused element does
// not toggle the read lanes behind it.
//
// The size (64 x 8), the two ports and their roles (write during
// configuration, read during operation) and the power switch follow the
// architecture. The asynchronous read and the zero output when off are
// choices of this implementation. The contents are not reset.
module mem_element #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             on,
  // configuration (write) port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // operation (read) port
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (on && wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = on ? mem[rd_addr] : '0;

endmodule
