// ecl_ram_256x4: one 256 x 4 ECL static RAM (the HM10422 used on the original boards).
//
// The real part is asynchronous with a 4 ns access time. Here a write takes
// place on the clock edge at which `we` is high, which stands for the
// original way of running the part: the write enable follows the R/W
// line and data and address arrive in the same phase. Reading is
// combinational from the address, like the real part's access path.
// The depth and width are the original part's; the clocked write is this design's
// model of the timing.
module ecl_ram_256x4 #(
  parameter int unsigned ADDR_BITS = 8,
  parameter int unsigned WIDTH     = 4
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [WIDTH-1:0]     din,
  output logic [WIDTH-1:0]     dout
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
