// dp_ram: simple dual-port RAM with independent write and read clocks, the
// shape of an FPGA block RAM used as a buffer. Port A writes wdata at
// waddr on a rising edge of wclk when we is high. Port B returns the word
// at raddr one rclk cycle after re is high (registered read). There is no
// reset: the buffers that use it never read a location before writing it.
// The original design uses FPGA block RAMs for all its buffers; this is the
// generic form of one.
module dp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
