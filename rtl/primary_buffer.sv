// primary_buffer: the 8 KByte first-level buffer. A dual-port RAM takes
// bytes from the LVDS controller at the 60 MHz recovered clock and gives
// them to the buffer controller at the 120 MHz system clock. It also
// carries each side's pointer to the other side (Gray code, two
// flip-flops), so the buffer controller can see how many bytes wait and
// the LVDS controller can see when the buffer is full. Pointers have one
// bit more than the RAM address. Reads return data one clk cycle after
// rd_en. The size follows the design; the pointer crossing is this
// implementation's way of joining the two clock domains.
module primary_buffer
  import storage_pkg::*;
#(
  parameter int unsigned DEPTH = PRIMARY_BYTES,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PW   = AW + 1
) (
  // write side, recovered-clock domain
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [BYTE_W-1:0] wdata,
  input  logic [PW-1:0]     wr_ptr,
  output logic [PW-1:0]     rd_ptr_wsync,
  // read side, system-clock domain
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [PW-1:0]     rd_ptr,
  output logic [BYTE_W-1:0] rdata,
  output logic [PW-1:0]     wr_ptr_rsync
);

  dp_ram #(.DEPTH(DEPTH), .WIDTH(BYTE_W)) u_ram (
    .wclk (wclk),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .rclk (clk),
    .re   (rd_en),
    .raddr(rd_ptr[AW-1:0]),
    .rdata(rdata)
  );

  gray_ptr_sync #(.W(PW)) u_wr2rd (
    .src_clk(wclk), .src_rst_n(wrst_n), .src_bin(wr_ptr),
    .dst_clk(clk),  .dst_rst_n(rst_n),  .dst_bin(wr_ptr_rsync)
  );

  gray_ptr_sync #(.W(PW)) u_rd2wr (
    .src_clk(clk),  .src_rst_n(rst_n),  .src_bin(rd_ptr),
    .dst_clk(wclk), .dst_rst_n(wrst_n), .dst_bin(rd_ptr_wsync)
  );

endmodule
