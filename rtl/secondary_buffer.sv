// secondary_buffer: one 4 KByte second-level buffer (the design has two,
// A and B) between the buffer controller, which fills it at one byte per
// 120 MHz clock, and a flash controller, which empties it at one byte per
// four clocks. It is a first-in first-out queue over a dual-port RAM, both
// ports on the system clock. rdata holds the byte read one cycle after
// rd_en and keeps it until the next read. count is the number of bytes
// held, which the flash controller compares with its start level and the
// buffer controller uses to avoid writing into a full buffer. Writing when
// full or reading when empty is a protocol error and is asserted against.
module secondary_buffer
  import storage_pkg::*;
#(
  parameter int unsigned DEPTH = SECONDARY_BYTES,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [BYTE_W-1:0] wdata,
  input  logic              rd_en,
  output logic [BYTE_W-1:0] rdata,
  output logic [CW-1:0]     count,
  output logic              full,
  output logic              empty
);

  logic [AW-1:0] wa, ra;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);

  dp_ram #(.DEPTH(DEPTH), .WIDTH(BYTE_W)) u_ram (
    .wclk (clk),
    .we   (wr_en),
    .waddr(wa),
    .wdata(wdata),
    .rclk (clk),
    .re   (rd_en),
    .raddr(ra),
    .rdata(rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa    <= '0;
      ra    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wa <= wa + 1'b1;
      if (rd_en) ra <= ra + 1'b1;
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  a_no_overfill:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underrun:  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
