// gray_ptr_sync: carries a counting pointer from one clock domain to
// another. The source side registers the pointer in Gray code, so that
// between two source edges only one bit changes; the destination side
// passes it through two flip-flops and converts it back to binary. The
// destination sees the pointer two to three of its own cycles late and
// never a value the source did not hold. This is valid only for a pointer
// that changes by at most one per source clock, which holds for the
// primary buffer's read and write pointers.
module gray_ptr_sync #(
  parameter int unsigned W = 14
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_bin,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_bin
);

  logic [W-1:0] src_gray;
  logic [W-1:0] meta, sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) src_gray <= '0;
    else            src_gray <= src_bin ^ (src_bin >> 1);
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      meta <= '0;
      sync <= '0;
    end else begin
      meta <= src_gray;
      sync <= meta;
    end
  end

  // Gray to binary: each bit is the XOR of all Gray bits at or above it.
  always_comb begin
    dst_bin[W-1] = sync[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) dst_bin[i] = dst_bin[i+1] ^ sync[i];
  end

endmodule
