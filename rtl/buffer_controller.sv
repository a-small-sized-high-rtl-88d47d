// buffer_controller: moves data from the primary buffer to the two
// secondary buffers, following the published flowchart. It compares the
// number of bytes waiting in the primary buffer (offset, the synchronized
// write pointer minus its own read pointer) with THRESHOLD (4160). Once
// offset exceeds it, it reads BLOCK (4096) bytes, one per clock (120
// MByte/s at 120 MHz), and writes them into the selected secondary buffer;
// then it selects the other secondary buffer and waits for the threshold
// again, so that blocks go to A, B, A, B, ...
//
// The primary buffer's read data arrives one clock after the read, so
// each byte is written into the secondary buffer one clock after it is
// read. A read is issued only if the selected secondary buffer will have
// room for its byte; otherwise the transfer waits (stall) until the flash
// controller has taken bytes out. Stalling on a full secondary buffer is
// this implementation's choice: the published flowchart does not say what
// happens when a secondary buffer has not yet been emptied.
//
// Timing: an uninterrupted block takes BLOCK + 1 clocks from the first
// read to the last write, and one more clock passes before the next
// threshold check.
module buffer_controller
  import storage_pkg::*;
#(
  parameter int unsigned PRIM_DEPTH = PRIMARY_BYTES,
  parameter int unsigned SEC_DEPTH  = SECONDARY_BYTES,
  parameter int unsigned THRESHOLD  = THRESHOLD_BYTES,
  parameter int unsigned BLOCK      = BLOCK_BYTES,
  localparam int unsigned PW        = $clog2(PRIM_DEPTH) + 1,
  localparam int unsigned SCW       = $clog2(SEC_DEPTH + 1),
  localparam int unsigned BCW       = $clog2(BLOCK + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // primary buffer read side
  input  logic [PW-1:0]     wr_ptr_sync,
  output logic              prim_rd_en,
  output logic [PW-1:0]     rd_ptr,
  input  logic [BYTE_W-1:0] prim_rdata,
  // secondary buffers
  input  logic [SCW-1:0]    count_a,
  input  logic [SCW-1:0]    count_b,
  output logic              wr_en_a,
  output logic              wr_en_b,
  output logic [BYTE_W-1:0] sec_wdata,
  // status
  output logic              sel_b,      // block being / to be moved goes to B
  output logic              busy,       // a block transfer is in progress
  output logic              stall,      // transfer waiting for secondary room
  output logic              block_done  // one-clock pulse per block moved
);

  typedef enum logic [1:0] {S_CHECK, S_MOVE, S_LAST} state_t;

  state_t         state;
  logic [BCW-1:0] issued;
  logic           wpend;     // a byte read last clock is written this clock
  logic [PW-1:0]  offset;
  logic [SCW-1:0] count_sel;
  logic           room;

  assign offset    = wr_ptr_sync - rd_ptr;
  assign count_sel = sel_b ? count_b : count_a;
  // The selected buffer's count does not yet include the byte written this
  // clock; reserve a place for it and for the byte about to be read.
  assign room      = (32'(count_sel) + 32'(wpend) + 1) <= SEC_DEPTH;

  assign prim_rd_en = (state == S_MOVE) && (issued != BCW'(BLOCK)) && room;
  assign stall      = (state == S_MOVE) && (issued != BCW'(BLOCK)) && !room;
  assign busy       = (state != S_CHECK);
  assign wr_en_a    = wpend && !sel_b;
  assign wr_en_b    = wpend &&  sel_b;
  assign sec_wdata  = prim_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CHECK;
      issued     <= '0;
      wpend      <= 1'b0;
      rd_ptr     <= '0;
      sel_b      <= 1'b0;
      block_done <= 1'b0;
    end else begin
      wpend      <= prim_rd_en;
      block_done <= 1'b0;
      if (prim_rd_en) begin
        rd_ptr <= rd_ptr + 1'b1;
        issued <= issued + 1'b1;
      end
      unique case (state)
        S_CHECK: if (32'(offset) > THRESHOLD) begin
          state  <= S_MOVE;
          issued <= '0;
        end
        S_MOVE: if (issued == BCW'(BLOCK - 1) && prim_rd_en) state <= S_LAST;
        S_LAST: begin
          // the last byte is written this clock
          state      <= S_CHECK;
          sel_b      <= !sel_b;
          block_done <= 1'b1;
        end
        default: state <= S_CHECK;
      endcase
    end
  end

  a_offset_bounded: assert property (@(posedge clk) disable iff (!rst_n)
                                     32'(offset) <= PRIM_DEPTH);

endmodule
