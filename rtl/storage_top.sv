// storage_top: the FPGA logic of a miniature high-g data recorder. A master
// unit streams 10-bit words over a serial LVDS link at a 60 MHz word rate;
// an external deserializer turns them back into parallel words with a
// recovered clock (rclk). Each word carries a data byte in d[9:2] and a
// valid flag in d[1:0] (00 = valid). The logic stores the valid bytes, in
// order, in two NAND flash packages, A and B, at up to 60 MByte/s.
//
// Data path (two clock domains):
//   rclk (60 MHz):  storing_trigger -> lvds_controller -> primary buffer
//   clk (120 MHz):  primary buffer -> buffer_controller -> secondary A / B
//                   -> flash_controller A / B -> NAND package A / B
// The primary buffer (8 KByte) absorbs the continuous input. Whenever more
// than 4160 bytes wait in it, the buffer controller moves 4096 bytes at
// 120 MByte/s into secondary buffer A or B (4 KByte each), alternating.
// Each flash controller drains its secondary buffer at 30 MByte/s into
// two-plane, two-die interleaved page programs, so that one die programs
// while the other is loaded. Block k of the stream (4096 bytes) therefore
// goes to package A for even k and to package B for odd k.
//
// Recording starts on a rising edge of start_in and stops while stop_in is
// high or once both flash packages are full. rst_n is asynchronous; it is
// released into each clock domain through a two-flip-flop synchronizer
// (this implementation's choice). The NAND outputs are registered; each
// package has two dies with one R/B# line each.
module storage_top
  import storage_pkg::*;
#(
  // flash geometry per die; the defaults give 2 GByte per die, 4 GByte per
  // package and 8 GByte in all
  parameter int unsigned PAGES_PER_BLOCK = 128,
  parameter int unsigned BLOCK_PAIRS     = 2048
) (
  // LVDS deserializer side
  input  logic              rclk,        // recovered clock, 60 MHz
  input  logic [WORD_W-1:0] lvds_d,      // deserialized word
  // system side
  input  logic              clk,         // system clock, 120 MHz
  input  logic              rst_n,       // asynchronous reset, active low
  input  logic              start_in,    // storing trigger: start on rising edge
  input  logic              stop_in,     // stop recording while high
  // NAND flash package A
  output nand_out_t         nand_a,
  input  logic [1:0]        rb_a_n,
  // NAND flash package B
  output nand_out_t         nand_b,
  input  logic [1:0]        rb_b_n,
  // status
  output logic              recording,   // record_en, rclk domain
  output logic              overflow,    // a valid byte was lost (sticky), rclk domain
  output logic              flash_full,  // both packages full, clk domain
  output logic [31:0]       bytes_stored,// valid bytes taken in, rclk domain
  output logic [31:0]       pages_a,     // pages loaded into package A
  output logic [31:0]       pages_b,     // pages loaded into package B
  output logic              word_valid,  // last captured word had flag 00, rclk domain
  output logic              xfer_busy,   // buffer controller moving a block, clk domain
  output logic              xfer_to_b,   // current / next block goes to B, clk domain
  output logic              xfer_stall,  // block move waiting for secondary room
  output logic              block_moved, // one-clk pulse per 4096-byte block moved
  output logic [1:0]        flash_wait,  // flash A/B waiting for a busy die
  output logic [1:0]        page_loaded  // one-clk pulse per page loaded, A/B
);

  localparam int unsigned PW  = $clog2(PRIMARY_BYTES) + 1;
  localparam int unsigned PAW = $clog2(PRIMARY_BYTES);
  localparam int unsigned SCW = $clog2(SECONDARY_BYTES + 1);

  // ---------------- reset synchronizers ----------------
  logic [1:0] rrst_sync, srst_sync;
  logic       rrst_n, srst_n;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) rrst_sync <= '0;
    else        rrst_sync <= {rrst_sync[0], 1'b1};
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) srst_sync <= '0;
    else        srst_sync <= {srst_sync[0], 1'b1};
  end
  assign rrst_n = rrst_sync[1];
  assign srst_n = srst_sync[1];

  // ---------------- recovered-clock domain ----------------
  logic              record_en;
  logic              p_we;
  logic [PAW-1:0]    p_waddr;
  logic [BYTE_W-1:0] p_wdata;
  logic [PW-1:0]     wr_ptr, rd_ptr_wsync;
  logic              full_a, full_b;

  assign flash_full = full_a && full_b;

  storing_trigger u_trigger (
    .rclk     (rclk),
    .rst_n    (rrst_n),
    .start_in (start_in),
    .stop_in  (stop_in || flash_full),
    .record_en(record_en)
  );
  assign recording = record_en;

  lvds_controller u_lvds (
    .rclk       (rclk),
    .rst_n      (rrst_n),
    .record_en  (record_en),
    .d          (lvds_d),
    .rd_ptr_sync(rd_ptr_wsync),
    .ram_we     (p_we),
    .ram_waddr  (p_waddr),
    .ram_wdata  (p_wdata),
    .wr_ptr     (wr_ptr),
    .inv_flag   (word_valid),
    .overflow   (overflow),
    .valid_count(bytes_stored)
  );

  // ---------------- primary buffer (crosses domains) ----------------
  logic              p_rd_en;
  logic [PW-1:0]     rd_ptr, wr_ptr_rsync;
  logic [BYTE_W-1:0] p_rdata;

  primary_buffer u_primary (
    .wclk        (rclk),
    .wrst_n      (rrst_n),
    .we          (p_we),
    .waddr       (p_waddr),
    .wdata       (p_wdata),
    .wr_ptr      (wr_ptr),
    .rd_ptr_wsync(rd_ptr_wsync),
    .clk         (clk),
    .rst_n       (srst_n),
    .rd_en       (p_rd_en),
    .rd_ptr      (rd_ptr),
    .rdata       (p_rdata),
    .wr_ptr_rsync(wr_ptr_rsync)
  );

  // ---------------- system-clock domain ----------------
  logic [SCW-1:0]    count_a, count_b;
  logic              wr_en_a, wr_en_b, rd_en_a, rd_en_b;
  logic [BYTE_W-1:0] sec_wdata, rdata_a, rdata_b;

  buffer_controller u_bufctl (
    .clk        (clk),
    .rst_n      (srst_n),
    .wr_ptr_sync(wr_ptr_rsync),
    .prim_rd_en (p_rd_en),
    .rd_ptr     (rd_ptr),
    .prim_rdata (p_rdata),
    .count_a    (count_a),
    .count_b    (count_b),
    .wr_en_a    (wr_en_a),
    .wr_en_b    (wr_en_b),
    .sec_wdata  (sec_wdata),
    .sel_b      (xfer_to_b),
    .busy       (xfer_busy),
    .stall      (xfer_stall),
    .block_done (block_moved)
  );

  secondary_buffer u_sec_a (
    .clk(clk), .rst_n(srst_n),
    .wr_en(wr_en_a), .wdata(sec_wdata),
    .rd_en(rd_en_a), .rdata(rdata_a),
    .count(count_a), .full(), .empty()
  );

  secondary_buffer u_sec_b (
    .clk(clk), .rst_n(srst_n),
    .wr_en(wr_en_b), .wdata(sec_wdata),
    .rd_en(rd_en_b), .rdata(rdata_b),
    .count(count_b), .full(), .empty()
  );

  flash_controller #(.PAGES_PER_BLOCK(PAGES_PER_BLOCK), .BLOCK_PAIRS(BLOCK_PAIRS)) u_flash_a (
    .clk          (clk),
    .rst_n        (srst_n),
    .sec_count    (count_a),
    .sec_rd_en    (rd_en_a),
    .sec_rdata    (rdata_a),
    .nand_o       (nand_a),
    .rb_n         (rb_a_n),
    .full         (full_a),
    .rb_wait      (flash_wait[0]),
    .page_done    (page_loaded[0]),
    .pages_written(pages_a)
  );

  flash_controller #(.PAGES_PER_BLOCK(PAGES_PER_BLOCK), .BLOCK_PAIRS(BLOCK_PAIRS)) u_flash_b (
    .clk          (clk),
    .rst_n        (srst_n),
    .sec_count    (count_b),
    .sec_rd_en    (rd_en_b),
    .sec_rdata    (rdata_b),
    .nand_o       (nand_b),
    .rb_n         (rb_b_n),
    .full         (full_b),
    .rb_wait      (flash_wait[1]),
    .page_done    (page_loaded[1]),
    .pages_written(pages_b)
  );

endmodule
