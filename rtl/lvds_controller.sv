// lvds_controller: takes the 10-bit words that the LVDS deserializer
// delivers on each rising edge of its recovered clock (60 MHz) and stores
// the valid ones in the primary buffer. Bits d[9:2] carry a data byte and
// d[1:0] a flag: 00 marks a valid word, 01, 10 and 11 an idle one.
//
// As in the published flowchart, every word's high byte is written into
// the primary buffer at the current write address, and the address then
// advances by one only if the flag is 00; an idle word is thus overwritten
// by the next one. The word is first captured in an input register
// together with its flag (inv_flag, high for a valid word, named as in the
// published timing diagram); one rclk later the byte is written and the
// address advanced. The published diagram advances the address on the
// falling clock edge; here everything runs on the rising edge, one cycle
// later, which stores the same bytes at the same addresses.
//
// Writing stops while record_en is low, and while the buffer is full,
// judged from the read pointer synchronized into this clock domain. A
// valid word that arrives while the buffer is full is dropped and sets the
// sticky overflow flag (overflow handling is this implementation's
// choice). wr_ptr has one bit more than the RAM address so that a full
// buffer can be told from an empty one.
module lvds_controller
  import storage_pkg::*;
#(
  parameter int unsigned DEPTH = PRIMARY_BYTES,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PW   = AW + 1
) (
  input  logic              rclk,
  input  logic              rst_n,
  input  logic              record_en,
  input  logic [WORD_W-1:0] d,            // deserializer output word
  input  logic [PW-1:0]     rd_ptr_sync,  // primary read pointer, rclk domain
  output logic              ram_we,
  output logic [AW-1:0]     ram_waddr,
  output logic [BYTE_W-1:0] ram_wdata,
  output logic [PW-1:0]     wr_ptr,
  output logic              inv_flag,     // registered word is valid (flag 00)
  output logic              overflow,     // a valid byte was lost, sticky
  output logic [31:0]       valid_count   // valid bytes stored
);

  logic [BYTE_W-1:0] d_q;      // data byte d[9:2] of the captured word
  logic              rec_q;
  logic [PW-1:0]     used;
  logic              full;

  assign used      = wr_ptr - rd_ptr_sync;
  assign full      = (used == PW'(DEPTH));
  assign ram_we    = rec_q && !full;
  assign ram_waddr = wr_ptr[AW-1:0];
  assign ram_wdata = d_q;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      d_q         <= '0;
      rec_q       <= 1'b0;
      inv_flag    <= 1'b0;
      wr_ptr      <= '0;
      overflow    <= 1'b0;
      valid_count <= '0;
    end else begin
      d_q      <= d[WORD_W-1:2];
      rec_q    <= record_en;
      inv_flag <= (d[1:0] == 2'b00);
      if (rec_q && inv_flag) begin
        if (full) begin
          overflow <= 1'b1;
        end else begin
          wr_ptr      <= wr_ptr + 1'b1;
          valid_count <= valid_count + 1;
        end
      end
    end
  end

endmodule
