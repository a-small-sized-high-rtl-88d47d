// storage_pkg: constants and types shared by the storage module's FPGA
// logic. The buffer sizes, the 4160-byte start threshold, the 4096-byte
// block and the 30 MByte/s flash byte rate are the published figures of
// the design; the NAND command codes are the standard large-page NAND
// codes (page program 80h/10h, two-plane 11h/81h) and the flash geometry
// (128 pages per block, 4096 blocks per die, two dies per package) is
// this implementation's choice, sized so that two packages hold 8 GByte.
package storage_pkg;

  // Word from the LVDS deserializer: d[9:2] data, d[1:0] valid flag.
  localparam int unsigned WORD_W   = 10;
  localparam int unsigned BYTE_W   = 8;

  // Buffer sizes in bytes.
  localparam int unsigned PRIMARY_BYTES   = 8192;
  localparam int unsigned SECONDARY_BYTES = 4096;

  // Buffer controller: move BLOCK_BYTES once more than THRESHOLD bytes wait.
  localparam int unsigned THRESHOLD_BYTES = 4160;
  localparam int unsigned BLOCK_BYTES     = 4096;

  // Flash side: system clocks per NAND bus cycle (120 MHz / 4 = 30 MByte/s).
  localparam int unsigned FLASH_BYTE_CLKS = 4;
  localparam int unsigned PAGE_BYTES      = 4096;

  // NAND commands.
  localparam logic [7:0] CMD_PROG_1ST      = 8'h80; // serial data input
  localparam logic [7:0] CMD_PROG_2ND_DUMMY = 8'h11; // two-plane: first plane loaded
  localparam logic [7:0] CMD_PROG_PLANE2   = 8'h81; // two-plane: second plane input
  localparam logic [7:0] CMD_PROG_CONFIRM  = 8'h10; // start programming

  // Outputs of one flash controller onto its NAND package bus.
  typedef struct packed {
    logic       cle;    // command latch enable
    logic       ale;    // address latch enable
    logic       we_n;   // write enable, data latched on its rising edge
    logic       re_n;   // read enable (held inactive: the recorder only writes)
    logic       wp_n;   // write protect (held inactive)
    logic [1:0] ce_n;   // chip enables of the two dies in the package
    logic [7:0] io;     // I/O bus, driven while io_oe is high
    logic       io_oe;  // the controller drives io
  } nand_out_t;

  // Number of bits needed to count 0..n inclusive.
  function automatic int unsigned cnt_w(input int unsigned n);
    return $clog2(n + 1);
  endfunction

endpackage
