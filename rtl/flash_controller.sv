// flash_controller: writes the bytes of one secondary buffer into one NAND
// flash package (two dies, each with two planes) by page program.
//
// Whenever the secondary buffer holds more than START_LEVEL (10) bytes, the
// controller starts the next page: it waits until the target die reports
// ready on its R/B# line, then issues a command cycle, ADDR_CYCLES address
// cycles (two column bytes, zero, then three row bytes), PAGE_BYTES data
// cycles fed from the secondary buffer, and a closing command cycle. Bus
// cycles take BYTE_CLKS clocks (4 at 120 MHz: 30 MByte/s); in each, the
// buffer byte is fetched in the first clock, WE# is low in the middle two
// and rises at the end of the third, with CLE/ALE/I/O held throughout.
// If the buffer runs dry during a page the controller waits with WE# high.
//
// Pages are placed for two-plane, interleaved programming: die 0 plane 0
// (80h ... 11h), die 0 plane 1 (81h ... 10h: both planes program), then
// the same on die 1 while die 0 is busy, so four pages (16 KByte) form one
// programming round. Before each first-plane page the controller waits for
// that die's R/B#; before the second plane it waits out the short busy
// after 11h. After each closing command it waits TWB_CLKS clocks (the NAND
// tWB) before it looks at R/B# again. The row address is
// {block pair, plane, page}; pages advance after each round, block pairs
// after PAGES_PER_BLOCK pages. When the last block pair is written the
// controller raises full and stops.
//
// Published: the 4096-byte page, the 10-byte start level, the 30 MByte/s
// transfer rate and two-plane interleaved page program. This
// implementation's choices: the command codes (the common large-page NAND
// codes), the address layout, the geometry defaults (chosen so that the
// package holds 4 GByte), no status read after programming, and the bus
// cycle shape.
module flash_controller
  import storage_pkg::*;
#(
  parameter int unsigned SEC_DEPTH       = SECONDARY_BYTES,
  parameter int unsigned PAGE            = PAGE_BYTES,
  parameter int unsigned BYTE_CLKS       = FLASH_BYTE_CLKS,
  parameter int unsigned START_LEVEL     = 10,
  parameter int unsigned PAGES_PER_BLOCK = 128,
  parameter int unsigned BLOCK_PAIRS     = 2048,  // per die: 4096 blocks
  parameter int unsigned ADDR_CYCLES     = 5,
  parameter int unsigned TWB_CLKS        = 12,    // 100 ns at 120 MHz
  localparam int unsigned SCW            = $clog2(SEC_DEPTH + 1),
  localparam int unsigned PGW            = $clog2(PAGES_PER_BLOCK),
  localparam int unsigned BPW            = $clog2(BLOCK_PAIRS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // secondary buffer read side
  input  logic [SCW-1:0]    sec_count,
  output logic              sec_rd_en,
  input  logic [BYTE_W-1:0] sec_rdata,
  // NAND package
  output nand_out_t         nand_o,
  input  logic [1:0]        rb_n,        // ready (1) / busy (0) per die
  // status
  output logic              full,        // every page has been written
  output logic              rb_wait,     // waiting for a die to become ready
  output logic              page_done,   // one-clock pulse per page loaded
  output logic [31:0]       pages_written
);

  typedef enum logic [2:0] {
    F_IDLE, F_WAIT_RDY, F_CMD1, F_ADDR, F_DATA, F_CMD2, F_TWB, F_FULL
  } fstate_t;

  localparam int unsigned PH_W  = $clog2(BYTE_CLKS);
  localparam int unsigned BC_W  = $clog2(PAGE + 1);
  localparam int unsigned TWB_W = $clog2(TWB_CLKS + 1);

  fstate_t          state;
  logic [PH_W-1:0]  ph;         // clock within a bus cycle
  logic [BC_W-1:0]  nbyte;      // cycle number within the current state
  logic [TWB_W-1:0] twb;
  logic             die;
  logic             plane;
  logic [PGW-1:0]   page;
  logic [BPW-1:0]   bpair;
  logic [23:0]      row;
  logic [7:0]       cur_byte;
  logic             cyc_start;  // first clock of a bus cycle may proceed
  logic             cyc_last;
  nand_out_t        nand_d;

  assign row = 24'({bpair, plane, page});

  // Byte driven in the current bus cycle.
  always_comb begin
    unique case (state)
      F_CMD1:  cur_byte = plane ? CMD_PROG_PLANE2 : CMD_PROG_1ST;
      F_CMD2:  cur_byte = plane ? CMD_PROG_CONFIRM : CMD_PROG_2ND_DUMMY;
      F_ADDR:  begin
        unique case (nbyte)
          BC_W'(2): cur_byte = row[7:0];
          BC_W'(3): cur_byte = row[15:8];
          BC_W'(4): cur_byte = row[23:16];
          default:  cur_byte = 8'h00;  // column address: start of page
        endcase
      end
      F_DATA:  cur_byte = sec_rdata;
      default: cur_byte = 8'h00;
    endcase
  end

  // A data cycle may only begin when the buffer holds a byte.
  assign cyc_start = (state != F_DATA) || (sec_count != '0);
  assign sec_rd_en = (state == F_DATA) && (ph == '0) && cyc_start;
  assign cyc_last  = (ph == PH_W'(BYTE_CLKS - 1));
  assign rb_wait   = (state == F_WAIT_RDY) && !rb_n[die];

  // Next value of the (registered) NAND outputs.
  always_comb begin
    nand_d       = nand_o;
    nand_d.re_n  = 1'b1;
    nand_d.wp_n  = 1'b1;
    unique case (state)
      F_CMD1, F_ADDR, F_DATA, F_CMD2: begin
        nand_d.ce_n     = 2'b11;
        nand_d.ce_n[die] = 1'b0;
        nand_d.io_oe    = 1'b1;
        if (ph == PH_W'(1)) begin
          nand_d.cle = (state == F_CMD1) || (state == F_CMD2);
          nand_d.ale = (state == F_ADDR);
          nand_d.io  = cur_byte;
        end
        nand_d.we_n = !((ph == PH_W'(1)) || (ph == PH_W'(2)));
      end
      default: begin
        nand_d.ce_n  = 2'b11;
        nand_d.cle   = 1'b0;
        nand_d.ale   = 1'b0;
        nand_d.we_n  = 1'b1;
        nand_d.io_oe = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= F_IDLE;
      ph            <= '0;
      nbyte         <= '0;
      twb           <= '0;
      die           <= 1'b0;
      plane         <= 1'b0;
      page          <= '0;
      bpair         <= '0;
      page_done     <= 1'b0;
      pages_written <= '0;
      nand_o        <= '{cle: 1'b0, ale: 1'b0, we_n: 1'b1, re_n: 1'b1, wp_n: 1'b1,
                         ce_n: 2'b11, io: 8'h00, io_oe: 1'b0};
    end else begin
      nand_o    <= nand_d;
      page_done <= 1'b0;
      // bus-cycle phase counter
      if (state inside {F_CMD1, F_ADDR, F_DATA, F_CMD2}) begin
        if (ph != '0 || cyc_start) ph <= cyc_last ? '0 : ph + 1'b1;
      end else begin
        ph <= '0;
      end
      unique case (state)
        F_IDLE:     if (32'(sec_count) > START_LEVEL) state <= F_WAIT_RDY;
        F_WAIT_RDY: if (rb_n[die]) begin
          state <= F_CMD1;
          nbyte <= '0;
        end
        F_CMD1:     if (cyc_last) begin
          state <= F_ADDR;
          nbyte <= '0;
        end
        F_ADDR:     if (cyc_last) begin
          if (nbyte == BC_W'(ADDR_CYCLES - 1)) begin
            state <= F_DATA;
            nbyte <= '0;
          end else begin
            nbyte <= nbyte + 1'b1;
          end
        end
        F_DATA:     if (cyc_last) begin
          if (nbyte == BC_W'(PAGE - 1)) begin
            state <= F_CMD2;
            nbyte <= '0;
          end else begin
            nbyte <= nbyte + 1'b1;
          end
        end
        F_CMD2:     if (cyc_last) begin
          state         <= F_TWB;
          twb           <= '0;
          page_done     <= 1'b1;
          pages_written <= pages_written + 1;
        end
        F_TWB: begin
          twb <= twb + 1'b1;
          if (twb == TWB_W'(TWB_CLKS - 1)) begin
            state <= F_IDLE;
            plane <= !plane;
            if (plane) begin
              // both planes of this die loaded: go to the other die
              die <= !die;
              if (die) begin
                if (page == PGW'(PAGES_PER_BLOCK - 1)) begin
                  page <= '0;
                  if (bpair == BPW'(BLOCK_PAIRS - 1)) state <= F_FULL;
                  else                                 bpair <= bpair + 1'b1;
                end else begin
                  page <= page + 1'b1;
                end
              end
            end
          end
        end
        F_FULL:     ;
        default:    state <= F_IDLE;
      endcase
    end
  end

  assign full = (state == F_FULL);

  a_we_only_selected: assert property (@(posedge clk) disable iff (!rst_n)
                                       !nand_o.we_n |-> (nand_o.ce_n != 2'b11));

endmodule
