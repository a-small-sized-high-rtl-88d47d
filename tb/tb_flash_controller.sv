// tb_flash_controller: a secondary buffer feeds the flash controller,
// which drives the NAND package model, with a small geometry (64-byte
// pages, 2 pages per block, 2 block pairs: 16 pages in all). Checks: no
// page starts with 10 bytes buffered, one starts with 11; data bytes are
// 4 clocks apart (30 MByte/s at 120 MHz); the model sees a legal two-plane
// sequence with no protocol error; the bytes reach the flash in order; the
// rows follow die 0 planes 0/1, die 1 planes 0/1, then the next page and
// block pair; a die is programmed while the other is busy; the controller
// waits on R/B#; after the last page full rises and no more bytes are
// taken.
module tb_flash_controller;
  import storage_pkg::*;
  localparam int unsigned PAGE = 64, PPB = 2, BP = 2, SEC = 256;
  localparam int unsigned SCW = $clog2(SEC + 1);
  localparam int unsigned TOTAL_PAGES = 2 * 2 * PPB * BP;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // reset edge at start-up
  logic wr_en = 0, rd_en, sfull, sempty;
  logic [7:0] wdata = '0, rdata;
  logic [SCW-1:0] count;
  nand_out_t nand_o;
  logic [1:0] rb_n;
  logic full, rb_wait, page_done;
  logic [31:0] pages_written;
  int checks = 0, failures = 0;
  byte unsigned stream[$];
  int rbw_cycles = 0;

  secondary_buffer #(.DEPTH(SEC)) u_sec (
    .clk, .rst_n, .wr_en, .wdata, .rd_en, .rdata, .count, .full(sfull), .empty(sempty));

  flash_controller #(.SEC_DEPTH(SEC), .PAGE(PAGE), .PAGES_PER_BLOCK(PPB), .BLOCK_PAIRS(BP)) dut (
    .clk, .rst_n, .sec_count(count), .sec_rd_en(rd_en), .sec_rdata(rdata),
    .nand_o, .rb_n, .full, .rb_wait, .page_done, .pages_written);

  nand_flash_model #(.PAGE(PAGE), .TPROG_CLKS(3000), .TDBSY_CLKS(60), .PGW(1)) u_nand (
    .clk, .rst_n, .n(nand_o), .hold_busy(1'b0), .rb_n);

  always #4 clk = ~clk;
  always @(posedge clk) if (rb_wait) rbw_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (sfull) @(negedge clk);
      wr_en = 1; wdata = 8'($urandom);
      stream.push_back(wdata);
      @(negedge clk) wr_en = 0;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // WE# rising edges while a data byte is on the bus, in clocks
  longint we_rise[$];
  logic we_q = 1;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    we_q <= nand_o.we_n;
    if (!we_q && nand_o.we_n && !nand_o.cle && !nand_o.ale) we_rise.push_back(cyc);
  end

  initial begin
    int exp_row;
    repeat (3) @(posedge clk);
    rst_n = 1;
    push(10);
    repeat (100) @(posedge clk);
    #1 check(nand_o.ce_n == 2'b11 && we_rise.size() == 0, "10 bytes do not start a page");
    // fill the buffer ahead of the controller, so the first page is not starved
    push(200);
    while (u_nand.data_q.size() < PAGE) @(posedge clk);
    check(we_rise.size() >= PAGE, "data strobes seen");
    check(we_rise[PAGE-1] - we_rise[0] == 4 * (PAGE - 1),
          $sformatf("page data at one byte per 4 clocks (%0d clocks for %0d bytes)",
                    we_rise[PAGE-1] - we_rise[0], PAGE));
    // the rest of the stream, a little more than fits
    push(TOTAL_PAGES * PAGE - 210 + 40);
    while (!full) @(posedge clk);
    repeat (200) @(posedge clk);
    #1;
    check(u_nand.errors == 0, $sformatf("NAND protocol errors: %0d", u_nand.errors));
    check(pages_written == TOTAL_PAGES, $sformatf("pages written %0d", pages_written));
    check(u_nand.data_q.size() == TOTAL_PAGES * PAGE, "all page bytes, no more");
    for (int i = 0; i < TOTAL_PAGES * PAGE; i++)
      if (i < u_nand.data_q.size())
        check(u_nand.data_q[i] == stream[i], $sformatf("flash byte %0d", i));
    check(count == 40, "bytes beyond capacity stay buffered");
    check(u_nand.row_q.size() == TOTAL_PAGES, "one row per page");
    for (int k = 0; k < TOTAL_PAGES && k < u_nand.row_q.size(); k++) begin
      // k = ((bpair*PPB + page)*2 + die)*2 + plane
      int plane, rest, pg, bpair;
      plane = k % 2;
      rest  = k / 4;          // skip die
      pg    = rest % PPB;
      bpair = rest / PPB;
      exp_row = (bpair << 2) | (plane << 1) | pg;
      check(u_nand.row_q[k] == exp_row, $sformatf("row %0d: got %0h expected %0h", k, u_nand.row_q[k], exp_row));
    end
    check(u_nand.programs == TOTAL_PAGES / 2, "two-plane programs");
    check(u_nand.dbsy_count == TOTAL_PAGES / 2, "first-plane (11h) loads");
    check(u_nand.overlap_count > 0, "a die loaded while the other programs");
    check(rbw_cycles > 0, "controller waited on R/B#");
    check(full, "full after the last page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
