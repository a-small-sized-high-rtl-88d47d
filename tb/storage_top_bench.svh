// Shared body of the end-to-end testbenches of storage_top. The including
// module defines PPB (pages per block), BP (block pairs), P1_BLOCKS (blocks
// streamed in the checked phase) and RUN_TO_FULL (whether to keep
// recording until both packages are full), then instantiates storage_top
// after this file, connected by name.
//
// It provides the two clocks (60 MHz recovered clock, 120 MHz system
// clock), a word source with random data bytes and random idle flags, two
// NAND package models, and the checks:
//   phase 1: record P1_BLOCKS blocks with about 5% idle words and check
//            that package A holds blocks 0, 2, 4, ... and package B blocks
//            1, 3, 5, ... of the valid byte stream, byte for byte, with no
//            NAND protocol error and no overflow;
//   phase 2: hold both packages busy and stream valid words until the
//            primary buffer overflows;
//   phase 3: (RUN_TO_FULL) release the packages and record until both are
//            full, which must stop recording.
// Every mechanism is counted and must happen at least once: idle words
// skipped, blocks to A and to B, a stalled block move, a wait on R/B#,
// a die loaded while the other programs, two-plane programs, the start
// trigger, the stop input, overflow, and (RUN_TO_FULL) flash full.

  import storage_pkg::*;

  logic              rclk = 0, clk = 0, rst_n = 1;
  logic [WORD_W-1:0] lvds_d = 10'h3;
  logic              start_in = 0, stop_in = 0;
  nand_out_t         nand_a, nand_b;
  logic [1:0]        rb_a_n, rb_b_n;
  logic              recording, overflow, flash_full;
  logic [31:0]       bytes_stored, pages_a, pages_b;
  logic              word_valid, xfer_busy, xfer_to_b, xfer_stall, block_moved;
  logic [1:0]        flash_wait, page_loaded;
  logic              hold = 0;

  int checks = 0, failures = 0;
  byte unsigned sent[$];
  int valid_pct = 95;
  bit gen_on = 0;

  // mechanism counters
  int n_idle_words = 0, n_blocks_a = 0, n_blocks_b = 0, n_stall = 0;
  int n_rb_wait = 0, n_starts = 0, n_stops = 0, n_overflow = 0, n_full = 0;

  initial #1 rst_n = 0;
  always #8.333 rclk = ~rclk;
  always #4.1667 clk = ~clk;

  nand_flash_model #(.PAGE(PAGE_BYTES), .TPROG_CLKS(24000), .TDBSY_CLKS(60),
                     .PGW($clog2(PPB))) u_nand_a (.clk, .rst_n, .n(nand_a), .hold_busy(hold), .rb_n(rb_a_n));
  nand_flash_model #(.PAGE(PAGE_BYTES), .TPROG_CLKS(24000), .TDBSY_CLKS(60),
                     .PGW($clog2(PPB))) u_nand_b (.clk, .rst_n, .n(nand_b), .hold_busy(hold), .rb_n(rb_b_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // word source: a new word after every rising edge of rclk
  always @(negedge rclk) begin
    if (gen_on) begin
      lvds_d[9:2] <= 8'($urandom);
      lvds_d[1:0] <= ($urandom_range(0, 99) < valid_pct) ? 2'b00 : 2'(1 + $urandom_range(0, 2));
    end else begin
      lvds_d <= 10'h3;
    end
  end

  // reference: a word is taken if recording was on when it was captured
  bit ovf_seen = 0;
  always @(posedge rclk) if (rst_n) begin
    if (recording && lvds_d[1:0] == 2'b00 && !ovf_seen) sent.push_back(lvds_d[9:2]);
    if (recording && lvds_d[1:0] != 2'b00) n_idle_words++;
  end

  always @(posedge clk) if (rst_n) begin
    if (block_moved) begin if (xfer_to_b) n_blocks_a++; else n_blocks_b++; end
    if (xfer_stall) n_stall++;
    if (flash_wait != 0) n_rb_wait++;
  end

  task automatic pulse_start();
    @(negedge rclk) start_in = 1;
    repeat (4) @(negedge rclk);
    start_in = 0;
    n_starts++;
  endtask

  task automatic stop_rec();
    @(negedge rclk) stop_in = 1;
    repeat (4) @(negedge rclk);
    stop_in = 0;
    n_stops++;
  endtask

  task automatic compare_flash(input int nblocks);
    int na, nb;
    na = (nblocks + 1) / 2;
    nb = nblocks / 2;
    check(u_nand_a.data_q.size() >= na * BLOCK_BYTES, $sformatf("A holds %0d blocks (%0d bytes)", na, u_nand_a.data_q.size()));
    check(u_nand_b.data_q.size() >= nb * BLOCK_BYTES, $sformatf("B holds %0d blocks (%0d bytes)", nb, u_nand_b.data_q.size()));
    for (int k = 0; k < nblocks; k++) begin
      int errs = 0;
      for (int i = 0; i < BLOCK_BYTES; i++) begin
        int idx = k * BLOCK_BYTES + i;
        int fi  = (k / 2) * BLOCK_BYTES + i;
        byte unsigned got;
        if (k % 2 == 0) got = (fi < u_nand_a.data_q.size()) ? u_nand_a.data_q[fi] : 8'hxx;
        else            got = (fi < u_nand_b.data_q.size()) ? u_nand_b.data_q[fi] : 8'hxx;
        if (got != sent[idx]) errs++;
      end
      check(errs == 0, $sformatf("block %0d stored in package %s (%0d wrong bytes)", k, (k % 2) ? "B" : "A", errs));
    end
  endtask

  initial begin
    int stored_pages;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge rclk);
    gen_on = 1;
    repeat (10) @(posedge rclk);
    check(!recording && bytes_stored == 0, "nothing stored before the start trigger");

    // ---------------- phase 1: checked recording ----------------
    pulse_start();
    while (n_blocks_a + n_blocks_b < P1_BLOCKS) @(posedge clk);
    stop_rec();
    repeat (5) @(posedge rclk);
    check(!recording, "stop input ends recording");
    // wait for both packages to take every page of the moved blocks
    while (pages_a + pages_b < 32'(n_blocks_a + n_blocks_b)) @(posedge clk);
    repeat (100) @(posedge clk);
    check(!overflow, "no overflow at 95% valid words");
    check(u_nand_a.errors == 0 && u_nand_b.errors == 0, "NAND protocol respected");
    check(pages_a == 32'(n_blocks_a) && pages_b == 32'(n_blocks_b), "one page per block");
    check(n_blocks_a == (P1_BLOCKS + 1) / 2 && n_blocks_b == P1_BLOCKS / 2, "blocks alternate A, B");
    check(bytes_stored == sent.size(), $sformatf("valid byte count %0d vs %0d", bytes_stored, sent.size()));
    check(sent.size() - (n_blocks_a + n_blocks_b) * BLOCK_BYTES <= THRESHOLD_BYTES,
          "at most 4160 bytes stay in the primary buffer");
    compare_flash(n_blocks_a + n_blocks_b);

    // ---------------- phase 2: overflow ----------------
    hold = 1;
    valid_pct = 100;
    pulse_start();
    while (!overflow) @(posedge rclk);
    ovf_seen = 1;
    n_overflow++;
    check(n_stall > 0, "block move stalled on a full secondary buffer");
    hold = 0;

    // ---------------- phase 3: record until full ----------------
    if (RUN_TO_FULL) begin
      while (!flash_full) @(posedge clk);
      n_full++;
      repeat (10) @(posedge rclk);
      check(!recording, "full flash stops recording");
      stored_pages = int'(pages_a + pages_b);
      check(stored_pages == 2 * 2 * 2 * PPB * BP, $sformatf("all %0d pages written", stored_pages));
      repeat (30000) @(posedge clk);
      check(u_nand_a.errors == 0 && u_nand_b.errors == 0, "NAND protocol respected to the end");
    end else begin
      stop_rec();
    end

    // ---------------- every mechanism happened ----------------
    check(n_idle_words > 0, "idle words skipped");
    check(n_blocks_a > 0 && n_blocks_b > 0, "blocks to A and to B");
    check(n_stall > 0, "stalled block move");
    check(n_rb_wait > 0, "wait on R/B#");
    check(u_nand_a.overlap_count + u_nand_b.overlap_count > 0, "die loaded while the other programs");
    check(u_nand_a.dbsy_count > 0 && u_nand_a.programs > 0, "two-plane program");
    check(n_starts > 0 && n_stops > 0, "start trigger and stop input");
    check(n_overflow > 0, "overflow");
    if (RUN_TO_FULL) check(n_full > 0, "flash full");
    $display("mechanisms: idle=%0d blocksA=%0d blocksB=%0d stall=%0d rbwait=%0d overlapA=%0d overlapB=%0d programsA=%0d programsB=%0d overflow=%0d full=%0d",
             n_idle_words, n_blocks_a, n_blocks_b, n_stall, n_rb_wait, u_nand_a.overlap_count,
             u_nand_b.overlap_count, u_nand_a.programs, u_nand_b.programs, n_overflow, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
