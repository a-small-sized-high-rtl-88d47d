// tb_storage_rate: sustained-rate workload on the recorder at its default
// sizes. The word source runs at the full 60 MHz word rate of the link;
// the NAND model takes 250 us per two-plane program (the slowest program
// time measured on the real chips).
//   run 1: 99% of the words are valid (59.4 MByte/s of data) for 1.5 MByte:
//          no byte may be lost and every full block must reach the flash
//          in order;
//   run 2: every word is valid (60 MByte/s): the flash side, at two times
//          30 MByte/s minus command overhead, falls slightly behind, so the
//          primary buffer must eventually overflow, but only after more than
//          1 MByte has been stored.
// The time and byte count at the overflow are printed.
module tb_storage_rate;
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

  int checks = 0, failures = 0;
  int valid_pct = 99;
  byte unsigned sent[$];
  int nblocks = 0;

  storage_top dut (.*);

  nand_flash_model #(.PAGE(PAGE_BYTES), .TPROG_CLKS(30000), .TDBSY_CLKS(60), .PGW(7))
    u_nand_a (.clk, .rst_n, .n(nand_a), .hold_busy(1'b0), .rb_n(rb_a_n));
  nand_flash_model #(.PAGE(PAGE_BYTES), .TPROG_CLKS(30000), .TDBSY_CLKS(60), .PGW(7))
    u_nand_b (.clk, .rst_n, .n(nand_b), .hold_busy(1'b0), .rb_n(rb_b_n));

  initial #1 rst_n = 0;
  always #8.333 rclk = ~rclk;
  always #4.1667 clk = ~clk;

  always @(negedge rclk) begin
    lvds_d[9:2] <= 8'($urandom);
    lvds_d[1:0] <= ($urandom_range(0, 99) < valid_pct) ? 2'b00 : 2'b11;
  end
  always @(posedge rclk) if (rst_n && recording && lvds_d[1:0] == 2'b00 && !overflow && valid_pct < 100)
    sent.push_back(lvds_d[9:2]);
  always @(posedge clk) if (rst_n && block_moved) nblocks++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs, na, nb;
    longint t0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge rclk);
    @(negedge rclk) start_in = 1;
    t0 = $time;
    // run 1
    while (bytes_stored < 1_500_000 && !overflow) @(posedge rclk);
    check(!overflow, "no loss at 99% valid words");
    $display("run 1: %0d bytes in %0d us, %0d blocks moved", bytes_stored, ($time - t0) / 1000, nblocks);
    // compare what has reached the flash so far
    na = u_nand_a.data_q.size() / BLOCK_BYTES;
    nb = u_nand_b.data_q.size() / BLOCK_BYTES;
    check(na > 150 && nb > 150, $sformatf("pages in both packages (%0d, %0d)", na, nb));
    errs = 0;
    for (int k = 0; k < na + nb && (k / 2) < ((k % 2) ? nb : na); k++)
      for (int i = 0; i < BLOCK_BYTES; i += 7) begin
        byte unsigned got;
        got = (k % 2) ? u_nand_b.data_q[(k / 2) * BLOCK_BYTES + i] : u_nand_a.data_q[(k / 2) * BLOCK_BYTES + i];
        if (got != sent[k * BLOCK_BYTES + i]) errs++;
      end
    check(errs == 0, $sformatf("stored stream matches (%0d wrong samples)", errs));
    check(u_nand_a.errors == 0 && u_nand_b.errors == 0, "NAND protocol respected");
    // run 2
    valid_pct = 100;
    t0 = $time;
    na = int'(bytes_stored);
    while (!overflow && (bytes_stored - na) < 6_000_000) @(posedge rclk);
    $display("run 2: overflow=%0b after %0d bytes, %0d us at 60 MByte/s", overflow,
             bytes_stored - na, ($time - t0) / 1000);
    check(overflow, "a stream of only valid words overflows eventually");
    check((bytes_stored - na) > 1_000_000, "but not before 1 MByte");
    check(u_nand_a.errors == 0 && u_nand_b.errors == 0, "NAND protocol respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
