// tb_buffer_controller: the primary buffer is a local array with a one-
// clock read, and the two secondary buffers are local queues whose
// counts go back to the controller. Checks: nothing moves while 4160 or
// fewer bytes wait; 4161 waiting bytes start a 4096-byte block that takes
// exactly 4097 clocks (120 MByte/s) and lands in A; the next block lands
// in B; bytes arrive in order; with A full the move stalls, never
// overfills A and completes as A drains.
module tb_buffer_controller;
  import storage_pkg::*;
  localparam int unsigned PW = $clog2(PRIMARY_BYTES) + 1;
  localparam int unsigned SCW = $clog2(SECONDARY_BYTES + 1);

  logic clk = 0, rst_n = 0;
  logic [PW-1:0] wr_ptr_sync = '0, rd_ptr;
  logic prim_rd_en, wr_en_a, wr_en_b, sel_b, busy, stall, block_done;
  logic [7:0] prim_rdata, sec_wdata;
  logic [SCW-1:0] count_a, count_b;
  int checks = 0, failures = 0;

  byte unsigned prim[PRIMARY_BYTES];
  byte unsigned qa[$], qb[$];
  int unsigned next_a = 0, next_b = 0;   // stream index of the next byte expected in A / B
  bit drain_a = 0;
  int stalls = 0, reads = 0;

  buffer_controller dut (.*);

  always #4 clk = ~clk;

  assign count_a = SCW'(qa.size());
  assign count_b = SCW'(qb.size());

  always @(posedge clk) if (rst_n) begin
    if (prim_rd_en) begin prim_rdata <= prim[rd_ptr[PW-2:0]]; reads++; end
    if (wr_en_a) qa.push_back(sec_wdata);
    if (wr_en_b) qb.push_back(sec_wdata);
    if (stall) stalls++;
    if (drain_a && ($time / 8) % 4 == 0 && qa.size() > 0) void'(qa.pop_front());
    if (qa.size() > SECONDARY_BYTES) begin failures++; $display("FAIL A overfilled"); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_done(output int cycles);
    int first;
    first = -1;
    cycles = 0;
    while (1) begin
      @(posedge clk); #1;
      if (first < 0 && busy) first = 0;
      if (first >= 0) cycles++;
      if (block_done) break;
    end
  endtask

  initial begin
    int cyc, r0;
    foreach (prim[i]) prim[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 4160 bytes waiting: no transfer
    @(negedge clk) wr_ptr_sync = PW'(4160);
    repeat (200) @(posedge clk);
    #1 check(reads == 0 && !busy, "no move at offset 4160");
    // 4161: move one block to A
    @(negedge clk) wr_ptr_sync = PW'(4161);
    r0 = reads;
    wait_done(cyc);
    // busy rises one clock before the first read; the last byte is written
    // BLOCK+1 clocks after the first read
    check(cyc == 4096 + 2, $sformatf("block move takes 4097 clocks after the first read (got %0d)", cyc - 1));
    check(reads - r0 == 4096, "4096 bytes read");
    check(qa.size() == 4096 && qb.size() == 0, $sformatf("block went to A (%0d, %0d)", qa.size(), qb.size()));
    for (int i = 0; i < 4096; i++) check(qa[i] == prim[i], $sformatf("A byte %0d", i));
    check(rd_ptr == PW'(4096), "read pointer advanced by 4096");
    repeat (20) @(posedge clk);
    #1 check(!busy && sel_b, "waits, B selected next");
    // next block to B
    @(negedge clk) wr_ptr_sync = PW'(4096 + 4161);
    wait_done(cyc);
    check(qb.size() == 4096 && qa.size() == 4096, "second block went to B");
    for (int i = 0; i < 4096; i++) check(qb[i] == prim[4096 + i], $sformatf("B byte %0d", i));
    // third block to A, which is still full: stall until it drains
    @(negedge clk) wr_ptr_sync = PW'(8192 + 4161);
    repeat (50) @(posedge clk);
    #1 check(stall && busy, "stalls on a full secondary buffer");
    check(qa.size() == 4096, "full buffer not written");
    drain_a = 1;
    wait_done(cyc);
    check(cyc > 3 * 4096, "stalled move paced by the drain");
    check(stalls > 0, "stall counted");
    // A now ends with the third block: the last 4096 bytes written
    for (int i = 0; i < 64; i++)
      check(qa[qa.size() - 64 + i] == prim[(8192 + 4096 - 64 + i) % 8192], $sformatf("A third block byte %0d", i));
    check(rd_ptr == PW'(3 * 4096), "read pointer after three blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
