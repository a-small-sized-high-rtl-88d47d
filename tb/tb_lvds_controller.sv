// tb_lvds_controller: drives random 10-bit words (data byte in d[9:2],
// flag in d[1:0], about one in four words idle) and keeps the RAM writes
// in a local array. Checks: the valid bytes end up at consecutive
// addresses in arrival order; inv_flag follows the flag one cycle later;
// the pointer only counts valid words; nothing is written while record_en
// is low; with a small buffer and the read pointer held, the controller
// stops at DEPTH bytes, sets overflow and resumes when the read pointer
// moves.
module tb_lvds_controller;
  import storage_pkg::*;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH), PW = AW + 1;

  logic rclk = 0, rst_n = 0, record_en = 0;
  logic [9:0] d = '0;
  logic [PW-1:0] rd_ptr_sync = '0, wr_ptr;
  logic ram_we, inv_flag, overflow;
  logic [AW-1:0] ram_waddr;
  logic [7:0] ram_wdata;
  logic [31:0] valid_count;
  int checks = 0, failures = 0;

  byte unsigned mem[DEPTH];
  byte unsigned exp_q[$];

  lvds_controller #(.DEPTH(DEPTH)) dut (.*);

  always #8 rclk = ~rclk;
  always @(posedge rclk) if (ram_we) mem[ram_waddr] <= ram_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one word after a rising edge; returns whether it was valid
  task automatic send(input bit valid);
    @(negedge rclk);
    d[9:2] = 8'($urandom);
    d[1:0] = valid ? 2'b00 : 2'(1 + $urandom_range(0, 2));
  endtask

  initial begin
    bit v, prev_v;
    logic [PW-1:0] p0;
    repeat (3) @(posedge rclk);
    rst_n = 1;
    // words while not recording: nothing may be stored
    repeat (10) begin send(1); @(posedge rclk); #1 check(!ram_we, "no write while idle"); end
    check(wr_ptr == 0, "pointer stays while idle");
    @(negedge rclk) d = 10'h3;
    // record random words, rd_ptr_sync follows so the buffer never fills
    @(negedge rclk) record_en = 1;
    @(posedge rclk);
    prev_v = 0;
    for (int i = 0; i < 400; i++) begin
      v = ($urandom_range(0, 3) != 0);
      send(v);
      if (v) exp_q.push_back(d[9:2]);
      @(posedge rclk); #1;
      check(inv_flag == v, "inv_flag follows flag one cycle later");
      // keep the buffer half empty
      if (PW'(wr_ptr - rd_ptr_sync) > PW'(32)) rd_ptr_sync = rd_ptr_sync + 8;
    end
    @(negedge rclk) d = 10'h3; // idle words from now on
    repeat (3) @(posedge rclk); #1;
    check(valid_count == exp_q.size(), "valid_count counts valid words");
    check(32'(wr_ptr) == (exp_q.size() % (2 * DEPTH)), "write pointer counts valid words");
    // the last DEPTH-32..: compare every byte not yet overwritten
    for (int k = exp_q.size() - 24; k < exp_q.size(); k++)
      check(mem[k % DEPTH] == exp_q[k], $sformatf("byte %0d stored in order", k));
    check(!overflow, "no overflow while drained");
    // hold the read pointer: fill to exactly DEPTH
    p0 = wr_ptr;
    for (int i = 0; i < int'(DEPTH); i++) begin send(1); exp_q.push_back(d[9:2]); end
    // at most DEPTH - (p0 - rd) more fit
    for (int i = 0; i < 4; i++) send(1);
    @(negedge rclk) d = 10'h3;
    repeat (3) @(posedge rclk); #1;
    check(PW'(wr_ptr - rd_ptr_sync) == PW'(DEPTH), "buffer stops at DEPTH");
    check(overflow, "overflow set when a valid byte is lost");
    // free space, data flows again, overflow stays set
    @(negedge rclk) rd_ptr_sync = wr_ptr - PW'(DEPTH / 2);
    p0 = wr_ptr;
    send(1); send(1); send(1);
    @(negedge rclk) d = 10'h3;
    repeat (3) @(posedge rclk); #1;
    check(wr_ptr == p0 + 3, "writes resume after space is freed");
    check(overflow, "overflow is sticky");
    // stop recording: valid words are ignored
    @(negedge rclk) record_en = 0;
    p0 = wr_ptr;
    repeat (5) send(1);
    repeat (3) @(posedge rclk); #1;
    check(wr_ptr == p0, "no writes after record_en falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
