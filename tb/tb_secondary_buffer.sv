// tb_secondary_buffer: random pushes and pops against a reference queue.
// Checks the data order, count, full and empty flags, and that read data
// appears one clock after rd_en and then holds.
module tb_secondary_buffer;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] wdata = '0, rdata;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  byte unsigned ref_q[$];
  int fulls = 0, empties = 0;

  secondary_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned expd;
    bit did_rd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < 4000; i++) begin
      // bias: fill phases and drain phases
      int wp;
      wp = ((i / 300) % 2 == 0) ? 80 : 25;
      @(negedge clk);
      wr_en = !full && ($urandom_range(0, 99) < wp);
      rd_en = !empty && ($urandom_range(0, 99) < 50);
      wdata = 8'($urandom);
      did_rd = rd_en;
      if (did_rd) expd = ref_q.pop_front();
      if (wr_en) ref_q.push_back(wdata);
      @(posedge clk); #1;
      if (did_rd) check(rdata == expd, "read data in order");
      check(count == CW'(ref_q.size()), "count");
      check(full == (ref_q.size() == DEPTH), "full flag");
      check(empty == (ref_q.size() == 0), "empty flag");
      if (full) fulls++;
      if (empty) empties++;
      if (did_rd) begin
        @(negedge clk); rd_en = 0; wr_en = 0;
        @(posedge clk); #1;
        check(rdata == expd, "read data holds");
      end
    end
    check(fulls > 0, "buffer was full at least once");
    check(empties > 0, "buffer was empty at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
