// tb_primary_buffer: writes a byte stream at 60 MHz and reads it back at
// 120 MHz, the way the LVDS and buffer controllers use the buffer. Checks
// that the write pointer arrives in the read domain within four read clocks
// and never runs ahead of the true pointer, that every byte reads back in
// order, and that the read pointer arrives in the write domain.
module tb_primary_buffer;
  import storage_pkg::*;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned AW = $clog2(DEPTH), PW = AW + 1;

  logic wclk = 0, clk = 0, wrst_n = 0, rst_n = 0;
  logic we = 0, rd_en = 0;
  logic [AW-1:0] waddr;
  logic [7:0] wdata = '0, rdata;
  logic [PW-1:0] wr_ptr = '0, rd_ptr = '0, rd_ptr_wsync, wr_ptr_rsync;
  int checks = 0, failures = 0;
  byte unsigned stream[$];
  int nread = 0;

  assign waddr = wr_ptr[AW-1:0];

  primary_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #8 wclk = ~wclk;
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: one byte on most wclk edges while there is room
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      we = ($urandom_range(0, 9) != 0) && (PW'(wr_ptr - rd_ptr_wsync) < PW'(DEPTH));
      wdata = 8'($urandom);
      if (we) stream.push_back(wdata);
      @(posedge wclk);
      if (we) wr_ptr <= wr_ptr + 1'b1;
    end
    @(negedge wclk) we = 0;
  end

  // the synchronized pointer must never be ahead of the real one, and
  // must catch up within a few clocks
  logic [PW-1:0] hist[6];
  always @(posedge clk) begin
    hist[0] <= wr_ptr;
    for (int i = 1; i < 6; i++) hist[i] <= hist[i-1];
    if (rst_n && wrst_n) begin
      checks++;
      if (PW'(wr_ptr - wr_ptr_rsync) > PW'(4)) begin
        failures++; $display("FAIL synchronized write pointer lags too far at %0t", $time);
      end
    end
  end

  // reader
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nread < 2600) begin
      @(negedge clk);
      rd_en = (wr_ptr_rsync != rd_ptr) && ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rd_en) begin
        rd_ptr <= rd_ptr + 1'b1;
        #1;
        check(rdata == stream[nread], $sformatf("byte %0d in order", nread));
        nread++;
      end
    end
    @(negedge clk) rd_en = 0;
    repeat (10) @(posedge wclk);
    check(rd_ptr_wsync == rd_ptr, "read pointer reaches write domain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
