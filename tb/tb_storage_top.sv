// tb_storage_top: end-to-end test of the recorder with a small flash
// geometry (2 pages per block, 2 block pairs: 16 pages, 64 KByte per
// package) so that it can record until both packages are full. Buffers,
// thresholds and rates are at their full sizes. See storage_top_bench.svh
// for the phases and checks.
module tb_storage_top;
  localparam int unsigned PPB = 2, BP = 2, P1_BLOCKS = 8;
  localparam bit RUN_TO_FULL = 1;
  `include "storage_top_bench.svh"

  storage_top #(.PAGES_PER_BLOCK(PPB), .BLOCK_PAIRS(BP)) dut (.*);

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
