// tb_storage_top_full: end-to-end test of the recorder with every
// parameter at its default (8 GByte of flash). It records 24 blocks of
// 4096 bytes (three full two-die, two-plane programming rounds per
// package), checks every stored byte, then forces an overflow. Filling
// 8 GByte is out of reach in simulation; tb_storage_top covers that.
module tb_storage_top_full;
  localparam int unsigned PPB = 128, BP = 2048, P1_BLOCKS = 24;
  localparam bit RUN_TO_FULL = 0;
  `include "storage_top_bench.svh"

  storage_top dut (.*);

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
