// tb_storing_trigger: checks the storing trigger. A start pulse must raise
// record_en exactly three rclk edges after the pulse is first sampled; a
// held start must not restart recording after a stop; stop must clear it
// three edges after it is sampled and must win over a start.
module tb_storing_trigger;
  logic rclk = 0, rst_n = 0, start_in = 0, stop_in = 0, record_en;
  int checks = 0, failures = 0;

  storing_trigger dut (.rclk, .rst_n, .start_in, .stop_in, .record_en);

  always #8 rclk = ~rclk;

  task automatic expect_rec(input logic v, input string what);
    checks++;
    if (record_en !== v) begin
      failures++;
      $display("FAIL %s: record_en=%0b expected %0b at %0t", what, record_en, v, $time);
    end
  endtask

  // wait n rising edges, then look just after the last one
  task automatic edges(input int n);
    repeat (n) @(posedge rclk);
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge rclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edges(2); rst_n = 1; edges(2);
    expect_rec(0, "idle after reset");
    // start pulse, changed away from the clock edge
    @(negedge rclk) start_in = 1;
    edges(2); expect_rec(0, "start +2");
    edges(1); expect_rec(1, "start +3");
    edges(5); expect_rec(1, "still recording with start held");
    @(negedge rclk) stop_in = 1;
    edges(2); expect_rec(1, "stop +2");
    edges(1); expect_rec(0, "stop +3");
    @(negedge rclk) stop_in = 0;
    edges(6); expect_rec(0, "held start does not restart");
    @(negedge rclk) start_in = 0;
    edges(4); expect_rec(0, "start released");
    // start and stop together: stop wins
    @(negedge rclk) begin start_in = 1; stop_in = 1; end
    edges(5); expect_rec(0, "stop beats start");
    @(negedge rclk) begin start_in = 0; stop_in = 0; end
    edges(4);
    // short one-cycle start pulse
    @(negedge rclk) start_in = 1;
    @(negedge rclk) start_in = 0;
    edges(3); expect_rec(1, "one-cycle pulse starts recording");
    // reset clears
    rst_n = 0; #1; expect_rec(0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
