// storing_trigger: decides when the recorder stores data. Recording starts
// on a rising edge of start_in and ends when stop_in is high (the master
// unit's stop command, or both flash packages full). Both inputs may come
// from outside the recovered-clock domain, so each passes through a
// two-flip-flop synchronizer clocked by the LVDS recovered clock first.
// record_en is registered: it rises three rclk cycles after start_in rises
// and falls three cycles after stop_in rises. Stop wins over a start seen
// in the same cycle. The design names this block only; the start-edge /
// stop-level behaviour and the synchronizers are this implementation's.
module storing_trigger (
  input  logic rclk,
  input  logic rst_n,
  input  logic start_in,
  input  logic stop_in,
  output logic record_en
);

  logic [1:0] start_sync, stop_sync;
  logic       start_prev;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      start_sync <= '0;
      stop_sync  <= '0;
      start_prev <= 1'b0;
      record_en  <= 1'b0;
    end else begin
      start_sync <= {start_sync[0], start_in};
      stop_sync  <= {stop_sync[0], stop_in};
      start_prev <= start_sync[1];
      if (stop_sync[1])                     record_en <= 1'b0;
      else if (start_sync[1] && !start_prev) record_en <= 1'b1;
    end
  end

endmodule
