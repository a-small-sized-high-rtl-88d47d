// nand_flash_model: behavioural model of one NAND flash package with two
// dies (one chip enable and one R/B# line each), for testbenches only. It
// understands the write side of two-plane page program: 80h, five address
// cycles, PAGE data bytes, 11h (short busy), 81h, five address cycles, PAGE
// data bytes, 10h (program busy, TPROG_CLKS clocks of clk). Bytes are
// latched on the rising edge of WE# while the die's CE# is low, as seen at
// the clk edges. Every data byte is appended to data_q in arrival order and
// every programmed row to row_q. Protocol violations (a cycle while the
// die is busy, a wrong byte count, a command out of order, plane bits that
// do not match the command) are counted in errors. hold_busy keeps both
// dies busy, so that a testbench can back the data up into the buffers.
module nand_flash_model
  import storage_pkg::*;
#(
  parameter int unsigned PAGE       = 4096,
  parameter int unsigned TPROG_CLKS = 24000,  // 200 us at 120 MHz
  parameter int unsigned TDBSY_CLKS = 60,     // 0.5 us at 120 MHz
  parameter int unsigned PGW        = 7       // page bits in the row address
) (
  input  logic       clk,
  input  logic       rst_n,      // strobes are ignored while low
  input  nand_out_t  n,
  input  logic       hold_busy,
  output logic [1:0] rb_n
);

  byte unsigned data_q[$];
  int unsigned  row_q[$];
  int           errors = 0;
  int           programs = 0;      // 10h commands (two-plane programs)
  int           dbsy_count = 0;    // 11h commands
  int           overlap_count = 0; // data bytes loaded while the other die programs

  int unsigned  busy_cnt [2] = '{0, 0};
  int unsigned  addr_n   [2] = '{0, 0};
  int unsigned  data_n   [2] = '{0, 0};
  int unsigned  row_cur  [2] = '{0, 0};
  int unsigned  row_p0   [2] = '{0, 0};
  int unsigned  phase    [2] = '{0, 0};  // 0 idle, 1 plane0 input, 2 after 11h, 3 plane1 input
  logic         we_prev = 1'b1;

  always_comb begin
    for (int i = 0; i < 2; i++) rb_n[i] = (busy_cnt[i] == 0) && !hold_busy;
  end

  function automatic void err(input string what);
    errors++;
    $display("NAND model %m: %s at %0t", what, $time);
  endfunction

  task automatic cmd(input int d, input byte unsigned c);
    unique case (c)
      8'h80: begin
        if (phase[d] != 0) err("80h while a program sequence is open");
        phase[d] = 1; addr_n[d] = 0; data_n[d] = 0; row_cur[d] = 0;
      end
      8'h11: begin
        if (phase[d] != 1 || data_n[d] != PAGE || addr_n[d] != 5) err("11h out of order or wrong byte count");
        if (((row_cur[d] >> PGW) & 1) != 0) err("plane bit set on a first-plane page");  // plane 0 expected
        row_p0[d] = row_cur[d];
        row_q.push_back(row_cur[d]);
        phase[d] = 2; busy_cnt[d] = TDBSY_CLKS; dbsy_count++;
      end
      8'h81: begin
        if (phase[d] != 2) err("81h without a preceding 11h");
        phase[d] = 3; addr_n[d] = 0; data_n[d] = 0; row_cur[d] = 0;
      end
      8'h10: begin
        if (phase[d] != 3 || data_n[d] != PAGE || addr_n[d] != 5) err("10h out of order or wrong byte count");
        if (row_cur[d] != (row_p0[d] | (1 << PGW))) err("second-plane row does not match the first");   // same page, plane 1
        row_q.push_back(row_cur[d]);
        phase[d] = 0; busy_cnt[d] = TPROG_CLKS; programs++;
      end
      default: err("unknown command");
    endcase
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < 2; i++) if (busy_cnt[i] != 0) busy_cnt[i] = busy_cnt[i] - 1;
    if (rst_n && !we_prev && n.we_n) begin
      for (int d = 0; d < 2; d++) begin
        if (!n.ce_n[d]) begin
          if (busy_cnt[d] != 0 || hold_busy) err("cycle while the die is busy");
          if (n.cle && !n.ale) cmd(d, n.io);
          else if (n.ale && !n.cle) begin
            if (addr_n[d] >= 2) row_cur[d] |= int'(n.io) << (8 * (addr_n[d] - 2));
            else if (n.io != 0) err("non-zero column address");   // column address 0
            addr_n[d]++;
          end else if (!n.ale && !n.cle) begin
            if (!(phase[d] == 1 || phase[d] == 3) || addr_n[d] != 5) err("data outside a data phase");
            data_q.push_back(n.io);
            if (busy_cnt[1-d] > TDBSY_CLKS) overlap_count++;
            data_n[d]++;
          end else err("CLE and ALE both high");
        end
      end
      if (n.ce_n == 2'b11) err("WE# strobe with no die selected");
    end
    we_prev = n.we_n;
  end

endmodule
