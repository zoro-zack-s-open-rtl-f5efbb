// tb_zoro_row_tracker: self-checking test of the speculated-row register.
// Drives random updates and incoming rows drawn from a small set (so that hits
// and misses both occur) and compares in_hit, open_row and open_valid with a
// model: after reset no row is known and everything hits; afterwards the row
// of the last update is held.
module tb_zoro_row_tracker;
  import zoro_pkg::*;

  logic clk = 0, rst_n = 0;
  logic upd_valid;
  row_t upd_row, in_row, open_row;
  logic in_hit, open_valid;
  int checks = 0, failures = 0;

  zoro_row_tracker dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  row_t m_row;
  logic m_valid;
  int   n_hit = 0, n_miss = 0;

  initial begin
    upd_valid = 0; upd_row = '0; in_row = '0;
    m_valid = 0; m_row = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Before any update everything counts as in the row.
    in_row = 20'h12345;
    #1 check(in_hit && !open_valid, "hit with no row recorded");
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      upd_valid = ($urandom_range(0, 3) == 0);
      upd_row   = row_t'($urandom_range(0, 3) * 20'h01111);
      in_row    = row_t'($urandom_range(0, 3) * 20'h01111);
      #1;
      check(open_valid == m_valid, "open_valid");
      if (m_valid) check(open_row == m_row, "open_row");
      check(in_hit == (!m_valid || in_row == m_row), "in_hit");
      if (m_valid && in_hit) n_hit++;
      if (!in_hit) n_miss++;
      @(posedge clk);
      if (upd_valid) begin
        m_valid = 1;
        m_row   = upd_row;
      end
    end
    check(n_hit > 0 && n_miss > 0, "both hits and misses seen");
    // Reset clears the recorded row.
    @(negedge clk) rst_n = 0; upd_valid = 0;
    @(negedge clk) rst_n = 1;
    #1 check(!open_valid, "reset clears row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
