// tb_zoro_buffer_check: self-checking test of the per-cycle buffer check.
// Random buffer contents (rows from a small set, retry counts 0..MAX_RETRIES,
// random occupancy) are classified by a model written as a priority search:
// the oldest entry whose retries reached MAX_RETRIES and that is outside the
// speculated row wins, otherwise the oldest entry in the row.
module tb_zoro_buffer_check;
  import zoro_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned MAXR  = 3;
  localparam int unsigned RET_W = $clog2(MAXR + 1);
  localparam int unsigned IDX_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  row_t             entry_row [DEPTH];
  logic [RET_W-1:0] entry_retries [DEPTH];
  logic [CNT_W-1:0] count;
  row_t             open_row;
  logic             open_valid;
  logic [DEPTH-1:0] in_row, aged, inc;
  logic             sel_valid, sel_aged;
  logic [IDX_W-1:0] sel_idx;
  int checks = 0, failures = 0;
  int n_aged = 0, n_row = 0, n_none = 0;

  zoro_buffer_check #(.DEPTH(DEPTH), .MAX_RETRIES(MAXR)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int exp_idx;
      logic exp_valid, exp_aged;
      count      = CNT_W'($urandom_range(0, DEPTH));
      open_valid = ($urandom_range(0, 9) != 0);
      open_row   = row_t'($urandom_range(0, 3));
      for (int i = 0; i < DEPTH; i++) begin
        entry_row[i]     = row_t'($urandom_range(0, 3));
        entry_retries[i] = RET_W'($urandom_range(0, MAXR));
      end
      #1;
      exp_valid = 0; exp_aged = 0; exp_idx = 0;
      for (int i = 0; i < int'(count); i++) begin
        if (open_valid && entry_row[i] != open_row && int'(entry_retries[i]) == MAXR) begin
          exp_valid = 1; exp_aged = 1; exp_idx = i;
          break;
        end
      end
      if (!exp_valid) begin
        for (int i = 0; i < int'(count); i++) begin
          if (!open_valid || entry_row[i] == open_row) begin
            exp_valid = 1; exp_idx = i;
            break;
          end
        end
      end
      for (int i = 0; i < DEPTH; i++) begin
        logic v, h;
        v = (i < int'(count));
        h = v && (!open_valid || entry_row[i] == open_row);
        check(in_row[i] == h, "in_row");
        check(aged[i] == (v && !h && int'(entry_retries[i]) == MAXR), "aged");
        check(inc[i] == (v && !h && int'(entry_retries[i]) < MAXR), "inc");
      end
      check(sel_valid == exp_valid, "sel_valid");
      if (exp_valid) begin
        check(sel_aged == exp_aged, "sel_aged");
        check(int'(sel_idx) == exp_idx, "sel_idx");
      end
      if (!exp_valid) n_none++;
      else if (exp_aged) n_aged++;
      else n_row++;
    end
    check(n_aged > 0 && n_row > 0 && n_none > 0, "all selection cases seen");
    $display("selections: aged=%0d row=%0d none=%0d", n_aged, n_row, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
