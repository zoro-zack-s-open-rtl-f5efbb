// tb_zoro_buffer: self-checking test of the ZORO buffer.
// Random pushes (rows from a small set) and pops of the offered entry, with
// the speculated row changing now and then, against a queue model that keeps
// each entry's retry count. Checks the offered entry, the occupancy, the full
// flag, and that an entry outside the row becomes sendable exactly
// MAX_RETRIES + 1 cycles after it was pushed.
module tb_zoro_buffer;
  import zoro_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned MAXR  = 3;
  localparam int unsigned IDX_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  row_t open_row;
  logic open_valid;
  logic push, pop;
  txn_t push_txn, sel_txn;
  logic sel_valid, sel_aged, full;
  logic [IDX_W-1:0] sel_idx;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;

  zoro_buffer #(.DEPTH(DEPTH), .MAX_RETRIES(MAXR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  typedef struct { txn_t t; int r; } ent_t;
  ent_t q[$];
  int   n_aged = 0, n_row = 0, n_full = 0, n_both = 0;

  function automatic txn_t mk(int row, int tag);
    txn_t t;
    t.addr     = addr_t'(row) << ROW_LSB | addr_t'($urandom_range(0, 8191));
    t.is_write = 1'($urandom_range(0, 1));
    t.tag      = tag_t'(tag);
    return t;
  endfunction

  function automatic logic hit(txn_t t);
    return !open_valid || row_of(t.addr) == open_row;
  endfunction

  initial begin
    automatic int tag = 0;
    push = 0; pop = 0; push_txn = '0; open_row = '0; open_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Directed: one entry outside the row waits exactly MAXR+1 cycles.
    open_valid = 1; open_row = row_t'(1);
    push = 1; push_txn = mk(2, 200);
    @(negedge clk) push = 0;
    for (int c = 1; c <= int'(MAXR) + 1; c++) begin
      #1;
      check(sel_valid == (c == int'(MAXR) + 1), "aging latency");
      if (c <= int'(MAXR)) @(negedge clk);
    end
    check(sel_aged && sel_txn.tag == 200, "aged entry offered");
    pop = 1;
    @(negedge clk) pop = 0;
    #1 check(count == 0, "empty after pop");

    // Random traffic.
    for (int c = 0; c < 6000; c++) begin
      int ai, ri, exp_i;
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) open_row = row_t'($urandom_range(0, 3));
      push     = !full && ($urandom_range(0, 2) != 0);
      push_txn = mk($urandom_range(0, 3), tag);
      pop      = ($urandom_range(0, 2) == 0);
      #1;
      ai = -1; ri = -1;
      foreach (q[i]) begin
        if (ai < 0 && !hit(q[i].t) && q[i].r >= int'(MAXR)) ai = i;
        if (ri < 0 && hit(q[i].t)) ri = i;
      end
      exp_i = (ai >= 0) ? ai : ri;
      check(int'(count) == q.size(), "count");
      check(full == (q.size() == DEPTH), "full");
      check(sel_valid == (exp_i >= 0), "sel_valid");
      if (exp_i >= 0) begin
        check(int'(sel_idx) == exp_i, "sel_idx");
        check(sel_txn == q[exp_i].t, "sel_txn");
        check(sel_aged == (ai >= 0), "sel_aged");
      end
      if (full) n_full++;
      @(posedge clk);
      foreach (q[i]) if (!hit(q[i].t) && q[i].r < int'(MAXR)) q[i].r++;
      if (pop && exp_i >= 0) begin
        if (ai >= 0) n_aged++; else n_row++;
        if (push) n_both++;
        q.delete(exp_i);
      end
      if (push) begin
        q.push_back('{t: push_txn, r: 0});
        tag++;
      end
    end
    $display("pops: aged=%0d row=%0d, full cycles=%0d, push+pop=%0d", n_aged, n_row, n_full, n_both);
    check(n_aged > 0 && n_row > 0 && n_full > 0 && n_both > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
