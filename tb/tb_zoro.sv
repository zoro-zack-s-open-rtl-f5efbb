// tb_zoro: end-to-end test of the ZORO scheduler at its default parameters.
//
// A cycle-level reference model (a queue of waiting transactions with their
// retry counts, plus the guessed open row) predicts in_ready, out_valid,
// out_txn and out_kind every cycle; the DUT must match exactly, so order,
// latency and the aging limit are all checked. The test starts with directed
// steps (first transaction after reset, aging latency of MAX_RETRIES + 1
// cycles, in-row bypass in the same cycle) and then runs random traffic over
// a few rows with phases of memory-controller back-pressure long enough to
// fill the buffer. Every mechanism is counted and must occur at least once:
// bypass, buffered row hit, aged send, retry count, row switch, buffer-full
// stall, back-pressure, and an in-row transaction buffered because the port
// was taken. At the end the buffer is drained and every accepted transaction
// must have left exactly once.
module tb_zoro;
  import zoro_pkg::*;

  localparam int unsigned DEPTH = 16;  // the DUT's defaults, not overridden
  localparam int unsigned MAXR  = 3;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, in_ready, out_valid, out_ready, open_valid;
  txn_t       in_txn, out_txn;
  send_kind_e out_kind;
  row_t       open_row;
  logic [$clog2(DEPTH+1)-1:0] buf_count;
  int checks = 0, failures = 0;

  zoro dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  typedef struct { txn_t t; int r; } ent_t;
  ent_t m_q[$];
  row_t m_row;
  logic m_rv;

  // mechanism counters
  int n_bypass = 0, n_rowhit = 0, n_aged = 0, n_retry = 0, n_switch = 0;
  int n_full = 0, n_backp = 0, n_blocked = 0;
  int n_in = 0, n_out = 0;
  int sent_tags[int];

  function automatic logic m_hit(txn_t t);
    return !m_rv || row_of(t.addr) == m_row;
  endfunction

  // Evaluate one cycle: compare with the DUT, then advance the model at the
  // clock edge. Inputs must already be driven.
  task automatic step();
    int ai, ri, ci;
    logic e_ready, e_ov, e_byp, e_acc, fire;
    txn_t e_txn;
    send_kind_e e_kind;
    #1;
    ai = -1; ri = -1;
    foreach (m_q[i]) begin
      if (ai < 0 && !m_hit(m_q[i].t) && m_q[i].r >= int'(MAXR)) ai = i;
      if (ri < 0 && m_hit(m_q[i].t)) ri = i;
    end
    ci      = (ai >= 0) ? ai : ri;
    e_ready = m_q.size() < DEPTH;
    e_acc   = in_valid && e_ready;
    e_byp   = (ci < 0) && e_acc && m_hit(in_txn);
    e_ov    = (ci >= 0) || e_byp;
    e_txn   = (ci >= 0) ? m_q[ci].t : in_txn;
    e_kind  = (ai >= 0) ? SEND_AGED : (ci >= 0) ? SEND_ROWHIT : SEND_BYPASS;
    check(in_ready == e_ready, "in_ready");
    check(out_valid == e_ov, "out_valid");
    if (e_ov) begin
      check(out_txn == e_txn, "out_txn");
      check(out_kind == e_kind, "out_kind");
    end
    check(int'(buf_count) == m_q.size(), "buf_count");
    fire = e_ov && out_ready;
    if (in_valid && !e_ready) n_full++;
    if (e_ov && !out_ready) n_backp++;
    if (e_acc && m_hit(in_txn) && !e_byp) n_blocked++;
    @(posedge clk);
    foreach (m_q[i]) if (!m_hit(m_q[i].t) && m_q[i].r < int'(MAXR)) begin
      m_q[i].r++;
      n_retry++;
    end
    if (fire) begin
      if (m_rv && row_of(e_txn.addr) != m_row) n_switch++;
      m_rv  = 1;
      m_row = row_of(e_txn.addr);
      case (e_kind)
        SEND_BYPASS: n_bypass++;
        SEND_ROWHIT: n_rowhit++;
        default:     n_aged++;
      endcase
      if (sent_tags.exists(int'(e_txn.tag))) sent_tags[int'(e_txn.tag)]++;
      else sent_tags[int'(e_txn.tag)] = 1;
      n_out++;
      if (ci >= 0) m_q.delete(ci);
    end
    if (e_acc) begin
      n_in++;
      if (!(e_byp && out_ready)) m_q.push_back('{t: in_txn, r: 0});
    end
  endtask

  int tag = 0;
  function automatic txn_t mk(int row);
    txn_t t;
    t.addr     = (addr_t'(row) << ROW_LSB) | addr_t'($urandom_range(0, 8191));
    t.is_write = 1'($urandom_range(0, 1));
    t.tag      = tag_t'(tag);
    tag        = (tag + 1) % 256;
    return t;
  endfunction

  int rows[4] = '{5, 77, 1234, 65535 * 16 + 3};

  initial begin
    int wait_c;
    in_valid = 0; in_txn = '0; out_ready = 1;
    m_rv = 0; m_row = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. First transaction after reset passes in the same cycle.
    in_valid = 1; in_txn = mk(rows[0]);
    #1 check(out_valid && out_txn == in_txn && out_kind == SEND_BYPASS, "first passes");
    step();
    @(negedge clk) in_valid = 0;
    // 2. A transaction in another row waits MAX_RETRIES + 1 cycles.
    in_valid = 1; in_txn = mk(rows[1]);
    step();
    @(negedge clk) in_valid = 0;
    wait_c = 1;
    while (!out_valid && wait_c < 50) begin
      step();
      @(negedge clk);
      wait_c++;
    end
    #1 check(wait_c == int'(MAXR) + 1 && out_kind == SEND_AGED, "aging latency");
    $display("aged transaction left %0d cycles after it was accepted", wait_c);
    step();
    // 3. The guess moved to that row: a new transaction there bypasses.
    @(negedge clk) in_valid = 1; in_txn = mk(rows[1]);
    #1 check(out_valid && out_kind == SEND_BYPASS && out_txn == in_txn, "bypass after switch");
    step();

    // 4. Random traffic with back-pressure phases.
    for (int c = 0; c < 40000; c++) begin
      int phase;
      phase = (c / 500) % 4;
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      // Locality: mostly the last row, sometimes another one.
      in_txn    = mk(rows[($urandom_range(0, 4) == 0) ? $urandom_range(0, 3) : (c / 37) % 4]);
      out_ready = (phase == 3) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
      step();
    end

    // 5. Drain.
    @(negedge clk) in_valid = 0; out_ready = 1;
    for (int c = 0; c < 200 && m_q.size() > 0; c++) begin
      step();
      @(negedge clk);
    end
    check(m_q.size() == 0 && buf_count == 0, "drained");
    check(n_in == n_out, "every accepted transaction left");

    $display("accepted=%0d sent=%0d bypass=%0d rowhit=%0d aged=%0d", n_in, n_out,
             n_bypass, n_rowhit, n_aged);
    $display("retries=%0d row_switches=%0d full_stalls=%0d backpressure=%0d in_row_but_buffered=%0d",
             n_retry, n_switch, n_full, n_backp, n_blocked);
    check(n_bypass > 0,  "bypass happened");
    check(n_rowhit > 0,  "buffered row hit happened");
    check(n_aged > 0,    "aged send happened");
    check(n_retry > 0,   "retry counting happened");
    check(n_switch > 0,  "row switch happened");
    check(n_full > 0,    "buffer-full stall happened");
    check(n_backp > 0,   "back-pressure happened");
    check(n_blocked > 0, "in-row transaction buffered behind port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
