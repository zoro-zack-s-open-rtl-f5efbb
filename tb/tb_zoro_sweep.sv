// tb_zoro_sweep: max-retries sweep of the scheduler in front of an FR-FCFS
// memory controller model.
//
// The same synthetic request trace is fed to a baseline path (straight into
// the controller model) and to four schedulers with MAX_RETRIES = 1, 3, 8 and
// 15, each with its own controller model. The trace interleaves NSTREAM
// sequential streams, each walking 64-byte blocks through its own region, so
// that consecutive requests often change row, as the many access streams of a
// CPU with caches do. Every path gets trace element i as its i-th request,
// whatever its back-pressure. Reported per path: row hits, activations and
// mean read latency. Checked per path: every request is served exactly once
// (count and a checksum of tags), hits plus activations equal requests, and a
// scheduler changes its guessed row only by sending an aged transaction.
module tb_zoro_sweep;
  import zoro_pkg::*;

  localparam int NREQ    = 6000;
  localparam int NSTREAM = 6;
  localparam int NPATH   = 5;           // 0 = baseline, 1..4 = schedulers
  localparam int MR [NPATH] = '{0, 1, 3, 8, 15};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Trace element i: a stream chosen by a hash of i, whose next block follows.
  int   stream_of [NREQ];
  int   block_of  [NREQ];
  logic wr_of     [NREQ];
  initial begin
    int pos [NSTREAM];
    int s;
    for (int k = 0; k < NSTREAM; k++) pos[k] = 0;
    for (int i = 0; i < NREQ; i++) begin
      s = int'(((i * 2654435761) >> 7) % NSTREAM);
      if ((i % 5) == 0) s = (i / 40) % NSTREAM;
      stream_of[i] = s;
      block_of[i]  = pos[s]++;
      wr_of[i]     = ((i * 7) % 3 == 0);
    end
  end

  function automatic txn_t trace(int i);
    txn_t t;
    // Each stream owns a 64 MB region; block b is b*64 bytes into it. The
    // regions differ only in row bits, so the streams compete for banks.
    t.addr     = addr_t'(stream_of[i]) * addr_t'(33'h4000000) + addr_t'(block_of[i]) * 64;
    t.is_write = wr_of[i];
    t.tag      = tag_t'(i);
    return t;
  endfunction

  // Per-path source and controller.
  logic   src_valid [NPATH];
  logic   src_ready [NPATH];
  txn_t   src_txn   [NPATH];
  logic   mc_valid  [NPATH];
  logic   mc_ready  [NPATH];
  txn_t   mc_txn    [NPATH];
  longint served [NPATH], hits [NPATH], acts [NPATH], reads [NPATH], lat [NPATH];
  int     idx [NPATH];
  longint tag_sum [NPATH];
  int     n_aged_sends [NPATH], n_bad_switch [NPATH];

  assign mc_valid[0]  = src_valid[0];
  assign mc_txn[0]    = src_txn[0];
  assign src_ready[0] = mc_ready[0];

  for (genvar p = 1; p < NPATH; p++) begin : g_sched
    send_kind_e kind;
    row_t       orow;
    logic       ovalid;
    logic [4:0] cnt;
    zoro #(.MAX_RETRIES(MR[p])) u_zoro (
      .clk(clk), .rst_n(rst_n),
      .in_valid(src_valid[p]), .in_ready(src_ready[p]), .in_txn(src_txn[p]),
      .out_valid(mc_valid[p]), .out_ready(mc_ready[p]), .out_txn(mc_txn[p]),
      .out_kind(kind), .open_row(orow), .open_valid(ovalid), .buf_count(cnt)
    );
    always @(posedge clk) if (rst_n && mc_valid[p] && mc_ready[p]) begin
      if (kind == SEND_AGED) n_aged_sends[p]++;
      if (ovalid && row_of(mc_txn[p].addr) != orow && kind != SEND_AGED) n_bad_switch[p]++;
    end
  end

  for (genvar p = 0; p < NPATH; p++) begin : g_mc
    fr_fcfs_mc_model u_mc (
      .clk(clk), .rst_n(rst_n),
      .in_valid(mc_valid[p]), .in_ready(mc_ready[p]), .in_txn(mc_txn[p]),
      .n_served(served[p]), .n_hits(hits[p]), .n_acts(acts[p]),
      .n_reads(reads[p]), .read_lat_sum(lat[p])
    );
    assign src_valid[p] = rst_n && (idx[p] < NREQ);
    assign src_txn[p]   = trace(idx[p] < NREQ ? idx[p] : 0);
    always @(posedge clk) begin
      if (!rst_n) begin
        idx[p] <= 0;
      end else if (src_valid[p] && src_ready[p]) begin
        idx[p] <= idx[p] + 1;
      end
      if (rst_n && mc_valid[p] && mc_ready[p]) tag_sum[p] += longint'(mc_txn[p].tag);
    end
  end

  initial begin
    longint exp_sum;
    logic   done;
    for (int p = 0; p < NPATH; p++) begin
      tag_sum[p] = 0; n_aged_sends[p] = 0; n_bad_switch[p] = 0;
    end
    exp_sum = 0;
    for (int i = 0; i < NREQ; i++) exp_sum += longint'(int'(i % 256));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int p = 0; p < NPATH; p++) if (served[p] < longint'(NREQ)) done = 0;
    end
    repeat (5) @(posedge clk);
    $display("path        max_retries  row_hits  activations  hit_rate  mean_read_latency");
    for (int p = 0; p < NPATH; p++) begin
      $display("%-10s  %11s  %8d  %11d  %7.4f  %17.2f", p == 0 ? "baseline" : "zoro",
               p == 0 ? "-" : $sformatf("%0d", MR[p]), hits[p], acts[p],
               real'(hits[p]) / real'(served[p]), real'(lat[p]) / real'(reads[p]));
      check(served[p] == longint'(NREQ), "all requests served once");
      check(tag_sum[p] == exp_sum, "tag checksum");
      check(hits[p] + acts[p] == served[p], "hits + activations = requests");
      if (p > 0) begin
        check(n_bad_switch[p] == 0, "row guess changes only on an aged send");
        check(n_aged_sends[p] > 0, "aged sends happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
