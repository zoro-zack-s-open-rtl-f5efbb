// zoro_buffer: the ZORO buffer of held-back transactions.
//
// Holds up to DEPTH transactions that were not in the speculated row when they
// arrived, each with a retry counter that records how many buffer checks it
// has failed. Entries are kept packed in arrival order (entry 0 oldest): when
// one is removed, the younger ones move down one place, so "oldest" is simply
// "lowest index".
//
// Each cycle the buffer check (zoro_buffer_check) classifies the entries
// against the speculated row and offers one sendable entry on sel_*. The
// caller removes it by raising pop in the same cycle. At the clock edge:
//   - the popped entry leaves and younger entries shift down;
//   - every entry the check marked "neither in row nor aged" counts one retry
//     (counters stop at MAX_RETRIES);
//   - a pushed transaction is appended behind the others with zero retries.
// Push and pop may happen in the same cycle. push must not be raised while
// full is high. A new entry is first checked in the cycle after it is pushed,
// so an entry outside the speculated row becomes sendable MAX_RETRIES + 1
// cycles after it was pushed.
//
// The published scheme gives no buffer size; DEPTH = 16 is this design's choice.
// Holding entries in registers is this design's choice too: every entry is
// compared with the speculated row every cycle.
module zoro_buffer
  import zoro_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned MAX_RETRIES = 3,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1),
  localparam int unsigned RET_W = (MAX_RETRIES > 0) ? $clog2(MAX_RETRIES + 1) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  row_t             open_row,
  input  logic             open_valid,
  input  logic             push,
  input  txn_t             push_txn,
  input  logic             pop,        // remove entry sel_idx this cycle
  output logic             sel_valid,
  output logic [IDX_W-1:0] sel_idx,
  output logic             sel_aged,
  output txn_t             sel_txn,
  output logic [CNT_W-1:0] count,
  output logic             full
);

  txn_t             mem     [DEPTH];
  logic [RET_W-1:0] retries [DEPTH];
  row_t             rows    [DEPTH];
  logic [DEPTH-1:0] in_row, aged, inc;  // per-entry result of the check

  always_comb begin
    for (int i = 0; i < DEPTH; i++) rows[i] = row_of(mem[i].addr);
  end

  zoro_buffer_check #(
    .DEPTH      (DEPTH),
    .MAX_RETRIES(MAX_RETRIES)
  ) u_check (
    .entry_row    (rows),
    .entry_retries(retries),
    .count        (count),
    .open_row     (open_row),
    .open_valid   (open_valid),
    .in_row       (in_row),
    .aged         (aged),
    .inc          (inc),
    .sel_valid    (sel_valid),
    .sel_idx      (sel_idx),
    .sel_aged     (sel_aged)
  );

  assign sel_txn = mem[sel_idx];
  assign full    = (count == CNT_W'(DEPTH));

  // Next contents: drop the popped entry, count retries, append the push.
  txn_t             mem_n     [DEPTH];
  logic [RET_W-1:0] retries_n [DEPTH];
  logic [CNT_W-1:0] count_n;
  logic             do_pop;

  assign do_pop = pop && sel_valid;

  always_comb begin
    logic [CNT_W-1:0] kept;
    kept = count - CNT_W'(do_pop);
    for (int i = 0; i < DEPTH; i++) begin
      int src;
      src = (do_pop && i >= int'(sel_idx)) ? i + 1 : i;
      if (src < DEPTH) begin
        mem_n[i]     = mem[src];
        retries_n[i] = retries[src] + RET_W'(inc[src]);
      end else begin
        mem_n[i]     = mem[DEPTH-1];
        retries_n[i] = '0;
      end
      if (push && CNT_W'(i) == kept) begin
        mem_n[i]     = push_txn;
        retries_n[i] = '0;
      end
    end
    count_n = kept + CNT_W'(push);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem[i]     <= '0;
        retries[i] <= '0;
      end
    end else begin
      count <= count_n;
      for (int i = 0; i < DEPTH; i++) begin
        mem[i]     <= mem_n[i];
        retries[i] <= retries_n[i];
      end
    end
  end

  // A push into a full buffer would be lost unless an entry leaves at once.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || do_pop))
    else $error("zoro_buffer: push while full");

endmodule
