// zoro: Open Row Oriented memory request scheduler (top level).
//
// Sits between the CPU side and a memory controller that schedules
// first-ready, first-come-first-served (FR-FCFS): a controller that serves
// requests to its currently open DRAM row first. The scheduler guesses that
// open row as the row of the last transaction it sent and lets through only
// transactions in that row. Others wait in a buffer. Every cycle the buffer is
// checked: an entry in the guessed row may leave; an entry in another row
// counts one retry and may leave once it has reached MAX_RETRIES. Sending a
// transaction from another row moves the guess to that row. The aim is to hand
// the controller runs of same-row requests, so that more accesses hit an open
// row and fewer rows are activated.
//
// Blocks: zoro_row_tracker (guessed row), zoro_buffer with its
// zoro_buffer_check (held transactions and their retry counters),
// zoro_txn_handler (new-transaction decision and the single output port).
//
// Interface: in_valid/in_ready/in_txn from the CPU side, out_valid/out_ready/
// out_txn to the memory controller, one transfer per cycle each way; out_kind
// says why a transaction was sent. A new transaction in the guessed row with
// an idle buffer passes in the same cycle (combinational path in -> out);
// a buffered one leaves at the earliest one cycle after it arrived, and one
// outside the guessed row at the earliest MAX_RETRIES + 1 cycles after.
// Reset: rst_n, active low, synchronous.
//
// The algorithm is the published one. Buffer size, one transfer per cycle,
// the port priority, the address-to-row mapping and the reset behaviour are
// this design's choices. MAX_RETRIES = 3 is the value the evaluation found
// best for DRAM activation energy; its sweep covered 1 to 15.
module zoro
  import zoro_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned MAX_RETRIES = 3,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  txn_t             in_txn,
  output logic             out_valid,
  input  logic             out_ready,
  output txn_t             out_txn,
  output send_kind_e       out_kind,
  output row_t             open_row,
  output logic             open_valid,
  output logic [CNT_W-1:0] buf_count
);

  logic             in_hit, upd_valid;
  row_t             upd_row;
  logic             buf_full, sel_valid, sel_aged, buf_push, buf_pop;
  txn_t             sel_txn;

  zoro_row_tracker u_row (
    .clk       (clk),
    .rst_n     (rst_n),
    .upd_valid (upd_valid),
    .upd_row   (upd_row),
    .in_row    (row_of(in_txn.addr)),
    .in_hit    (in_hit),
    .open_row  (open_row),
    .open_valid(open_valid)
  );

  zoro_buffer #(
    .DEPTH      (DEPTH),
    .MAX_RETRIES(MAX_RETRIES)
  ) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .open_row  (open_row),
    .open_valid(open_valid),
    .push      (buf_push),
    .push_txn  (in_txn),
    .pop       (buf_pop),
    .sel_valid (sel_valid),
    .sel_idx   (),
    .sel_aged  (sel_aged),
    .sel_txn   (sel_txn),
    .count     (buf_count),
    .full      (buf_full)
  );

  zoro_txn_handler u_handler (
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_txn      (in_txn),
    .in_hit      (in_hit),
    .buf_full    (buf_full),
    .sel_valid   (sel_valid),
    .sel_aged    (sel_aged),
    .sel_txn     (sel_txn),
    .buf_push    (buf_push),
    .buf_pop     (buf_pop),
    .out_valid   (out_valid),
    .out_ready   (out_ready),
    .out_txn     (out_txn),
    .out_kind    (out_kind),
    .upd_valid   (upd_valid),
    .upd_row     (upd_row)
  );

endmodule
