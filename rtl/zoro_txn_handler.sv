// zoro_txn_handler: the new-transaction handler and the output port.
//
// A new transaction from the CPU side is sent straight to the memory
// controller when it lies in the speculated open row, and is added to the ZORO
// buffer otherwise; the buffer check then runs as on every cycle. This is the
// scheduler's flowchart for a new transaction.
//
// The memory controller accepts one transaction per cycle, so this block also
// decides who uses the port. A transaction offered by the buffer check goes
// first (it is older, and sending it first keeps requests to one address in
// order); an in-row new transaction goes straight out only when the buffer has
// nothing to send. A new transaction that cannot go straight out (not in the
// row, port taken, or out_ready low) is pushed into the buffer. The port
// priority is this design's choice.
//
// Handshakes: in_valid/in_ready and out_valid/out_ready; a transfer happens in
// a cycle where both are high. in_ready is high whenever the buffer has a free
// entry and does not depend on out_ready. What out_* offers may change from
// one cycle to the next while out_ready is low. Purely combinational; out_valid
// depends combinationally on in_valid (the bypass path has no register).
module zoro_txn_handler
  import zoro_pkg::*;
(
  // new transaction
  input  logic       in_valid,
  output logic       in_ready,
  input  txn_t       in_txn,
  input  logic       in_hit,      // in_txn is in the speculated row
  // buffer
  input  logic       buf_full,
  input  logic       sel_valid,   // buffer check offers an entry
  input  logic       sel_aged,
  input  txn_t       sel_txn,
  output logic       buf_push,    // buffer takes in_txn
  output logic       buf_pop,
  // memory controller
  output logic       out_valid,
  input  logic       out_ready,
  output txn_t       out_txn,
  output send_kind_e out_kind,
  // speculated row update
  output logic       upd_valid,
  output row_t       upd_row
);

  logic in_fire, bypass;

  assign in_ready = !buf_full;
  assign in_fire  = in_valid && in_ready;
  assign bypass   = in_fire && in_hit && !sel_valid;

  always_comb begin
    out_valid = sel_valid || bypass;
    if (sel_valid) begin
      out_txn  = sel_txn;
      out_kind = sel_aged ? SEND_AGED : SEND_ROWHIT;
    end else begin
      out_txn  = in_txn;
      out_kind = SEND_BYPASS;
    end
  end

  assign buf_pop  = sel_valid && out_ready;
  assign buf_push = in_fire && !(bypass && out_ready);

  assign upd_valid = out_valid && out_ready;
  assign upd_row   = row_of(out_txn.addr);

endmodule
