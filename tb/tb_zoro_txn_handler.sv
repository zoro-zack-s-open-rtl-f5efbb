// tb_zoro_txn_handler: self-checking test of the new-transaction handler.
// Every combination of its control inputs is applied with random payloads and
// the outputs are compared with the decision table: a buffered candidate owns
// the port; otherwise an in-row new transaction bypasses; a new transaction
// that does not leave this cycle is pushed; the speculated row follows
// whatever is sent.
module tb_zoro_txn_handler;
  import zoro_pkg::*;

  logic       in_valid, in_ready, in_hit, buf_full, sel_valid, sel_aged;
  logic       buf_push, buf_pop, out_valid, out_ready, upd_valid;
  txn_t       in_txn, sel_txn, out_txn;
  send_kind_e out_kind;
  row_t       upd_row;
  int checks = 0, failures = 0;

  zoro_txn_handler dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int v = 0; v < 64; v++) begin
        logic e_acc, e_byp, e_ov, e_push, e_pop;
        txn_t e_txn;
        {in_valid, in_hit, buf_full, sel_valid, sel_aged, out_ready} = 6'(v);
        in_txn  = txn_t'({$urandom, $urandom});
        sel_txn = txn_t'({$urandom, $urandom});
        #1;
        e_acc  = in_valid && !buf_full;
        e_byp  = e_acc && in_hit && !sel_valid;
        e_ov   = sel_valid || e_byp;
        e_txn  = sel_valid ? sel_txn : in_txn;
        e_pop  = sel_valid && out_ready;
        e_push = e_acc && !(e_byp && out_ready);
        check(in_ready == !buf_full, "in_ready");
        check(out_valid == e_ov, "out_valid");
        if (e_ov) begin
          check(out_txn == e_txn, "out_txn");
          check(out_kind == (sel_valid ? (sel_aged ? SEND_AGED : SEND_ROWHIT) : SEND_BYPASS),
                "out_kind");
        end
        check(buf_pop == e_pop, "buf_pop");
        check(buf_push == e_push, "buf_push");
        check(upd_valid == (e_ov && out_ready), "upd_valid");
        if (upd_valid) check(upd_row == e_txn.addr[ROW_LSB +: ROW_W], "upd_row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
