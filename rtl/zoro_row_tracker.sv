// zoro_row_tracker: the speculated open row.
//
// The scheduler cannot see which row the memory controller has open, so it
// assumes the row of the last transaction it sent is still open. This block
// holds that row. Whenever a transaction is sent (upd_valid), the register
// takes that transaction's row on the next clock edge; sending a transaction
// from another row is what moves the speculation on to the new row.
//
// It also answers, combinationally, whether the incoming transaction lies in
// the speculated row (in_hit). Until the first transaction has been sent no
// row is known (open_valid low); every transaction then counts as in the row,
// so the first one after reset goes straight through instead of waiting out
// its retries. That reset behaviour is this design's choice.
//
// Timing: one register, updated on the rising edge; in_hit is combinational
// from in_row and the register. Reset is active-low and synchronous.
module zoro_row_tracker
  import zoro_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic upd_valid,   // a transaction is being sent this cycle
  input  row_t upd_row,     // its row
  input  row_t in_row,      // row of the incoming transaction
  output logic in_hit,      // incoming transaction is in the speculated row
  output row_t open_row,    // speculated open row
  output logic open_valid   // a row has been recorded since reset
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      open_valid <= 1'b0;
      open_row   <= '0;
    end else if (upd_valid) begin
      open_valid <= 1'b1;
      open_row   <= upd_row;
    end
  end

  assign in_hit = !open_valid || (in_row == open_row);

endmodule
