// zoro_buffer_check: the per-cycle check over the ZORO buffer.
//
// Every clock cycle each buffered transaction goes through the same decision:
//   - in the speculated row            -> may be sent;
//   - else, retries reached max        -> may be sent anyway (aged);
//   - else                             -> retry counter increments, not sent.
// The memory controller takes one transaction per cycle, so of the sendable
// entries one is chosen: the oldest aged entry first, else the oldest entry in
// the speculated row. Aged entries go first so that the retry limit bounds how
// long a transaction from another row can be held back. The decision itself
// follows the scheduler's flowchart; one send per cycle and this priority are
// this design's choices.
//
// Entry 0 is the oldest; entries 0..count-1 are valid (the buffer keeps them
// packed in arrival order). Purely combinational.
module zoro_buffer_check
  import zoro_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned MAX_RETRIES = 3,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1),
  localparam int unsigned RET_W = (MAX_RETRIES > 0) ? $clog2(MAX_RETRIES + 1) : 1
) (
  input  row_t               entry_row     [DEPTH],
  input  logic [RET_W-1:0]   entry_retries [DEPTH],
  input  logic [CNT_W-1:0]   count,        // number of valid entries
  input  row_t               open_row,
  input  logic               open_valid,
  output logic [DEPTH-1:0]   in_row,       // valid and in the speculated row
  output logic [DEPTH-1:0]   aged,         // valid, not in row, retries >= max
  output logic [DEPTH-1:0]   inc,          // valid, not in row, below max
  output logic               sel_valid,    // something can be sent
  output logic [IDX_W-1:0]   sel_idx,      // which entry
  output logic               sel_aged      // it is sent because it aged
);

  logic [DEPTH-1:0] valid;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      valid[i]  = (i < count);
      in_row[i] = valid[i] && (!open_valid || entry_row[i] == open_row);
      aged[i]   = valid[i] && !in_row[i] && (entry_retries[i] >= RET_W'(MAX_RETRIES));
      inc[i]    = valid[i] && !in_row[i] && !aged[i];
    end
  end

  // Oldest aged entry first, then oldest in-row entry.
  always_comb begin
    logic found_aged, found_row;
    logic [IDX_W-1:0] idx_aged, idx_row;
    found_aged = 1'b0;
    found_row  = 1'b0;
    idx_aged   = '0;
    idx_row    = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (aged[i]) begin
        found_aged = 1'b1;
        idx_aged   = IDX_W'(i);
      end
      if (in_row[i]) begin
        found_row = 1'b1;
        idx_row   = IDX_W'(i);
      end
    end
    sel_valid = found_aged || found_row;
    sel_aged  = found_aged;
    sel_idx   = found_aged ? idx_aged : idx_row;
  end

endmodule
