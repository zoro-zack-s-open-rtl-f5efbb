// fr_fcfs_mc_model: behavioural model of a first-ready, first-come-first-served
// DRAM memory controller, for testbenches only (not synthesizable intent).
//
// Requests enter a queue of QDEPTH entries through a valid/ready port. One
// request is served at a time. Each bank (bank group + bank, address bits
// [16:13]) keeps one open row. Service picks the oldest queued request whose
// row is open in its bank (a row hit, T_HIT cycles); if there is none, the
// oldest request (a row miss: precharge and activate, T_MISS cycles). It
// counts served requests, row hits, activations and the summed queueing plus
// service latency of reads. The timings are round numbers for relative
// comparison, not DDR4 datasheet values.
module fr_fcfs_mc_model
  import zoro_pkg::*;
#(
  parameter int QDEPTH = 32,
  parameter int T_HIT  = 4,
  parameter int T_MISS = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  txn_t    in_txn,
  output longint  n_served,
  output longint  n_hits,
  output longint  n_acts,
  output longint  n_reads,
  output longint  read_lat_sum
);

  typedef struct { txn_t t; longint arrive; } req_t;
  req_t   q[$];
  row_t   bank_row [16];
  logic   bank_open [16];
  int     busy;
  longint now;

  assign in_ready = (q.size() < QDEPTH);

  function automatic int bank_of(txn_t t);
    return int'(t.addr[ROW_LSB +: 4]);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      busy = 0; now = 0;
      n_served = 0; n_hits = 0; n_acts = 0; n_reads = 0; read_lat_sum = 0;
      for (int b = 0; b < 16; b++) begin
        bank_open[b] = 0;
        bank_row[b]  = '0;
      end
    end else begin
      now++;
      if (in_valid && in_ready) q.push_back('{t: in_txn, arrive: now});
      if (busy > 0) busy--;
      if (busy == 0 && q.size() > 0) begin
        int pick, b;
        logic hit;
        pick = -1;
        foreach (q[i]) begin
          b = bank_of(q[i].t);
          if (pick < 0 && bank_open[b] && bank_row[b] == row_of(q[i].t.addr)) pick = i;
        end
        hit = (pick >= 0);
        if (!hit) pick = 0;
        b = bank_of(q[pick].t);
        busy = hit ? T_HIT : T_MISS;
        if (hit) n_hits++;
        else n_acts++;
        bank_open[b] = 1;
        bank_row[b]  = row_of(q[pick].t.addr);
        n_served++;
        if (!q[pick].t.is_write) begin
          n_reads++;
          read_lat_sum += (now - q[pick].arrive) + longint'(busy);
        end
        q.delete(pick);
      end
    end
  end

endmodule
