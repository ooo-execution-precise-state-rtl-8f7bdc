// rob: reorder buffer of an R10K-style core, used for control only.
//
// A circular buffer of DEPTH entries between a head (oldest, retire) and a
// tail (next free, dispatch). An entry holds no values, only tags: T, the
// physical register written by the instruction, Told, the physical register
// its destination was mapped to before, the destination architectural
// register, whether it has a destination, whether it is a store, and a
// complete bit.
//
//  - Dispatch writes an entry at the tail; alloc_idx names it. When the
//    buffer is full, an entry retiring in the same cycle can be reused.
//  - Complete sets the complete bit of entry cpl_idx.
//  - Retire: the head entry is shown on head_*; when head_complete is set
//    the core may assert retire, which frees the entry. The core then
//    returns head_told to the free list.
//  - Serial rollback: undo_req with undo_idx asks to undo every entry from
//    undo_idx up to the youngest. From the next cycle on, one entry per
//    cycle is undone, youngest first: it is shown on undo_* with undo_valid
//    and freed at the edge. rolling is high while entries remain to undo.
//  - ld_query_idx / older_store: reports whether any store older than the
//    given entry is still in the buffer (used to hold loads back).
//
// The T/Told fields, retire from the head and youngest-first rollback follow
// the R10K scheme; the store query and the handshake are this design's.
module rob #(
  parameter int unsigned DEPTH     = r10k_pkg::ROB_DEPTH,
  parameter int unsigned NUM_ARCH  = r10k_pkg::NUM_ARCH,
  parameter int unsigned NUM_PREGS = r10k_pkg::NUM_PREGS,
  localparam int unsigned RW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned AW = $clog2(NUM_ARCH),
  localparam int unsigned PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // dispatch
  input  logic          alloc,
  input  logic [PW-1:0] alloc_t,
  input  logic [PW-1:0] alloc_told,
  input  logic [AW-1:0] alloc_rd,
  input  logic          alloc_has_dest,
  input  logic          alloc_is_store,
  output logic [RW-1:0] alloc_idx,
  output logic          full,
  output logic          empty,
  output logic [CW-1:0] count,
  // complete
  input  logic          cpl_valid,
  input  logic [RW-1:0] cpl_idx,
  // retire
  output logic          head_valid,
  output logic          head_complete,
  output logic [RW-1:0] head_idx,
  output logic [PW-1:0] head_told,
  output logic          head_has_dest,
  output logic          head_is_store,
  input  logic          retire,
  // serial rollback
  input  logic          undo_req,
  input  logic [RW-1:0] undo_idx,
  output logic          rolling,
  output logic          undo_valid,
  output logic [RW-1:0] undo_entry,
  output logic [PW-1:0] undo_t,
  output logic [PW-1:0] undo_told,
  output logic [AW-1:0] undo_rd,
  output logic          undo_has_dest,
  // load ordering
  input  logic [RW-1:0] ld_query_idx,
  output logic          older_store
);

  typedef struct packed {
    logic [PW-1:0] t;
    logic [PW-1:0] told;
    logic [AW-1:0] rd;
    logic          has_dest;
    logic          is_store;
    logic          complete;
  } entry_t;

  entry_t        ent_q [DEPTH];
  logic [RW-1:0] head_q, tail_q, target_q;
  logic [CW-1:0] count_q;
  logic          rolling_q;

  function automatic logic [RW-1:0] inc(logic [RW-1:0] p);
    return (p == RW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [RW-1:0] dec(logic [RW-1:0] p);
    return (p == '0) ? RW'(DEPTH - 1) : p - 1'b1;
  endfunction

  logic [RW-1:0] last_q;   // youngest entry
  assign last_q = dec(tail_q);

  assign alloc_idx     = tail_q;
  assign full          = (count_q == CW'(DEPTH));
  assign empty         = (count_q == '0);
  assign count         = count_q;
  assign head_valid    = !empty;
  assign head_idx      = head_q;
  assign head_complete = head_valid && ent_q[head_q].complete;
  assign head_told     = ent_q[head_q].told;
  assign head_has_dest = ent_q[head_q].has_dest;
  assign head_is_store = ent_q[head_q].is_store;

  assign rolling       = rolling_q;
  assign undo_valid    = rolling_q && !empty;
  assign undo_entry    = last_q;
  assign undo_t        = ent_q[last_q].t;
  assign undo_told     = ent_q[last_q].told;
  assign undo_rd       = ent_q[last_q].rd;
  assign undo_has_dest = ent_q[last_q].has_dest;

  always_comb begin
    int unsigned qage;
    qage = r10k_pkg::rob_age(int'(ld_query_idx), int'(head_q), DEPTH);
    older_store = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      int unsigned a;
      a = r10k_pkg::rob_age(i, int'(head_q), DEPTH);
      if (a < qage && a < count_q && ent_q[i].is_store) older_store = 1'b1;
    end
  end

  logic          do_alloc, do_retire, do_undo;
  logic [RW-1:0] tail_n;
  assign do_alloc  = alloc && (!full || do_retire);
  assign do_retire = retire && head_complete;
  assign do_undo   = undo_valid;
  assign tail_n    = do_undo ? last_q : (do_alloc ? inc(tail_q) : tail_q);

  // On a request: is the target still in the buffer after this cycle's
  // dispatch and retire? (Counting, because head == tail when full.)
  logic          undo_pending;
  logic [RW-1:0] head_n;
  logic [CW-1:0] count_n;
  assign head_n       = do_retire ? inc(head_q) : head_q;
  assign count_n      = count_q + CW'(do_alloc) - CW'(do_retire);
  assign undo_pending = r10k_pkg::rob_age(int'(undo_idx), int'(head_n), DEPTH) < count_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q    <= '0;
      tail_q    <= '0;
      count_q   <= '0;
      rolling_q <= 1'b0;
      target_q  <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) ent_q[i] <= '0;
    end else begin
      if (cpl_valid) ent_q[cpl_idx].complete <= 1'b1;
      if (do_alloc) begin
        ent_q[tail_q] <= '{t: alloc_t, told: alloc_told, rd: alloc_rd,
                           has_dest: alloc_has_dest, is_store: alloc_is_store,
                           complete: 1'b0};
      end
      if (do_retire) head_q <= inc(head_q);
      tail_q  <= tail_n;
      count_q <= count_q + CW'(do_alloc) - CW'(do_retire) - CW'(do_undo);
      // rollback bookkeeping: stop once the target entry has been undone
      if (undo_req && !rolling_q) begin
        target_q  <= undo_idx;
        rolling_q <= undo_pending;
      end else if (do_undo && last_q == target_q) begin
        rolling_q <= 1'b0;
      end
    end
  end

  // The core keeps dispatch and retire quiet while a rollback runs, and the
  // rollback target must be an entry that is in the buffer.
  assert property (@(posedge clk) disable iff (!rst_n) rolling_q |-> !alloc && !retire);
  assert property (@(posedge clk) disable iff (!rst_n) undo_req && retire |-> undo_idx != head_q);

endmodule
