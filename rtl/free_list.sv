// free_list: explicit list of unallocated physical registers.
//
// A circular FIFO of physical register tags. Dispatch takes the tag at the
// head for a new destination (pop); retire returns the Told of the retiring
// instruction and serial rollback returns the T of an undone instruction,
// both at the tail (push). Returning rolled-back tags at the tail, not the
// head, matches the order of the worked example (PR#2, PR#8, PR#7).
//
// Only NUM_PREGS - NUM_ARCH tags can ever be free, because every
// architectural register always holds a mapping, so that is the depth.
// At reset the list holds tags NUM_ARCH .. NUM_PREGS-1 (PR#5..PR#8 of the
// example). The head tag is visible combinationally; pop and push take
// effect at the rising edge and may happen in the same cycle. A pop when
// empty or a push when full is a protocol error (asserted).
module free_list #(
  parameter int unsigned NUM_ARCH  = r10k_pkg::NUM_ARCH,
  parameter int unsigned NUM_PREGS = r10k_pkg::NUM_PREGS,
  localparam int unsigned DEPTH = NUM_PREGS - NUM_ARCH,
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pop,
  output logic [PW-1:0] head_tag,
  output logic          empty,
  input  logic          push,
  input  logic [PW-1:0] push_tag,
  output logic [CW-1:0] count
);

  logic [PW-1:0] mem_q [DEPTH];
  logic [IW-1:0] head_q, tail_q;
  logic [CW-1:0] count_q;

  function automatic logic [IW-1:0] inc(logic [IW-1:0] p);
    return (p == IW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign head_tag = mem_q[head_q];
  assign empty    = (count_q == '0);
  assign count    = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem_q[i] <= PW'(NUM_ARCH + i);
      head_q  <= '0;
      tail_q  <= '0;          // full: tail wraps onto head
      count_q <= CW'(DEPTH);
    end else begin
      if (pop)  head_q <= inc(head_q);
      if (push) begin
        mem_q[tail_q] <= push_tag;
        tail_q        <= inc(tail_q);
      end
      count_q <= count_q + CW'(push) - CW'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count_q != CW'(DEPTH)) || pop);

endmodule
