// scc_req_queue: compaction request queue.
//
// A FIFO of code-region addresses whose micro-op cache lines reached the hotness threshold,
// waiting for the compaction unit. DEPTH entries (6 by default, the size the document reports
// as sufficient). push is ignored when full (the request is dropped, a later access will raise
// it again) and also when the region is already queued; pop takes the head, which is visible
// combinationally on head/not_empty. One push and one pop may happen in the same cycle.
// Dropping on full and suppressing duplicates are this design's choices.
// An assertion checks that the occupancy never exceeds DEPTH; because it is disabled during
// reset, lint tools report rst_n as used both asynchronously and synchronously. No logic uses
// it synchronously.
module scc_req_queue
  import scc_pkg::*;
#(
  parameter int unsigned DEPTH = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  region_t push_region,
  input  logic    pop,
  output logic    not_empty,
  output region_t head,
  output logic    full,
  output logic    dropped        // pulse: a push was refused because the queue was full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  region_t            mem [DEPTH];
  logic [PW-1:0]      rd_q, wr_q;
  logic [PW:0]        cnt_q;
  logic [DEPTH-1:0]   live;
  logic               dup, do_push, do_pop;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    dup = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      // entry i is occupied when its distance from the read pointer is below the count
      live[i] = ((i + DEPTH - int'(rd_q)) % DEPTH) < int'(cnt_q);
      if (live[i] && mem[i] == push_region) dup = 1'b1;
    end
  end

  assign not_empty = (cnt_q != '0);
  assign full      = (cnt_q == (PW+1)'(DEPTH));
  assign head      = mem[rd_q];
  assign do_pop    = pop && not_empty;
  assign do_push   = push && !dup && (!full || do_pop);
  assign dropped   = push && !dup && full && !do_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= inc(wr_q);
      if (do_pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= push_region;
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= (PW+1)'(DEPTH));

endmodule
