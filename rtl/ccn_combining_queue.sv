// ccn_combining_queue: a forward (combining) output queue of a switch.
//
// Requests wait here for their output link. When a request arrives that
// loads from, or Fetch&Adds to, the same word of the same memory module as a
// request already waiting (not the head, which is committed to the link),
// the two are merged: the waiting request stays, carrying the sum of the
// two increments for a Fetch&Add, and a record is handed to the wait buffer
// with the absorbed request's header and the head's operand before the
// merge. When the reply comes back the head gets the memory value v and the
// absorbed request v + offset, which is the result of performing the two in
// order. A queued request absorbs at most DEGREE-1 others in this queue, so
// at most DEGREE requests are combined in one switch (the degree of
// combining; the document evaluates 2 and 3).
//
// The document gives what combining does and a queue size of 4; the queue
// organisation here (a shifting array, one arrival per clock) is this
// design's own and simpler than the shift-register scheme the document cites.
// Interface: enq_* takes one request per clock, enq_ready is high when the
// request can be absorbed or there is a free entry (it does not depend on
// deq). head_* is the oldest request; deq removes it. wb_room says the wait
// buffer can take a record this clock; wb_ins_* carries the record out.
module ccn_combining_queue
  import ccn_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned DEGREE = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enq_valid,
  input  ccn_pkt_t    enq_pkt,
  output logic        enq_ready,
  output logic        head_valid,
  output ccn_pkt_t    head_pkt,
  input  logic        deq,
  input  logic        wb_room,
  output logic        wb_ins_valid,
  output ccn_wb_rec_t wb_ins_rec,
  output logic        combined
);
  localparam int unsigned IW = $clog2(DEPTH + 1);
  localparam int unsigned MW = $clog2(DEGREE + 1);

  ccn_pkt_t      ent    [DEPTH];
  logic [MW-1:0] merges [DEPTH];
  logic [IW-1:0] count;

  logic          hit;
  logic [IW-1:0] hit_idx;
  logic          do_enq, do_deq, do_push;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int j = DEPTH - 1; j >= 1; j--) begin
      if (j < int'(count) && combinable(ent[j], enq_pkt) &&
          (int'(merges[j]) < DEGREE - 1)) begin
        hit     = 1'b1;
        hit_idx = IW'(j);
      end
    end
    hit = hit && wb_room && (DEGREE > 1);
  end

  assign head_valid   = (count != '0);
  assign head_pkt     = ent[0];
  assign enq_ready    = hit || (count != IW'(DEPTH));
  assign do_enq       = enq_valid && enq_ready;
  assign do_push      = do_enq && !hit;
  assign do_deq       = deq && head_valid;
  assign combined     = do_enq && hit;
  assign wb_ins_valid = combined;

  always_comb begin
    wb_ins_rec         = '0;
    wb_ins_rec.key     = pkt_key(ent[hit_idx[$clog2(DEPTH)-1:0]]);
    wb_ins_rec.partner = enq_pkt;
    wb_ins_rec.offset  = ent[hit_idx[$clog2(DEPTH)-1:0]].data;
  end

  // Next contents: merge in place, then shift if the head leaves, then append.
  ccn_pkt_t      ent_nxt    [DEPTH];
  logic [MW-1:0] merges_nxt [DEPTH];

  always_comb begin
    for (int j = 0; j < DEPTH; j++) begin
      int src;
      src = do_deq ? j + 1 : j;
      ent_nxt[j]    = '0;
      merges_nxt[j] = '0;
      if (src < DEPTH) begin
        ent_nxt[j]    = ent[src];
        merges_nxt[j] = merges[src];
        if (combined && IW'(src) == hit_idx) begin
          if (ent[src].op == OP_FADD) ent_nxt[j].data = ent[src].data + enq_pkt.data;
          merges_nxt[j] = merges[src] + 1'b1;
        end
      end
      if (do_push && IW'(j) == count - IW'(do_deq)) begin
        ent_nxt[j]    = enq_pkt;
        merges_nxt[j] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int j = 0; j < DEPTH; j++) begin
        ent[j]    <= '0;
        merges[j] <= '0;
      end
    end else begin
      for (int j = 0; j < DEPTH; j++) begin
        ent[j]    <= ent_nxt[j];
        merges[j] <= merges_nxt[j];
      end
      count <= count + IW'(do_push) - IW'(do_deq);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) deq |-> head_valid)
    else $error("ccn_combining_queue: dequeue from an empty queue");

endmodule
