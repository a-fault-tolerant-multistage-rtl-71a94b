// ccn_normal_queue: a return-path ("normal") queue of a combining switch.
//
// A plain first-in first-out buffer of reply packets between the return
// routing logic of a switch and the return link towards the processors.
// The document takes the return queues as unbounded in its evaluation; this
// design gives them DEPTH entries (default 4, the size the document uses for
// the forward queues). One packet may be written and one read per clock.
// enq_ready is high when the queue is not full; it does not look at deq in
// the same clock, so no combinational path runs from the output side to the
// input side. head_valid/head_pkt show the oldest entry; deq pops it.
module ccn_normal_queue
  import ccn_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enq_valid,
  input  ccn_pkt_t enq_pkt,
  output logic     enq_ready,
  output logic     head_valid,
  output ccn_pkt_t head_pkt,
  input  logic     deq
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  ccn_pkt_t               mem [DEPTH];
  logic [PW-1:0]          rd_ptr, wr_ptr;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [CW-1:0]          count;

  logic do_enq, do_deq;
  assign enq_ready  = (count != CW'(DEPTH));
  assign head_valid = (count != '0);
  assign head_pkt   = mem[rd_ptr];
  assign do_enq     = enq_valid && enq_ready;
  assign do_deq     = deq && head_valid;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_ptr] <= enq_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_enq) wr_ptr <= next_ptr(wr_ptr);
      if (do_deq) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_enq) - CW'(do_deq);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) deq |-> head_valid)
    else $error("ccn_normal_queue: dequeue from an empty queue");

endmodule
