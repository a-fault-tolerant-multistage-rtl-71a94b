// tb_ccn_combining_queue: feeds random loads, stores and Fetch&Adds to a few
// words into the queue, dequeues at random and plays the memory for every
// request that leaves, expanding each one through the wait-buffer records
// the queue produced (v for the request that left, v + offset for each
// absorbed one). Checks, independent of how the queue decides to combine:
//   * every request gets exactly one reply;
//   * the Fetch&Add replies to one word, sorted, step by the operands, i.e.
//     they equal some serial execution, and the word ends at the sum;
//   * loads see the initial value of their word (those words are never
//     written);
//   * no request that leaves stands for more than DEGREE requests;
//   * the queue holds at most DEPTH entries and a request written into an
//     empty queue is at its head one clock later;
//   * combining did happen, and the queue never combines while wb_room is low.
`timescale 1ns/1ps
module tb_ccn_combining_queue;
  import ccn_pkg::*;
  localparam int DEPTH  = 4;
  localparam int DEGREE = 2;
  localparam int NREQ   = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enq_valid, enq_ready, head_valid, deq, wb_room, wb_ins_valid, combined;
  ccn_pkt_t    enq_pkt, head_pkt;
  ccn_wb_rec_t wb_ins_rec;

  ccn_combining_queue u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [DATA_W-1:0] memw [8];
  logic [DATA_W-1:0] init [8];
  ccn_pkt_t          req  [NREQ];
  logic              got  [NREQ];
  logic [DATA_W-1:0] val  [NREQ];
  ccn_wb_rec_t       recs [$];
  int                in_queue, n_comb;

  function automatic int key2i(ccn_key_t k);
    return int'(k);
  endfunction

  task automatic reply(input ccn_key_t k, input logic [DATA_W-1:0] v, input int depth);
    int i;
    i = key2i(k);
    check(!got[i], "one reply per request");
    got[i] = 1'b1;
    val[i] = v;
  endtask

  // serve the request that leaves
  task automatic serve(input ccn_pkt_t p);
    logic [DATA_W-1:0] v;
    int n;
    v = memw[p.addr[2:0]];
    if (p.op == OP_FADD)  memw[p.addr[2:0]] = v + p.data;
    if (p.op == OP_STORE) memw[p.addr[2:0]] = p.data;
    reply(pkt_key(p), v, 0);
    n = 1;
    for (int r = recs.size() - 1; r >= 0; r--)
      if (recs[r].key == pkt_key(p)) begin
        reply(pkt_key(recs[r].partner),
              (recs[r].partner.op == OP_FADD) ? v + recs[r].offset : v, 1);
        n++;
        recs.delete(r);
      end
    check(n <= DEGREE, "at most DEGREE requests combined");
  endtask

  initial begin
    int sent;
    enq_valid = 0; deq = 0; enq_pkt = '0; wb_room = 1;
    for (int a = 0; a < 8; a++) begin init[a] = 32'(a) * 1000; memw[a] = init[a]; end
    for (int i = 0; i < NREQ; i++) begin
      ccn_pkt_t p;
      int kind;
      p = '0;
      {p.pe, p.seq} = ccn_key_t'(i);
      kind = $urandom_range(9);
      if (kind < 5)      begin p.op = OP_FADD;  p.addr = ADDR_W'($urandom_range(1)); p.data = 32'($urandom_range(1, 9)); end
      else if (kind < 8) begin p.op = OP_LOAD;  p.addr = ADDR_W'($urandom_range(2, 3)); end
      else               begin p.op = OP_STORE; p.addr = ADDR_W'($urandom_range(4, 7)); p.data = $urandom; end
      p.d = 6'd3;
      req[i] = p;
      got[i] = 1'b0;
    end
    in_queue = 0; n_comb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a request into the empty queue is at the head one clock later
    @(negedge clk);
    check(!head_valid, "empty after reset");
    enq_pkt = req[0]; enq_valid = 1;
    @(posedge clk);
    @(negedge clk);
    enq_valid = 0;
    check(head_valid && head_pkt == req[0], "head one clock after write");
    sent = 1;
    while (sent < NREQ || head_valid) begin
      @(negedge clk);
      enq_valid = (sent < NREQ) && ($urandom_range(99) < 70);
      if (sent < NREQ) enq_pkt = req[sent];
      deq = head_valid && ($urandom_range(99) < 40);
      wb_room = ($urandom_range(99) < 85);
      #1;
      if (combined) check(wb_room, "no combining without wait-buffer room");
      @(posedge clk);
      if (wb_ins_valid) begin recs.push_back(wb_ins_rec); n_comb++; end
      if (deq) serve(head_pkt);
      if (enq_valid && enq_ready) sent++;
    end
    // checks on the replies
    for (int i = 0; i < NREQ; i++) check(got[i], "every request answered");
    for (int a = 0; a < 2; a++) begin
      logic [DATA_W-1:0] sum;
      int n;
      sum = init[a];
      n = 0;
      // walk the serial order: the request whose reply equals the running sum
      for (int step = 0; step < NREQ; step++) begin
        int hit;
        hit = -1;
        for (int i = 0; i < NREQ; i++)
          if (hit < 0 && req[i].op == OP_FADD && req[i].addr == ADDR_W'(a) && val[i] == sum) hit = i;
        if (hit < 0) break;
        sum = sum + req[hit].data;
        val[hit] = '1;     // used
        n++;
      end
      begin
        int total;
        total = 0;
        for (int i = 0; i < NREQ; i++) if (req[i].op == OP_FADD && req[i].addr == ADDR_W'(a)) total++;
        check(n == total, "Fetch&Add replies form a serial order");
        check(memw[a] == sum, "word ends at the sum of the increments");
      end
    end
    for (int i = 0; i < NREQ; i++)
      if (req[i].op == OP_LOAD) check(val[i] == init[req[i].addr[2:0]], "load value");
    check(n_comb > 0, "combining happened");
    $display("combines=%0d", n_comb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    in_queue = in_queue + int'(enq_valid && enq_ready && !combined) - int'(deq && head_valid);
    check(in_queue <= DEPTH, "at most DEPTH entries");
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
