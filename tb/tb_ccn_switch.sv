// tb_ccn_switch: directed tests of one combining switch, switch 01 of stage 0
// in an 8-port network (tags of 3 bits, L_0 of 2 bits, chain of 4 switches).
//   1. destination-tag routing: bit d_0 picks the output link; an idle
//      switch passes a request in two clocks;
//   2. combining: three Fetch&Adds to one word with the link held; the
//      second and third leave as one request carrying the summed operand;
//   3. decombining: the reply to that request comes back as two replies,
//      v and v + (second's operand), each to the link named by its own s_0;
//   4. a faulty link: the request leaves on the chain-out link with c_0 set,
//      L_0 = 01 and PE tag bits s_1 s_2 replaced by the next switch, 10;
//   5. a request already chained out of switch 10 (L_0 = 10) that finds the
//      link faulty again is dropped and reported (the chain is exhausted);
//   6. return routing: a reply with c_0 set and L_0 = 00 takes the return
//      chain; one with L_0 = 01 (this switch) gets s_1 s_2 restored to 01 and
//      leaves by its s_0 link;
//   7. a chain-in request wins the queue over an input-latch request.
`timescale 1ns/1ps
module tb_ccn_switch;
  import ccn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  se_id;
  logic        link_fault  [2];
  logic        f_in_valid  [2], f_in_ready [2], f_out_valid [2], f_out_ready [2];
  ccn_pkt_t    f_in_pkt    [2], f_out_pkt [2];
  logic        f_cin_valid, f_cin_ready, f_cout_valid, f_cout_ready;
  ccn_pkt_t    f_cin_pkt, f_cout_pkt;
  logic        r_in_valid  [2], r_in_ready [2], r_out_valid [2], r_out_ready [2];
  ccn_pkt_t    r_in_pkt    [2], r_out_pkt [2];
  logic        r_cin_valid, r_cin_ready, r_cout_valid, r_cout_ready;
  ccn_pkt_t    r_cin_pkt, r_cout_pkt;
  ccn_events_t events;

  ccn_switch #(.LOG_N(3), .STAGE(0)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  // output monitors
  ccn_pkt_t fo [2][$];
  ccn_pkt_t ro [2][$];
  ccn_pkt_t fco [$], rco [$];
  int n_comb, n_decomb, n_disc, cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int p = 0; p < 2; p++) begin
        if (f_out_valid[p] && f_out_ready[p]) fo[p].push_back(f_out_pkt[p]);
        if (r_out_valid[p] && r_out_ready[p]) ro[p].push_back(r_out_pkt[p]);
      end
      if (f_cout_valid && f_cout_ready) fco.push_back(f_cout_pkt);
      if (r_cout_valid && r_cout_ready) rco.push_back(r_cout_pkt);
      n_comb   += int'(events.combine);
      n_decomb += int'(events.decombine);
      n_disc   += int'(events.disconnect);
    end
  end

  function automatic ccn_pkt_t req(int pe, int seq, int d, ccn_op_e op, int addr, int data);
    ccn_pkt_t p;
    p = '0;
    p.pe = MAX_LOG_N'(pe); p.s = MAX_LOG_N'(pe); p.seq = SEQ_W'(seq);
    p.d = MAX_LOG_N'(d); p.op = op; p.addr = ADDR_W'(addr); p.data = 32'(data);
    return p;
  endfunction

  task automatic send_f(input int port, input ccn_pkt_t p);
    @(negedge clk);
    f_in_valid[port] = 1; f_in_pkt[port] = p;
    do @(posedge clk); while (!f_in_ready[port]);
    @(negedge clk);
    f_in_valid[port] = 0;
  endtask

  task automatic send_r(input int port, input ccn_pkt_t p);
    @(negedge clk);
    r_in_valid[port] = 1; r_in_pkt[port] = p;
    do @(posedge clk); while (!r_in_ready[port]);
    @(negedge clk);
    r_in_valid[port] = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    ccn_pkt_t a, b, c, r, x;
    int t0;
    se_id = 2'b01;
    link_fault[0] = 0; link_fault[1] = 0;
    for (int p = 0; p < 2; p++) begin
      f_in_valid[p] = 0; f_in_pkt[p] = '0; f_out_ready[p] = 1;
      r_in_valid[p] = 0; r_in_pkt[p] = '0; r_out_ready[p] = 1;
    end
    f_cin_valid = 0; f_cin_pkt = '0; f_cout_ready = 1;
    r_cin_valid = 0; r_cin_pkt = '0; r_cout_ready = 1;
    n_comb = 0; n_decomb = 0; n_disc = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. routing and idle latency
    a = req(1, 0, 'b011, OP_LOAD, 5, 0);
    b = req(1, 1, 'b110, OP_LOAD, 6, 0);
    @(negedge clk);
    f_in_valid[0] = 1; f_in_pkt[0] = a;
    t0 = cyc;
    @(negedge clk);
    f_in_valid[0] = 0;
    wait (fo[0].size() == 1);
    // latched at the first edge, queued at the second, taken downstream at the third
    check(cyc - t0 == 3, $sformatf("idle switch passes a request in 2 clocks (%0d)", cyc - t0 - 1));
    check(fo[0][0] == a, "d_0 = 0 goes to link 0");
    send_f(1, b);
    idle(3);
    check(fo[1].size() == 1 && fo[1][0] == b, "d_0 = 1 goes to link 1");
    fo[0].delete(); fo[1].delete();

    // 2. combining with the link held
    f_out_ready[0] = 0;
    a = req(1, 2, 'b000, OP_FADD, 9, 1);
    b = req(4, 3, 'b000, OP_FADD, 9, 2);   // s_0 = 1
    c = req(0, 4, 'b000, OP_FADD, 9, 3);   // s_0 = 0
    send_f(0, a);
    send_f(1, b);
    send_f(0, c);
    idle(2);
    check(n_comb == 1, "one combine");
    @(negedge clk);
    f_out_ready[0] = 1;
    idle(3);
    check(fo[0].size() == 2, "two requests leave for three");
    if (fo[0].size() == 2) begin
      check(fo[0][0] == a, "first request unchanged");
      check(pkt_key(fo[0][1]) == pkt_key(b) && fo[0][1].data == 32'd5, "combined request carries 2+3");
    end

    // 3. decombining the reply to b: b gets v, c gets v+2
    r = fo[0][1];
    r.data = 32'd100;
    send_r(0, r);
    idle(4);
    check(n_decomb == 1, "one decombine");
    check(ro[1].size() == 1 && pkt_key(ro[1][0]) == pkt_key(b) && ro[1][0].data == 32'd100,
          "reply for b (s_0 = 1) with v");
    check(ro[0].size() == 1 && pkt_key(ro[0][0]) == pkt_key(c) && ro[0][0].data == 32'd102,
          "reply for c (s_0 = 0) with v + 2");
    ro[0].delete(); ro[1].delete(); fo[0].delete();

    // 4. faulty link 0: chained out with the record updated
    link_fault[0] = 1;
    a = req(3, 5, 'b010, OP_LOAD, 7, 0);      // PE 011
    send_f(0, a);
    idle(4);
    check(fco.size() == 1, "request leaves on the chain-out link");
    if (fco.size() == 1) begin
      x = fco[0];
      check(x.c[0] == 1'b1 && x.l[1:0] == 2'b01, "c_0 set, L_0 = this switch (01)");
      check(x.s[2:0] == 3'b010, "PE tag becomes s_0 followed by the next switch 10");
      check(x.pe == a.pe && x.d == a.d, "identity and destination unchanged");
    end
    check(fo[0].size() == 0, "nothing on the faulty link");
    fco.delete();

    // 5. chain exhausted: c_0 already set with L_0 = 10 (the next switch)
    a = req(2, 6, 'b001, OP_LOAD, 7, 0);
    a.c[0] = 1'b1; a.l[1:0] = 2'b10; a.s = 6'b000001;
    @(negedge clk);
    f_cin_valid = 1; f_cin_pkt = a;
    @(negedge clk);
    f_cin_valid = 0;
    idle(4);
    check(n_disc == 1 && fco.size() == 0, "exhausted chain: dropped and reported");
    link_fault[0] = 0;

    // 6. return routing with c_0 set
    a = req(6, 7, 'b010, OP_LOAD, 3, 0);
    a.c[0] = 1'b1; a.l[1:0] = 2'b00; a.s = 6'b000001;
    send_r(1, a);
    idle(3);
    check(rco.size() == 1 && rco[0] == a, "reply not yet at L_0 takes the return chain");
    b = req(6, 8, 'b010, OP_LOAD, 3, 0);   // PE 110
    b.c[0] = 1'b1; b.l[1:0] = 2'b01; b.s = 6'b000100;
    send_r(0, b);
    idle(3);
    check(ro[1].size() == 1 && ro[1][0].s == 6'b000101, "reply at L_0: s restored to 1,01 and routed by s_0");
    ro[1].delete(); rco.delete();

    // 7. chain-in has priority over an input latch for the same queue
    f_out_ready[0] = 0;
    a = req(0, 9, 'b000, OP_LOAD, 1, 0);
    b = req(0, 10, 'b000, OP_LOAD, 2, 0);
    b.c[0] = 1'b1; b.l[1:0] = 2'b00;
    @(negedge clk);
    f_in_valid[0] = 1; f_in_pkt[0] = a;
    f_cin_valid = 1;   f_cin_pkt = b;
    @(negedge clk);
    f_in_valid[0] = 0; f_cin_valid = 0;
    idle(3);
    f_out_ready[0] = 1;
    idle(3);
    check(fo[0].size() == 2 && fo[0][0] == b && fo[0][1] == a, "chain-in request first");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
