// ccn_switch: one 3x3 combining switching element of the chained network.
//
// Forward part (processors to memories): two input latches and a chain-in
// latch feed the routing logic, which steers each request to the combining
// queue of the output link named by destination-tag bit d_i. Chain-in
// requests have the highest priority; the two input latches take turns. A
// combining queue whose output link is faulty hands its head to the chain-out
// latch instead of the link. On the way out the request's chain-out record is
// updated: the first time in this stage c_i is set and the high n-1-i bits
// of this switch's number are stored in L_i; the high bits of the PE tag are
// then replaced by those of the next switch in the chain, so the reply comes
// back to that switch. If the next switch is the one recorded in L_i the
// request has circled the whole chain: the network is disconnected for it, it
// is dropped and a disconnect event is raised. In the last stage there is no
// chain (its partitions hold one switch) and a request for a faulty link is
// dropped the same way.
//
// Return part (memories to processors): two input latches and a return
// chain-in latch. Each latched reply is looked up in the wait buffer; while
// records for it exist, one decombined reply per clock is produced from a
// record (the absorbed request's own header, value plus offset for a
// Fetch&Add), and the reply itself stays latched. Then the reply is routed:
// if c_i is set and this switch is not L_i it takes the return chain-out link;
// otherwise the PE tag bits s_{i+1}..s_{n-1} are restored from L_i (when c_i
// is set) and bit s_i selects the normal queue and return link.
//
// The document gives the structure (Fig. 12), the chaining rule, the
// chain-out record and the routing procedures; the one-packet-per-queue-per-
// clock arbitration, the latch/queue timing (two clocks per stage when idle)
// and the sizes of the wait buffer and normal queues are this design's.
// Links use valid/ready: a packet moves when both are high at a clock edge.
// link_fault[p] marks output link p faulty in both directions.
module ccn_switch
  import ccn_pkg::*;
#(
  parameter int unsigned LOG_N    = 6,
  parameter int unsigned STAGE    = 0,
  parameter int unsigned FQ_DEPTH = 4,
  parameter int unsigned DEGREE   = 2,
  parameter int unsigned RQ_DEPTH = 4,
  parameter int unsigned WB_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOG_N-2:0]  se_id,
  input  logic              link_fault [2],
  // forward part
  input  logic        f_in_valid  [2],
  input  ccn_pkt_t    f_in_pkt    [2],
  output logic        f_in_ready  [2],
  input  logic        f_cin_valid,
  input  ccn_pkt_t    f_cin_pkt,
  output logic        f_cin_ready,
  output logic        f_out_valid [2],
  output ccn_pkt_t    f_out_pkt   [2],
  input  logic        f_out_ready [2],
  output logic        f_cout_valid,
  output ccn_pkt_t    f_cout_pkt,
  input  logic        f_cout_ready,
  // return part
  input  logic        r_in_valid  [2],
  input  ccn_pkt_t    r_in_pkt    [2],
  output logic        r_in_ready  [2],
  input  logic        r_cin_valid,
  input  ccn_pkt_t    r_cin_pkt,
  output logic        r_cin_ready,
  output logic        r_out_valid [2],
  output ccn_pkt_t    r_out_pkt   [2],
  input  logic        r_out_ready [2],
  output logic        r_cout_valid,
  output ccn_pkt_t    r_cout_pkt,
  input  logic        r_cout_ready,
  output ccn_events_t events
);
  localparam bit          CHAINED = (STAGE < LOG_N - 1);
  localparam int unsigned W       = CHAINED ? LOG_N - 1 - STAGE : 1;  // width of L_i
  localparam int unsigned LOFF    = CHAINED ? l_offset(LOG_N, STAGE) : 0;
  localparam int unsigned DBIT    = LOG_N - 1 - STAGE;                // position of d_i / s_i
  localparam int unsigned CI      = CHAINED ? STAGE : 0;              // index of c_i

  // Replace PE-tag bits s_{i+1}..s_{n-1} (the low DBIT bits) by v.
  function automatic logic [MAX_LOG_N-1:0] set_low(logic [MAX_LOG_N-1:0] s, logic [W-1:0] v);
    logic [MAX_LOG_N-1:0] mask;
    mask = (MAX_LOG_N'(1) << DBIT) - 1'b1;
    return (s & ~mask) | (MAX_LOG_N'(v) & mask);
  endfunction

  // Service order of the three latches: chain-in (2) first, then the two
  // input latches, latch 1 first when rr is set.
  function automatic logic [1:0] pick(int o, logic rr);
    if (o == 0) return 2'd2;
    if (o == 1) return rr ? 2'd1 : 2'd0;
    return rr ? 2'd0 : 2'd1;
  endfunction

  logic [W-1:0] x_high, x_next;
  assign x_high = CHAINED ? W'(se_id >> STAGE) : '0;
  assign x_next = x_high + 1'b1;

  logic rr_f, rr_r;   // round-robin bits between the two input latches
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin rr_f <= 1'b0; rr_r <= 1'b0; end
    else begin rr_f <= ~rr_f; rr_r <= ~rr_r; end

  // ---------------------------------------------------------------- forward
  logic     fl_v [3];
  ccn_pkt_t fl_p [3];
  logic     fl_q [3];      // target queue of each latch
  logic     fl_go [3];     // latch granted a queue this clock
  logic     fl_move [3];   // latch empties this clock

  logic        q_enq_valid [2];
  ccn_pkt_t    q_enq_pkt   [2];
  logic        q_enq_ready [2];
  logic        q_head_valid[2];
  ccn_pkt_t    q_head_pkt  [2];
  logic        q_deq       [2];
  logic        q_comb      [2];
  logic        wb_ins_valid[2];
  ccn_wb_rec_t wb_ins_rec  [2];
  logic        wb_room;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      fl_q[k]  = fl_p[k].d[DBIT];
      fl_go[k] = 1'b0;
    end
    for (int q = 0; q < 2; q++) begin
      q_enq_valid[q] = 1'b0;
      q_enq_pkt[q]   = fl_p[2];
    end
    for (int o = 0; o < 3; o++) begin
      logic [1:0] k;
      k = pick(o, rr_f);
      if (fl_v[k] && !q_enq_valid[fl_q[k]]) begin
        q_enq_valid[fl_q[k]] = 1'b1;
        q_enq_pkt[fl_q[k]]   = fl_p[k];
        fl_go[k]             = 1'b1;
      end
    end
  end

  always_comb
    for (int k = 0; k < 3; k++) fl_move[k] = fl_go[k] && q_enq_ready[fl_q[k]];

  assign f_in_ready[0] = !fl_v[0] || fl_move[0];
  assign f_in_ready[1] = !fl_v[1] || fl_move[1];
  assign f_cin_ready   = !fl_v[2] || fl_move[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin fl_v[k] <= 1'b0; fl_p[k] <= '0; end
    end else begin
      for (int k = 0; k < 2; k++)
        if (f_in_ready[k]) begin
          fl_v[k] <= f_in_valid[k];
          if (f_in_valid[k]) fl_p[k] <= f_in_pkt[k];
        end
      if (f_cin_ready) begin
        fl_v[2] <= f_cin_valid && CHAINED;
        if (f_cin_valid) fl_p[2] <= f_cin_pkt;
      end
    end
  end

  for (genvar q = 0; q < 2; q++) begin : g_cq
    ccn_combining_queue #(.DEPTH(FQ_DEPTH), .DEGREE(DEGREE)) u_cq (
      .clk, .rst_n,
      .enq_valid (q_enq_valid[q]),
      .enq_pkt   (q_enq_pkt[q]),
      .enq_ready (q_enq_ready[q]),
      .head_valid(q_head_valid[q]),
      .head_pkt  (q_head_pkt[q]),
      .deq       (q_deq[q]),
      .wb_room   (wb_room),
      .wb_ins_valid(wb_ins_valid[q]),
      .wb_ins_rec  (wb_ins_rec[q]),
      .combined  (q_comb[q])
    );
  end

  // Output links, and the chain-out latch fed from the heads of queues whose
  // link is faulty.
  logic     co_v;
  ccn_pkt_t co_p;
  logic     co_load, co_take, co_sel, co_drop;
  ccn_pkt_t co_next;

  always_comb begin
    logic want0, want1;
    logic [W-1:0] li;
    want0 = q_head_valid[0] && link_fault[0];
    want1 = q_head_valid[1] && link_fault[1];
    co_sel  = (want0 && want1) ? rr_f : want1;
    co_take = (want0 || want1) && (!co_v || f_cout_ready || !CHAINED);
    co_next = q_head_pkt[co_sel];
    co_drop = 1'b1;
    if (CHAINED) begin
      li      = co_next.l[LOFF +: W];
      co_drop = co_next.c[CI] && (li == x_next);
      if (!co_next.c[CI]) begin
        co_next.c[CI]    = 1'b1;
        co_next.l[LOFF +: W] = x_high;
      end
      co_next.s = set_low(co_next.s, x_next);
    end
    co_load = co_take && !co_drop;
    for (int q = 0; q < 2; q++) begin
      f_out_valid[q] = q_head_valid[q] && !link_fault[q];
      f_out_pkt[q]   = q_head_pkt[q];
      q_deq[q]       = link_fault[q] ? (co_take && co_sel == q[0])
                                     : (q_head_valid[q] && f_out_ready[q]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      co_v <= 1'b0;
      co_p <= '0;
    end else begin
      if (co_load) begin
        co_v <= 1'b1;
        co_p <= co_next;
      end else if (f_cout_ready) begin
        co_v <= 1'b0;
      end
    end
  end
  assign f_cout_valid = co_v;
  assign f_cout_pkt   = co_p;

  // ---------------------------------------------------------------- return
  logic        rl_v [3];
  ccn_pkt_t    rl_p [3];
  ccn_key_t    look_key [3];
  logic        look_hit [3];
  ccn_wb_rec_t look_rec [3];
  logic        look_pop [3];
  ccn_pkt_t    rc_pkt   [3];   // packet each latch offers this clock
  logic [1:0]  rc_dst   [3];   // 0/1 normal queue, 2 return chain-out
  logic        rc_go    [3];
  logic        rc_acc   [3];
  logic        rl_clear [3];

  logic        nq_enq_valid [2];
  ccn_pkt_t    nq_enq_pkt   [2];
  logic        nq_enq_ready [2];
  logic        rco_v, rco_load;
  ccn_pkt_t    rco_p, rco_next;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      ccn_pkt_t     p;
      logic [W-1:0] li;
      look_key[k] = pkt_key(rl_p[k]);
      p = rl_p[k];
      if (look_hit[k]) begin
        p = look_rec[k].partner;
        p.data = (p.op == OP_FADD) ? rl_p[k].data + look_rec[k].offset : rl_p[k].data;
      end
      li = CHAINED ? p.l[LOFF +: W] : '0;
      if (CHAINED && p.c[CI] && li != x_high) begin
        rc_dst[k] = 2'd2;
      end else begin
        if (CHAINED && p.c[CI]) p.s = set_low(p.s, li);
        rc_dst[k] = {1'b0, p.s[DBIT]};
      end
      rc_pkt[k] = p;
    end
  end

  always_comb begin
    logic taken [3];
    for (int d = 0; d < 3; d++) taken[d] = 1'b0;
    for (int k = 0; k < 3; k++) rc_go[k] = 1'b0;
    nq_enq_valid[0] = 1'b0; nq_enq_pkt[0] = rc_pkt[2];
    nq_enq_valid[1] = 1'b0; nq_enq_pkt[1] = rc_pkt[2];
    rco_next = rc_pkt[2];
    for (int o = 0; o < 3; o++) begin
      logic [1:0] k;
      k = pick(o, rr_r);
      if (rl_v[k] && !taken[rc_dst[k]]) begin
        taken[rc_dst[k]] = 1'b1;
        rc_go[k] = 1'b1;
        if (rc_dst[k] == 2'd2) rco_next = rc_pkt[k];
        else nq_enq_pkt[rc_dst[k][0]] = rc_pkt[k];
      end
    end
    for (int k = 0; k < 3; k++)
      if (rc_go[k] && rc_dst[k] != 2'd2) nq_enq_valid[rc_dst[k][0]] = 1'b1;
  end

  always_comb begin
    rco_load = 1'b0;
    for (int k = 0; k < 3; k++) begin
      case (rc_dst[k])
        2'd0:    rc_acc[k] = rc_go[k] && nq_enq_ready[0];
        2'd1:    rc_acc[k] = rc_go[k] && nq_enq_ready[1];
        default: rc_acc[k] = rc_go[k] && (!rco_v || r_cout_ready);
      endcase
      look_pop[k] = rc_acc[k] && look_hit[k];
      rl_clear[k] = rc_acc[k] && !look_hit[k];
      if (rc_acc[k] && rc_dst[k] == 2'd2) rco_load = 1'b1;
    end
  end

  assign r_in_ready[0] = !rl_v[0] || rl_clear[0];
  assign r_in_ready[1] = !rl_v[1] || rl_clear[1];
  // A chain-in reply that moves on to the return chain-out link frees its
  // latch only at the next clock, so no combinational path runs around the
  // ring of return chain links.
  assign r_cin_ready   = !rl_v[2] || (rc_go[2] && !look_hit[2] && rc_dst[2] != 2'd2 &&
                                       nq_enq_ready[rc_dst[2][0]]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin rl_v[k] <= 1'b0; rl_p[k] <= '0; end
      rco_v <= 1'b0;
      rco_p <= '0;
    end else begin
      for (int k = 0; k < 2; k++)
        if (r_in_ready[k]) begin
          rl_v[k] <= r_in_valid[k];
          if (r_in_valid[k]) rl_p[k] <= r_in_pkt[k];
        end
      if (r_cin_ready) begin
        rl_v[2] <= r_cin_valid && CHAINED;
        if (r_cin_valid) rl_p[2] <= r_cin_pkt;
      end else if (rl_clear[2]) begin
        rl_v[2] <= 1'b0;
      end
      if (rco_load) begin
        rco_v <= 1'b1;
        rco_p <= rco_next;
      end else if (r_cout_ready) begin
        rco_v <= 1'b0;
      end
    end
  end
  assign r_cout_valid = rco_v;
  assign r_cout_pkt   = rco_p;

  ccn_wait_buffer #(.DEPTH(WB_DEPTH), .NLOOK(3)) u_wb (
    .clk, .rst_n,
    .ins_room (wb_room),
    .ins_valid(wb_ins_valid),
    .ins_rec  (wb_ins_rec),
    .look_key (look_key),
    .look_hit (look_hit),
    .look_rec (look_rec),
    .look_pop (look_pop),
    .full     ()
  );

  for (genvar q = 0; q < 2; q++) begin : g_nq
    ccn_normal_queue #(.DEPTH(RQ_DEPTH)) u_nq (
      .clk, .rst_n,
      .enq_valid (nq_enq_valid[q]),
      .enq_pkt   (nq_enq_pkt[q]),
      .enq_ready (nq_enq_ready[q]),
      .head_valid(r_out_valid[q]),
      .head_pkt  (r_out_pkt[q]),
      .deq       (r_out_ready[q] && r_out_valid[q])
    );
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    events            = '0;
    events.combine    = q_comb[0] || q_comb[1];
    events.decombine  = look_pop[0] || look_pop[1] || look_pop[2];
    events.fwd_chain  = co_load;
    events.ret_chain  = rco_load;
    events.disconnect = co_take && co_drop;
    events.fwd_block  = (fl_v[0] && !fl_move[0]) || (fl_v[1] && !fl_move[1]) ||
                        (fl_v[2] && !fl_move[2]);
  end

endmodule
