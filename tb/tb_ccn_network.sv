// tb_ccn_network: end-to-end test of the chained combining network, here at
// N = 16 (four stages of eight switches) with up to three requests combined
// into one per switch (DEGREE = 3); the queue and buffer sizes are the
// defaults. Changing N (8 to 64) and DEGREE below needs no other edit.
//
// The testbench plays the N processors and the N memory modules. Each
// memory module serves one request per clock and answers with the word's old
// value (Fetch&Add adds the operand, Store writes it). Each processor issues
// loads and stores to random modules and, with a hot-spot share, Fetch&Add(1)
// and loads to two words of one "hot" module, so requests meet in queues and
// combine. Checks, all worked out from the requests alone:
//   * every reply arrives at the processor that issued it, with its PE tag
//     restored, exactly once;
//   * a load returns the word's initial contents;
//   * the Fetch&Add replies to the hot word are exactly 0..K-1, each once,
//     and the word ends at K (the effect of performing them one by one);
//   * the round trip of one request in an idle network takes 4*log2(N)+1
//     clocks (two per stage each way plus one in the memory module);
//   * the chain-out record of a request detoured at stage 0 matches the
//     worked example of a faulty link 0 on switch 0 (c_0 set, L_0 = 0,
//     PE tag 0..01).
// Phases: idle latency, single detour, mixed traffic fault-free, mixed traffic
// under each single-switch fault pattern (both output links of switch 0 of
// stage i faulty, i = 0..n-2), a two-switch fault that forces a request
// along two chain hops, and a fault pair that disconnects a chain (the
// request must be dropped and reported). Each mechanism (combining,
// decombining, forward and return chaining, multi-hop chaining, disconnect,
// blocking in the input latches) is counted and must occur.
`timescale 1ns/1ps
module tb_ccn_network;
  import ccn_pkg::*;

  localparam int N       = 16;
  localparam int DEGREE  = 3;
  localparam int LOG_N   = $clog2(N);
  localparam int NSE     = N / 2;
  localparam int HOT_MM  = N / 2 + 1;
  localparam int NSEQ    = 1 << SEQ_W;
  localparam int HOT_CAP = 16384;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        link_fault   [LOG_N][N];
  logic        pe_req_valid [N];
  ccn_pkt_t    pe_req_pkt   [N];
  logic        pe_req_ready [N];
  logic        pe_rep_valid [N];
  ccn_pkt_t    pe_rep_pkt   [N];
  logic        pe_rep_ready [N];
  logic        mm_req_valid [N];
  ccn_pkt_t    mm_req_pkt   [N];
  logic        mm_req_ready [N];
  logic        mm_rep_valid [N];
  ccn_pkt_t    mm_rep_pkt   [N];
  logic        mm_rep_ready [N];
  ccn_events_t events       [LOG_N][NSE];

  ccn_network #(.N(N), .DEGREE(DEGREE)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic logic [DATA_W-1:0] init_word(int d, int a);
    return 32'h5A00_0000 ^ (32'(d) << 12) ^ 32'(a);
  endfunction

  // ------------------------------------------------------------ memory modules
  logic [DATA_W-1:0] mem [N][1 << ADDR_W];
  logic              mrep_v [N];
  ccn_pkt_t          mrep_p [N];
  int                hot_sum;
  // detour example check
  logic              expect_detour;
  int                detour_seen, multihop_seen;

  always_comb for (int j = 0; j < N; j++) begin
    mm_req_ready[j] = !mrep_v[j] || mm_rep_ready[j];
    mm_rep_valid[j] = mrep_v[j];
    mm_rep_pkt[j]   = mrep_p[j];
  end

  task automatic mem_init();
    for (int d = 0; d < N; d++)
      for (int a = 0; a < (1 << ADDR_W); a++) mem[d][a] = init_word(d, a);
    mem[HOT_MM][0] = '0;
    hot_sum = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n) for (int j = 0; j < N; j++) begin
      if (mrep_v[j] && mm_rep_ready[j]) mrep_v[j] <= 1'b0;
      if (mm_req_valid[j] && mm_req_ready[j]) begin
        ccn_pkt_t p;
        p = mm_req_pkt[j];
        check(p.d == MAX_LOG_N'(j), $sformatf("request for MM %0d from PE %0d (c=%b l=%b s=%b) delivered to MM %0d", p.d, p.pe, p.c, p.l, p.s, j));
        if (expect_detour) begin
          check(p.c == 5'b00001 && p.l == '0 && p.s == 6'b000001,
                "chain-out record of the stage-0 detour");
          detour_seen++;
        end
        if (p.c[0] && ((32'(p.s) - 32'(p.l) - 1) % NSE) != 0) multihop_seen++;
        mrep_p[j] <= p;
        mrep_p[j].data <= mem[j][p.addr];
        case (p.op)
          OP_FADD:  mem[j][p.addr] <= mem[j][p.addr] + p.data;
          OP_STORE: mem[j][p.addr] <= p.data;
          default: ;
        endcase
        mrep_v[j] <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ processors
  logic     outst  [N][NSEQ];
  ccn_pkt_t sent   [N][NSEQ];
  int       out_n, issued_n, replied_n, hot_n;
  logic     hot_seen [HOT_CAP];
  logic [SEQ_W-1:0] next_seq [N];
  logic     gen_on;
  int       rate_pct, hot_pct;
  int       cyc;

  always_comb for (int j = 0; j < N; j++) pe_rep_ready[j] = 1'b1;

  function automatic ccn_pkt_t make_req(int pe, int kind, int d, int a);
    ccn_pkt_t p;
    p = '0;
    p.s = MAX_LOG_N'(pe);
    p.pe = MAX_LOG_N'(pe);
    p.d = MAX_LOG_N'(d);
    p.addr = ADDR_W'(a);
    case (kind)
      0: p.op = OP_LOAD;
      1: begin p.op = OP_STORE; p.data = $urandom; end
      default: begin p.op = OP_FADD; p.data = 1; end
    endcase
    return p;
  endfunction

  function automatic ccn_pkt_t random_req(int pe);
    int r;
    r = $urandom_range(99);
    if (r < hot_pct / 2) return make_req(pe, 2, HOT_MM, 0);
    if (r < hot_pct)     return make_req(pe, 0, HOT_MM, 1);
    if (r < hot_pct + (100 - hot_pct) / 4)
      return make_req(pe, 1, $urandom_range(N - 1), 512 + $urandom_range(511));
    return make_req(pe, 0, $urandom_range(N - 1), 16 + $urandom_range(495));
  endfunction

  // directed request waiting to be issued
  logic     dir_v;
  int       dir_pe;
  ccn_pkt_t dir_p;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int j = 0; j < N; j++) begin
      // handshake of the request offered in the last clock
      if (pe_req_valid[j] && pe_req_ready[j]) begin
        outst[j][pe_req_pkt[j].seq] = 1'b1;
        sent[j][pe_req_pkt[j].seq]  = pe_req_pkt[j];
        out_n++;
        issued_n++;
        if (pe_req_pkt[j].op == OP_FADD) hot_n++;
        next_seq[j] <= next_seq[j] + 1'b1;
        pe_req_valid[j] <= 1'b0;
      end
      // replies
      if (pe_rep_valid[j]) begin
        ccn_pkt_t r;
        ccn_pkt_t q;
        r = pe_rep_pkt[j];
        check(r.pe == MAX_LOG_N'(j) && r.s == MAX_LOG_N'(j), "reply at the wrong processor / PE tag not restored");
        check(outst[j][r.seq], "reply to no outstanding request");
        q = sent[j][r.seq];
        check(r.op == q.op && r.d == q.d && r.addr == q.addr, "reply header differs from request");
        if (q.op == OP_LOAD)
          check(r.data == init_word(int'(q.d), int'(q.addr)), "load value");
        if (q.op == OP_FADD) begin
          if (r.data < HOT_CAP) begin
            check(!hot_seen[r.data], "Fetch&Add value returned twice");
            hot_seen[r.data] = 1'b1;
          end else check(1'b0, "Fetch&Add value out of range");
        end
        outst[j][r.seq] = 1'b0;
        out_n--;
        replied_n++;
      end
    end
    // offer new requests
    for (int j = 0; j < N; j++) begin
      logic busy;
      busy = pe_req_valid[j] && !pe_req_ready[j];
      if (!busy) begin
        logic [SEQ_W-1:0] sq;
        sq = (pe_req_valid[j] && pe_req_ready[j]) ? next_seq[j] + 1'b1 : next_seq[j];
        if (dir_v && dir_pe == j && !outst[j][sq]) begin
          ccn_pkt_t p;
          p = dir_p;
          p.seq = sq;
          pe_req_pkt[j]   <= p;
          pe_req_valid[j] <= 1'b1;
          dir_v <= 1'b0;
        end else if (gen_on && !outst[j][sq] && $urandom_range(99) < rate_pct) begin
          ccn_pkt_t p;
          p = random_req(j);
          p.seq = sq;
          pe_req_pkt[j]   <= p;
          pe_req_valid[j] <= 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------ event counts
  int n_combine, n_decombine, n_fchain, n_rchain, n_disc, n_block;
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < LOG_N; i++)
      for (int x = 0; x < NSE; x++) begin
        n_combine   += int'(events[i][x].combine);
        n_decombine += int'(events[i][x].decombine);
        n_fchain    += int'(events[i][x].fwd_chain);
        n_rchain    += int'(events[i][x].ret_chain);
        n_disc      += int'(events[i][x].disconnect);
        n_block     += int'(events[i][x].fwd_block);
      end

  // ------------------------------------------------------------ phases
  task automatic clear_faults();
    for (int i = 0; i < LOG_N; i++) for (int l = 0; l < N; l++) link_fault[i][l] = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    gen_on = 1'b0;
    dir_v = 1'b0;
    for (int j = 0; j < N; j++) begin
      pe_req_valid[j] = 1'b0;
      pe_req_pkt[j]   = '0;
      mrep_v[j]       = 1'b0;
      mrep_p[j]       = '0;
      next_seq[j]     = '0;
      for (int s = 0; s < NSEQ; s++) outst[j][s] = 1'b0;
    end
    out_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
  endtask

  task automatic drain(input int limit);
    int t;
    t = 0;
    while (out_n != 0 && t < limit) begin @(posedge clk); t++; end
  endtask

  task automatic check_hot();
    check(mem[HOT_MM][0] == 32'(hot_n), "hot word equals the number of Fetch&Adds");
    for (int v = 0; v < HOT_CAP; v++)
      if (v < hot_n) check(hot_seen[v], "Fetch&Add values form 0..K-1");
  endtask

  task automatic traffic(input int cycles, input int rate, input int hot, input string name);
    int c0, b0;
    c0 = n_combine;
    rate_pct = rate;
    hot_pct  = hot;
    gen_on   = 1'b1;
    repeat (cycles) @(posedge clk);
    gen_on   = 1'b0;
    drain(20000);
    check(out_n == 0, {name, ": all requests answered"});
    $display("%s: issued=%0d replied=%0d combines=%0d", name, issued_n, replied_n, n_combine - c0);
  endtask

  task automatic single(input int pe, input int kind, input int d, input int a, output int lat);
    int t0;
    @(posedge clk);
    dir_p  = make_req(pe, kind, d, a);
    dir_pe = pe;
    dir_v  = 1'b1;
    @(posedge clk);          // request is offered after this edge
    t0 = cyc;
    while (out_n == 0 && cyc < t0 + 10) @(posedge clk);
    drain(1000);
    lat = cyc - t0;
  endtask

  int lat;
  initial begin
    cyc = 0;
    n_combine = 0; n_decombine = 0; n_fchain = 0; n_rchain = 0; n_disc = 0; n_block = 0;
    issued_n = 0; replied_n = 0; hot_n = 0;
    detour_seen = 0; multihop_seen = 0;
    expect_detour = 1'b0;
    for (int v = 0; v < HOT_CAP; v++) hot_seen[v] = 1'b0;
    rate_pct = 0; hot_pct = 0;
    clear_faults();
    mem_init();
    do_reset();

    // 1. idle round trip
    single(0, 0, 0, 20, lat);
    check(out_n == 0, "single request answered");
    // lat counts from the clock the request is offered (it is accepted at the
    // next edge) to the clock its reply is taken
    check(lat - 1 == 4 * LOG_N + 1, $sformatf("idle round trip %0d clocks, expected %0d", lat - 1, 4 * LOG_N + 1));

    // 2. detour at stage 0: link 0 of switch 0 faulty, PE 0 -> MM 0
    link_fault[0][0] = 1'b1;
    expect_detour = 1'b1;
    single(0, 0, 0, 21, lat);
    expect_detour = 1'b0;
    check(out_n == 0 && detour_seen == 1, "detoured request answered");
    clear_faults();

    // 3. mixed traffic with a hot spot, fault-free
    traffic(1500, 40, 30, "fault-free");

    // 4. each fault pattern of the evaluation: both links of switch 0, stage i
    for (int i = 0; i < LOG_N - 1; i++) begin
      link_fault[i][0] = 1'b1;
      link_fault[i][1] = 1'b1;
      traffic(600, 30, 30, $sformatf("fault stage %0d", i));
      clear_faults();
    end

    // 5. switches 0 and 1 of stage 0 both faulty: requests chain two hops
    link_fault[0][0] = 1'b1; link_fault[0][1] = 1'b1;
    link_fault[0][2] = 1'b1; link_fault[0][3] = 1'b1;
    traffic(600, 30, 30, "two-switch fault");
    clear_faults();
    check_hot();

    // 6. chain of stage n-2 (switches 0 and N/4) with link 0 faulty in both:
    //    a request from PE 0 to MM 0 cannot be delivered
    link_fault[LOG_N-2][0] = 1'b1;
    link_fault[LOG_N-2][2 * (NSE / 2)] = 1'b1;
    begin
      int d0;
      d0 = n_disc;
      single(0, 0, 0, 22, lat);
      check(n_disc == d0 + 1, "disconnected request reported");
      check(out_n == 1, "disconnected request gets no reply");
    end
    clear_faults();

    $display("events: combine=%0d decombine=%0d fwd_chain=%0d ret_chain=%0d multihop=%0d disconnect=%0d block=%0d",
             n_combine, n_decombine, n_fchain, n_rchain, multihop_seen, n_disc, n_block);
    check(n_combine > 0,   "combining happened");
    check(n_decombine == n_combine, "every combine was decombined");
    check(n_fchain > 0,    "forward chaining happened");
    check(n_rchain > 0,    "return chaining happened");
    check(multihop_seen > 0, "multi-hop chaining happened");
    check(n_disc > 0,      "disconnect happened");
    check(n_block > 0,     "blocking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
