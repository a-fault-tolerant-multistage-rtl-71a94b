// ccn_network: N x N chained omega combining network (top level).
//
// log2(N) stages of N/2 combining switches (ccn_switch) connect N processors
// (PEs) to N memory modules (MMs). Between stages, and between the PEs and
// stage 0, links follow the perfect shuffle of the omega network: forward
// output link X*2+p of a stage (switch X, port p) enters the next stage at
// switch/port given by rotating the n-bit link number left by one. Requests
// are routed by destination tag (bit d_i of the MM number in stage i) and
// replies retrace the same path backwards, guided by the PE tag and the
// chain-out record the request collected.
//
// Within stage i, switches are chained: the forward chain-out link of switch
// X enters switch (X + 2^i) mod N/2 and the return chain-out link of X enters
// switch (X - 2^i) mod N/2, forming the complete chains of each partition
// (switches equal in their low i bits). The last stage has no chain.
// link_fault[i][X*2+p] marks output link p of switch X in stage i faulty,
// for requests and replies alike.
//
// All of this (sizes, chaining formulas, routing) follows the document; the
// packet format, the valid/ready link protocol and the queue sizes it leaves
// open are this design's. Ports: pe_req_* (request into the network from PE
// j), pe_rep_* (reply to PE j), mm_req_* (request to MM j), mm_rep_* (reply
// from MM j), all valid/ready; events reports per-switch activity pulses.
module ccn_network
  import ccn_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned FQ_DEPTH = 4,
  parameter int unsigned DEGREE   = 2,
  parameter int unsigned RQ_DEPTH = 4,
  parameter int unsigned WB_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_fault   [$clog2(N)][N],
  input  logic        pe_req_valid [N],
  input  ccn_pkt_t    pe_req_pkt   [N],
  output logic        pe_req_ready [N],
  output logic        pe_rep_valid [N],
  output ccn_pkt_t    pe_rep_pkt   [N],
  input  logic        pe_rep_ready [N],
  output logic        mm_req_valid [N],
  output ccn_pkt_t    mm_req_pkt   [N],
  input  logic        mm_req_ready [N],
  input  logic        mm_rep_valid [N],
  input  ccn_pkt_t    mm_rep_pkt   [N],
  output logic        mm_rep_ready [N],
  output ccn_events_t events       [$clog2(N)][N/2]
);
  localparam int unsigned LOG_N = $clog2(N);
  localparam int unsigned NSE   = N / 2;

  // Link level 0 joins the PEs to stage 0, level i+1 is the output of stage i,
  // level LOG_N joins the last stage to the MMs. f* carry requests, r* replies
  // travelling backwards over the same link.
  logic     fv [LOG_N+1][N];
  ccn_pkt_t fp [LOG_N+1][N];
  logic     fr [LOG_N+1][N];
  logic     rv [LOG_N+1][N];
  ccn_pkt_t rp [LOG_N+1][N];
  logic     rr [LOG_N+1][N];

  // Chain links inside each stage, indexed by the switch that drives them.
  logic     fcv [LOG_N][NSE];
  ccn_pkt_t fcp [LOG_N][NSE];
  logic     fcr [LOG_N][NSE];
  logic     rcv [LOG_N][NSE];
  ccn_pkt_t rcp [LOG_N][NSE];
  logic     rcr [LOG_N][NSE];

  for (genvar j = 0; j < N; j++) begin : g_ends
    assign fv[0][j]        = pe_req_valid[j];
    assign fp[0][j]        = pe_req_pkt[j];
    assign pe_req_ready[j] = fr[0][j];
    assign pe_rep_valid[j] = rv[0][j];
    assign pe_rep_pkt[j]   = rp[0][j];
    assign rr[0][j]        = pe_rep_ready[j];
    assign mm_req_valid[j] = fv[LOG_N][j];
    assign mm_req_pkt[j]   = fp[LOG_N][j];
    assign fr[LOG_N][j]    = mm_req_ready[j];
    assign rv[LOG_N][j]    = mm_rep_valid[j];
    assign rp[LOG_N][j]    = mm_rep_pkt[j];
    assign mm_rep_ready[j] = rr[LOG_N][j];
  end

  for (genvar i = 0; i < LOG_N; i++) begin : g_stage
    for (genvar x = 0; x < NSE; x++) begin : g_se
      // Input port p of switch x is fed by link p*N/2 + x of the level
      // before (inverse shuffle); output port p drives link x*2 + p.
      localparam int unsigned IN0  = x;
      localparam int unsigned IN1  = NSE + x;
      localparam int unsigned OUT0 = 2 * x;
      localparam int unsigned OUT1 = 2 * x + 1;
      localparam int unsigned CNXT = (x + (1 << i)) % NSE;        // forward chain target
      localparam int unsigned CPRV = (x + NSE - ((1 << i) % NSE)) % NSE;  // forward chain source
      localparam bit          LAST = (i == LOG_N - 1);

      logic     lf      [2];
      logic     f_in_v  [2], f_in_r [2], f_out_v [2], f_out_r [2];
      ccn_pkt_t f_in_p  [2], f_out_p [2];
      logic     r_in_v  [2], r_in_r [2], r_out_v [2], r_out_r [2];
      ccn_pkt_t r_in_p  [2], r_out_p [2];
      logic     fcin_v, rcin_v, fcout_r, rcout_r;
      ccn_pkt_t fcin_p, rcin_p;

      assign lf[0] = link_fault[i][OUT0];
      assign lf[1] = link_fault[i][OUT1];

      assign f_in_v[0] = fv[i][IN0];
      assign f_in_v[1] = fv[i][IN1];
      assign f_in_p[0] = fp[i][IN0];
      assign f_in_p[1] = fp[i][IN1];
      assign fr[i][IN0] = f_in_r[0];
      assign fr[i][IN1] = f_in_r[1];
      assign fv[i+1][OUT0] = f_out_v[0];
      assign fv[i+1][OUT1] = f_out_v[1];
      assign fp[i+1][OUT0] = f_out_p[0];
      assign fp[i+1][OUT1] = f_out_p[1];
      assign f_out_r[0] = fr[i+1][OUT0];
      assign f_out_r[1] = fr[i+1][OUT1];

      assign r_in_v[0] = rv[i+1][OUT0];
      assign r_in_v[1] = rv[i+1][OUT1];
      assign r_in_p[0] = rp[i+1][OUT0];
      assign r_in_p[1] = rp[i+1][OUT1];
      assign rr[i+1][OUT0] = r_in_r[0];
      assign rr[i+1][OUT1] = r_in_r[1];
      assign rv[i][IN0] = r_out_v[0];
      assign rv[i][IN1] = r_out_v[1];
      assign rp[i][IN0] = r_out_p[0];
      assign rp[i][IN1] = r_out_p[1];
      assign r_out_r[0] = rr[i][IN0];
      assign r_out_r[1] = rr[i][IN1];

      if (LAST) begin : g_nochain
        assign fcin_v  = 1'b0;
        assign fcin_p  = '0;
        assign rcin_v  = 1'b0;
        assign rcin_p  = '0;
        assign fcout_r = 1'b1;
        assign rcout_r = 1'b1;
      end else begin : g_chain
        // forward: CPRV -> x -> CNXT ; return: CNXT -> x -> CPRV
        assign fcin_v  = fcv[i][CPRV];
        assign fcin_p  = fcp[i][CPRV];
        assign fcout_r = fcr[i][CNXT];
        assign rcin_v  = rcv[i][CNXT];
        assign rcin_p  = rcp[i][CNXT];
        assign rcout_r = rcr[i][CPRV];
      end

      ccn_switch #(
        .LOG_N(LOG_N), .STAGE(i), .FQ_DEPTH(FQ_DEPTH), .DEGREE(DEGREE),
        .RQ_DEPTH(RQ_DEPTH), .WB_DEPTH(WB_DEPTH)
      ) u_se (
        .clk, .rst_n,
        .se_id       ((LOG_N-1)'(x)),
        .link_fault  (lf),
        .f_in_valid  (f_in_v),
        .f_in_pkt    (f_in_p),
        .f_in_ready  (f_in_r),
        .f_cin_valid (fcin_v),
        .f_cin_pkt   (fcin_p),
        .f_cin_ready (fcr[i][x]),
        .f_out_valid (f_out_v),
        .f_out_pkt   (f_out_p),
        .f_out_ready (f_out_r),
        .f_cout_valid(fcv[i][x]),
        .f_cout_pkt  (fcp[i][x]),
        .f_cout_ready(fcout_r),
        .r_in_valid  (r_in_v),
        .r_in_pkt    (r_in_p),
        .r_in_ready  (r_in_r),
        .r_cin_valid (rcin_v),
        .r_cin_pkt   (rcin_p),
        .r_cin_ready (rcr[i][x]),
        .r_out_valid (r_out_v),
        .r_out_pkt   (r_out_p),
        .r_out_ready (r_out_r),
        .r_cout_valid(rcv[i][x]),
        .r_cout_pkt  (rcp[i][x]),
        .r_cout_ready(rcout_r),
        .events      (events[i][x])
      );
    end
  end

endmodule
