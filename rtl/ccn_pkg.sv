// ccn_pkg: types and helpers shared by the chained combining network.
//
// A request or reply travels as one packet (ccn_pkt_t) per link per clock.
// The routing fields follow the chained omega network: S is the processor
// (source) tag, D the memory-module (destination) tag, C the chain-out
// indicator (one bit per chained stage) and L the packed first-chain-out
// locations L_0..L_{n-2}, where L_i holds the n-1-i high bits of the switch
// in stage i at which the packet was first chained out. With n = 6 (N = 64)
// this is 5 + 15 = 20 detour bits, as the chain-out record size formula gives.
//
// Bit numbering: tag bit t_0 (the first one examined, stage 0) is the MOST
// significant bit, so t_i is tag[LOG_N-1-i]. The switch in stage i that a
// packet occupies is s_{i+1}..s_{n-1} d_0..d_{i-1}, i.e. {S[n-2-i:0], D[n-1:n-i]}.
//
// The fields are sized for networks of up to MAX_LOG_N = 6 (64 ports);
// smaller networks use the low bits. Operation codes, the address width,
// the data width and the request identifier (issuing PE plus a sequence
// number, used to find wait-buffer records) are this design's own choices.
package ccn_pkg;

  localparam int unsigned MAX_LOG_N = 6;
  localparam int unsigned MAX_LBITS = MAX_LOG_N * (MAX_LOG_N - 1) / 2;
  localparam int unsigned ADDR_W    = 10;   // word address inside one memory module
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned SEQ_W     = 4;    // outstanding requests per PE: up to 16

  typedef enum logic [1:0] {
    OP_LOAD  = 2'd0,   // combinable: all combined loads receive the same word
    OP_STORE = 2'd1,   // never combined
    OP_FADD  = 2'd2    // Fetch&Add, combinable: increments are summed
  } ccn_op_e;

  typedef struct packed {
    ccn_op_e                 op;
    logic [MAX_LOG_N-1:0]    s;       // PE tag, modified when chained out
    logic [MAX_LOG_N-1:0]    d;       // memory-module tag
    logic [MAX_LOG_N-2:0]    c;       // chain-out indicator, c[i] = c_i
    logic [MAX_LBITS-1:0]    l;       // packed first chain-out locations
    logic [MAX_LOG_N-1:0]    pe;      // issuing PE (never modified)
    logic [SEQ_W-1:0]        seq;     // request number at that PE
    logic [ADDR_W-1:0]       addr;
    logic [DATA_W-1:0]       data;    // operand of a request, value of a reply
  } ccn_pkt_t;

  localparam int unsigned KEY_W = MAX_LOG_N + SEQ_W;
  typedef logic [KEY_W-1:0] ccn_key_t;

  // One combining record: the request that was merged away (its whole
  // header, so that its reply can be routed on its own path) and the value
  // to add to the head's reply to form its reply.
  typedef struct packed {
    ccn_key_t   key;      // identifier of the request that stayed in the queue
    ccn_pkt_t   partner;  // the request that was absorbed
    logic [DATA_W-1:0] offset;
  } ccn_wb_rec_t;

  // Per-switch event pulses, for performance counting and testing.
  typedef struct packed {
    logic combine;     // a request was merged into a queued one
    logic decombine;   // a reply was produced from a wait-buffer record
    logic fwd_chain;   // a request left on the forward chain-out link
    logic ret_chain;   // a reply left on the return chain-out link
    logic disconnect;  // a request found no fault-free link in its chain
    logic fwd_block;   // a latched request could not enter its queue
  } ccn_events_t;

  function automatic ccn_key_t pkt_key(ccn_pkt_t p);
    return {p.pe, p.seq};
  endfunction

  // Two requests may be combined when both are loads or both Fetch&Adds to
  // the same word of the same memory module.
  function automatic logic combinable(ccn_pkt_t a, ccn_pkt_t b);
    return (a.op == b.op) && (a.op != OP_STORE) && (a.d == b.d) && (a.addr == b.addr);
  endfunction

  // Offset of L_i inside the packed L field: sum over k < i of (log_n - 1 - k).
  function automatic int unsigned l_offset(int unsigned log_n, int unsigned i);
    return i * (log_n - 1) - (i * (i - 1)) / 2;
  endfunction

endpackage
