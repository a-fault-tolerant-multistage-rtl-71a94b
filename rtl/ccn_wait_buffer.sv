// ccn_wait_buffer: the wait buffer of a combining switch.
//
// Holds one record for every request absorbed by one of the switch's two
// combining queues. A returning reply is looked up by the identifier of the
// request it answers (issuing PE and sequence number); every record with that
// key gives one extra reply, released one per clock, after which the reply
// itself moves on. The document names the wait buffer and its role and takes
// it as unbounded; DEPTH (default 8) and the associative organisation are this
// design's choices. When fewer than two slots are free, combining is
// suspended (ins_room low) and requests simply queue uncombined.
// Interface: two insert ports (one per combining queue) and NLOOK lookup
// ports (one per return input latch). look_hit/look_rec answer combinationally
// in the same clock; look_pop removes the record shown.
module ccn_wait_buffer
  import ccn_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NLOOK = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        ins_room,
  input  logic        ins_valid [2],
  input  ccn_wb_rec_t ins_rec   [2],
  input  ccn_key_t    look_key  [NLOOK],
  output logic        look_hit  [NLOOK],
  output ccn_wb_rec_t look_rec  [NLOOK],
  input  logic        look_pop  [NLOOK],
  output logic        full
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic        vld [DEPTH];
  ccn_wb_rec_t rec [DEPTH];
  logic [IW-1:0] look_idx [NLOOK];
  logic [IW-1:0] free_idx [2];
  logic          free_ok  [2];
  int unsigned   nfree;

  always_comb begin
    nfree = 0;
    for (int k = 0; k < DEPTH; k++) if (!vld[k]) nfree++;
  end
  assign ins_room = (nfree >= 2);
  assign full     = (nfree == 0);

  // First free slot for port 0, last free slot for port 1.
  always_comb begin
    free_ok[0] = 1'b0; free_idx[0] = '0;
    free_ok[1] = 1'b0; free_idx[1] = '0;
    for (int k = DEPTH - 1; k >= 0; k--)
      if (!vld[k]) begin free_ok[0] = 1'b1; free_idx[0] = IW'(k); end
    for (int k = 0; k < DEPTH; k++)
      if (!vld[k]) begin free_ok[1] = 1'b1; free_idx[1] = IW'(k); end
  end

  always_comb begin
    for (int j = 0; j < NLOOK; j++) begin
      look_hit[j] = 1'b0;
      look_idx[j] = '0;
      for (int k = DEPTH - 1; k >= 0; k--)
        if (vld[k] && rec[k].key == look_key[j]) begin
          look_hit[j] = 1'b1;
          look_idx[j] = IW'(k);
        end
      look_rec[j] = rec[look_idx[j]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) begin
        vld[k] <= 1'b0;
        rec[k] <= '0;
      end
    end else begin
      for (int j = 0; j < NLOOK; j++)
        if (look_pop[j] && look_hit[j]) vld[look_idx[j]] <= 1'b0;
      for (int p = 0; p < 2; p++)
        if (ins_valid[p] && free_ok[p]) begin
          vld[free_idx[p]] <= 1'b1;
          rec[free_idx[p]] <= ins_rec[p];
        end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ins_valid[0] && ins_valid[1] && !ins_room))
    else $error("ccn_wait_buffer: two inserts without room");

endmodule
