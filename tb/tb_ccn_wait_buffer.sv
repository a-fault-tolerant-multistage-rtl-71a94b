// tb_ccn_wait_buffer: inserts records through both ports, looks them up from
// three ports and pops them, against a reference list. Checks that every
// record is found by its key exactly as many times as it was inserted, that
// a missing key misses, that ins_room drops when fewer than two slots are
// free and that full is raised at DEPTH = 8 records.
`timescale 1ns/1ps
module tb_ccn_wait_buffer;
  import ccn_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ins_room, full;
  logic        ins_valid [2];
  ccn_wb_rec_t ins_rec   [2];
  ccn_key_t    look_key  [3];
  logic        look_hit  [3];
  ccn_wb_rec_t look_rec  [3];
  logic        look_pop  [3];

  ccn_wait_buffer u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  ccn_wb_rec_t model [$];
  int          n_hits [3] = '{0, 0, 0};

  function automatic int count_key(ccn_key_t k);
    int n = 0;
    foreach (model[i]) if (model[i].key == k) n++;
    return n;
  endfunction

  function automatic ccn_wb_rec_t rnd_rec(int keyspace);
    ccn_wb_rec_t r;
    r = '0;
    r.key = ccn_key_t'($urandom_range(keyspace - 1));
    r.partner.data = $urandom;
    r.partner.pe = MAX_LOG_N'($urandom);
    r.offset = $urandom;
    return r;
  endfunction

  initial begin
    for (int p = 0; p < 2; p++) begin ins_valid[p] = 0; ins_rec[p] = '0; end
    for (int j = 0; j < 3; j++) begin look_key[j] = '0; look_pop[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill it up, two at a time, until ins_room drops
    while (1) begin
      @(negedge clk);
      check(ins_room == (DEPTH - model.size() >= 2), "ins_room");
      if (!ins_room) break;
      ins_rec[0] = rnd_rec(1000); ins_rec[1] = rnd_rec(1000);
      ins_valid[0] = 1; ins_valid[1] = 1;
      @(posedge clk);
      model.push_back(ins_rec[0]); model.push_back(ins_rec[1]);
      @(negedge clk); ins_valid[0] = 0; ins_valid[1] = 0;
    end
    check(full && model.size() == DEPTH, "full at DEPTH records");
    // look up every stored key and a missing one
    @(negedge clk);
    look_key[0] = model[3].key;
    look_key[1] = ccn_key_t'(1000 + 7);
    #1;
    check(look_hit[0] && look_rec[0].key == model[3].key, "stored key found");
    check(!look_hit[1], "missing key misses");
    // empty it again through a reset, then random traffic with a small key
    // space so keys repeat
    @(negedge clk);
    look_key[0] = '0; look_key[1] = '0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    model.delete();
    check(!full && ins_room, "empty after reset");
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int j = 0; j < 3; j++) begin
        look_key[j] = ccn_key_t'($urandom_range(11));
        look_pop[j] = 0;
      end
      if (look_key[1] == look_key[0]) look_key[1] = ccn_key_t'(12);
      if (look_key[2] == look_key[0] || look_key[2] == look_key[1]) look_key[2] = ccn_key_t'(13);
      #1;
      for (int j = 0; j < 3; j++) begin
        int n;
        n = count_key(look_key[j]);
        check(look_hit[j] == (n > 0), $sformatf("hit iff a record with the key is stored (port %0d key %0d hit %0d n %0d size %0d)", j, look_key[j], look_hit[j], n, model.size()));
        if (look_hit[j]) n_hits[j]++;
        if (look_hit[j]) begin
          int idx;
          idx = -1;
          foreach (model[i]) if (idx < 0 && model[i] == look_rec[j]) idx = i;
          check(idx >= 0 && look_rec[j].key == look_key[j], "record returned is a stored one with the key");
          look_pop[j] = ($urandom_range(1) == 1);
          if (look_pop[j] && idx >= 0) model.delete(idx);
        end
      end
      ins_valid[0] = 0; ins_valid[1] = 0;
      if (ins_room) begin
        ins_rec[0] = rnd_rec(12); ins_rec[1] = rnd_rec(12);
        ins_valid[0] = ($urandom_range(1) == 1);
        ins_valid[1] = ($urandom_range(1) == 1);
        if (ins_valid[0]) model.push_back(ins_rec[0]);
        if (ins_valid[1]) model.push_back(ins_rec[1]);
      end
      @(posedge clk);
    end
    check(n_hits[0] > 100 && n_hits[1] > 100 && n_hits[2] > 100, "every lookup port found records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
