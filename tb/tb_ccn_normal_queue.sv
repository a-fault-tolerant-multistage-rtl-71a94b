// tb_ccn_normal_queue: random enqueue/dequeue against a reference queue.
// Checks order, the full/empty flags at DEPTH = 4, and that a packet written
// into an empty queue is at the head one clock later.
`timescale 1ns/1ps
module tb_ccn_normal_queue;
  import ccn_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic enq_valid, enq_ready, head_valid, deq;
  ccn_pkt_t enq_pkt, head_pkt;

  ccn_normal_queue u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  ccn_pkt_t model [$];
  initial begin
    enq_valid = 0; deq = 0; enq_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!head_valid && enq_ready, "empty after reset");
    // one packet: visible at the head one clock later
    enq_pkt = '0; enq_pkt.data = 32'hCAFE; enq_valid = 1;
    @(posedge clk); model.push_back(enq_pkt);
    @(negedge clk); enq_valid = 0;
    check(head_valid && head_pkt.data == 32'hCAFE, "head one clock after write");
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check(head_valid == (model.size() != 0), "head_valid");
      check(enq_ready == (model.size() < DEPTH), "enq_ready is not-full");
      if (model.size() != 0) check(head_pkt == model[0], "head order");
      enq_valid = ($urandom_range(99) < 55);
      enq_pkt = '0;
      enq_pkt.data = $urandom;
      enq_pkt.seq = SEQ_W'($urandom);
      deq = head_valid && ($urandom_range(99) < 45);
      @(posedge clk);
      if (deq) void'(model.pop_front());
      if (enq_valid && enq_ready) model.push_back(enq_pkt);
    end
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
