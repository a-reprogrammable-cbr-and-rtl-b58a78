// tb_subscheduler: self-checking test of one VC's priority-vector entry.
// Walks a VBR VC (CBR_a 1/4 at base priority 512, 3 PBR flits) through its
// life: connection request, confirmation answer, confirmed, CBR and PBR
// entries with their priorities, the SIABP doubling while a CBR flit waits,
// PBR exhaustion, credit exhaustion and the round reload. Every expected
// entry is written out by hand from the rules.
`timescale 1ns/1ps
module tb_subscheduler;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, sample, flit_tick, sel, round_done, credit_arrival, conn_req, confirmed, connected;
  kind_e sel_kind, kind_q;
  vc_cfg_t cfg;
  logic [PRIO_W-1:0] prio_q, qdelay;
  mon_vc_t mon;

  subscheduler #(.INIT_CREDITS(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: kind %s prio %0d", s, kind_q.name(), prio_q); end
  endtask

  // one flit cycle: latch the entry, check it, then apply a choice
  task automatic cycle(kind_e exp_k, int exp_p, bit send, string s);
    @(negedge clk); sample = 1; @(negedge clk); sample = 0;
    ck(kind_q == exp_k && (exp_p < 0 || prio_q == PRIO_W'(exp_p)), s);
    sel = send; sel_kind = kind_q; flit_tick = 1;
    @(negedge clk); flit_tick = 0; sel = 0; round_done = 0;
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  initial begin
    {init, sample, flit_tick, sel, round_done, credit_arrival, conn_req, confirmed} = '0;
    sel_kind = K_NONE;
    cfg = '0; cfg.state = ST_QOS; cfg.bw_cbr = 512; cfg.bw_pbr = 3; cfg.t_delay = 4;
    repeat (2) @(posedge clk); rst_n = 1;
    pulse(init);
    cycle(K_CONN, 0, 1, "connection request");
    cycle(K_NONE, 0, 0, "waiting for confirmation");
    pulse(conn_req);
    cycle(K_CONF, 0, 1, "confirmation owed");
    pulse(confirmed);
    ck(connected, "connected");
    cycle(K_CBR, 512, 1, "CBR due at base priority");   // credits 2 -> 1
    pulse(credit_arrival);                              // 2
    cycle(K_PBR, 3, 1, "PBR, priority = reserve");      // 1, pbr 2
    pulse(credit_arrival);
    cycle(K_PBR, 2, 1, "PBR 2");
    pulse(credit_arrival);
    cycle(K_PBR, 1, 1, "PBR 1");
    pulse(credit_arrival);
    cycle(K_CBR, 512, 0, "CBR due again, not chosen");
    cycle(K_CBR, 1024, 0, "waiting 1: doubled");
    cycle(K_CBR, 2048, 0, "waiting 2: doubled");
    cycle(K_CBR, 2048, 0, "waiting 3: no change");
    cycle(K_CBR, 4095, 1, "waiting 4: saturates, sent");
    ck(mon.pbr_rem == 0, "PBR reserve used up");
    // lag of 4 cycles: the VC is due again at once
    cycle(K_CBR, 512, 1, "catching up");                // credits 2 -> 0 after these
    cycle(K_NONE, 0, 0, "no credit, nothing offered");
    pulse(credit_arrival);
    // round end reloads the PBR reserve
    @(negedge clk); round_done = 1;
    cycle(K_NONE, 0, 0, "nothing due at the round end");
    cycle(K_CBR, 512, 1, "CBR due in the new round");
    pulse(credit_arrival);
    cycle(K_PBR, 3, 0, "PBR reserve reloaded");
    ck(mon.pbr_rem == 3, "monitor sees reload");
    // BE VC
    cfg.state = ST_BE; pulse(init);
    cycle(K_BE, 0, 1, "BE");
    cycle(K_BE, 0, 1, "BE");
    cycle(K_NONE, 0, 0, "BE out of credits");
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
