// tb_scheduler: self-checking test of the QoS scheduler with 4 VCs.
// The testbench plays the control module (local_start, max_start, cred_dec)
// and an ideal far end: a CONNECT is answered by a confirmation, every
// data flit is answered by a credit at once. Configuration: VC0 CBR 1/4,
// VC1 CBR 1/8, VC2 VBR 1/8 + 20 PBR flits per round, VC3 BE. Checks the
// MAX network latency (log2(4) = 2 clocks), that a confirmation owed by VC1
// wins first, the connection set-up, and the flits per VC over 400 flit
// cycles with one round reload after 200: CBR rates exact (one more flit
// allowed for the set-up cycles that passed after connection), PBR reserve used
// in full twice, BE filling every slot left.
`timescale 1ns/1ps
module tb_scheduler;
  import gm_pkg::*;
  localparam int NVC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, local_start, max_start, cred_dec, do_reset, sel_valid;
  logic [1:0] sel_vc, high_vc_id;
  kind_e sel_kind, high_kind;
  logic credit_enabled, conn_en, confirm_en, high_valid;
  logic [VC_W-1:0] do_add_credit, conn_vc, confirm_vc;
  logic [PRIO_W-1:0] high_prio;
  vc_cfg_t cfg [NVC];
  mon_vc_t mon [NVC];
  logic [NVC-1:0] connected;

  scheduler #(.NVC(NVC), .INIT_CREDITS(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int cnt [NVC][6];
  int n_conn = 0, n_conf = 0, lat_bad = 0;

  task automatic flit_cycle(bit reset_round, output kind_e k, output int v);
    int lat = 0;
    @(negedge clk); local_start = 1; @(negedge clk); local_start = 0;
    repeat (4) @(negedge clk);
    max_start = 1; @(negedge clk); max_start = 0;
    while (!high_valid) begin @(negedge clk); lat++; end
    if (lat != 1) lat_bad++;      // 2 clocks after max_start
    k = high_kind; v = high_vc_id;
    sel_valid = (k != K_NONE); sel_vc = high_vc_id; sel_kind = k;
    cred_dec = 1; do_reset = reset_round;
    @(negedge clk); cred_dec = 0; do_reset = 0; sel_valid = 0;
    // far end
    if (k == K_CONN) begin confirm_en = 1; confirm_vc = VC_W'(v); @(negedge clk); confirm_en = 0; end
    if (k == K_CBR || k == K_PBR || k == K_BE) begin
      credit_enabled = 1; do_add_credit = VC_W'(v); @(negedge clk); credit_enabled = 0;
    end
  endtask

  initial begin
    kind_e k; int v;
    {init, local_start, max_start, cred_dec, do_reset, sel_valid, credit_enabled, conn_en, confirm_en} = '0;
    sel_vc = 0; sel_kind = K_NONE; do_add_credit = 0; conn_vc = 0; confirm_vc = 0;
    cnt = '{default: 0};
    for (int i = 0; i < NVC; i++) cfg[i] = '0;
    cfg[0].state = ST_QOS; cfg[0].bw_cbr = 512; cfg[0].t_delay = 4;
    cfg[1].state = ST_QOS; cfg[1].bw_cbr = 256; cfg[1].t_delay = 8;
    cfg[2].state = ST_QOS; cfg[2].bw_cbr = 256; cfg[2].t_delay = 8; cfg[2].bw_pbr = 20;
    cfg[3].state = ST_BE;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    // the far end asks VC1 for a connection: the confirmation goes first
    conn_en = 1; conn_vc = 1; @(negedge clk); conn_en = 0;
    flit_cycle(0, k, v);
    ck(k == K_CONF && v == 1, $sformatf("confirmation first, got %s on %0d", k.name(), v));
    // connection set-up of the three QoS VCs
    for (int i = 0; i < 3; i++) begin
      flit_cycle(0, k, v);
      ck(k == K_CONN && v == i, $sformatf("CONNECT %0d, got %s on %0d", i, k.name(), v));
    end
    ck(connected == 4'b0111, "QoS VCs connected");
    for (int f = 0; f < 400; f++) begin
      flit_cycle(f == 199, k, v);
      cnt[v][k]++;
      ck(k != K_NONE, "a slot is never wasted while BE waits");
    end
    ck(cnt[0][K_CBR] >= 100 && cnt[0][K_CBR] <= 101, $sformatf("VC0 CBR %0d", cnt[0][K_CBR]));
    ck(cnt[1][K_CBR] >= 50 && cnt[1][K_CBR] <= 51, $sformatf("VC1 CBR %0d", cnt[1][K_CBR]));
    ck(cnt[2][K_CBR] >= 50 && cnt[2][K_CBR] <= 51, $sformatf("VC2 CBR %0d", cnt[2][K_CBR]));
    ck(cnt[2][K_PBR] == 40,  $sformatf("VC2 PBR %0d (two rounds of 20)", cnt[2][K_PBR]));
    ck(cnt[3][K_BE] == 400 - cnt[0][K_CBR] - cnt[1][K_CBR] - cnt[2][K_CBR] - cnt[2][K_PBR] && cnt[3][K_BE] >= 157, $sformatf("VC3 BE %0d", cnt[3][K_BE]));
    ck(lat_bad == 0, "MAX network latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
