// tb_gen_ctrl: self-checking test of the control module (4 VCs, rounds of
// 8 flit cycles). A model of the scheduler answers each max_start with a
// winner log2(4) = 2 clocks later (VC f mod 4, kind alternating between
// CBR and nothing). Checks, in every flit cycle, the phase of each strobe:
// local_start at 0, max_start at 5, cred_dec one clock after the winner,
// lnk_ok at 10 + log2(4) = 12 (the scheduling latency), the winner on
// sel_* at cred_dec, the candidate handed on at the next flit cycle,
// do_reset on the last flit cycle of each round and the flit count.
`timescale 1ns/1ps
module tb_gen_ctrl;
  import gm_pkg::*;
  localparam int NVC = 4, K = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, high_valid, local_start, max_start, cred_dec, do_reset, sel_valid, cand_enabled, lnk_ok;
  logic [1:0] high_vc_id, sel_vc, cand_vc;
  kind_e high_kind, sel_kind, cand_kind;
  logic [6:0] phase;
  logic [15:0] flit_cnt;
  logic [2:0] round_pos;

  gen_ctrl #(.NVC(NVC), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s (phase %0d flit %0d)", s, phase, flit_cnt); end
  endtask

  // scheduler model: two-stage delay of max_start
  logic [1:0] d;
  int fnum = 0;   // flit cycle being scheduled
  always_ff @(posedge clk) d <= {d[0], max_start};
  assign high_valid = d[1];
  assign high_vc_id = 2'(fnum);
  assign high_kind  = (fnum % 2 == 0) ? K_CBR : K_NONE;

  int n = 0;      // clocks since run
  int resets = 0, lnk = 0;
  always @(posedge clk) if (run) n <= n + 1;

  always @(negedge clk) if (run && n >= 0) begin
    automatic int ph = n % 65, f = n / 65;
    ck(phase == 7'(ph), "phase");
    ck(flit_cnt == 16'(f), "flit count");
    ck(local_start == (ph == 0), "local_start");
    ck(max_start == (ph == 5), "max_start");
    ck(cred_dec == (ph == 8), "cred_dec one clock after the winner");
    ck(lnk_ok == (ph == 12), "lnk_ok after 10 + log2(NVC)");
    if (cred_dec) begin
      ck(sel_vc == 2'(f) && sel_kind == ((f % 2 == 0) ? K_CBR : K_NONE) && sel_valid == (f % 2 == 0), "winner to scheduler");
      ck(do_reset == (f % K == K - 1), "do_reset on last flit cycle of a round");
      if (do_reset) resets++;
    end else ck(!do_reset, "do_reset only with cred_dec");
    if (lnk_ok) lnk++;
    if (f >= 1) ck(cand_enabled == ((f - 1) % 2 == 0) && (!cand_enabled || (cand_vc == 2'(f - 1) && cand_kind == K_CBR)),
                   "candidate of the previous scheduling");
    if (ph == 64) fnum = f + 1;
  end

  initial begin
    run = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); run = 1;
    repeat (20 * 65) @(posedge clk);
    @(negedge clk);
    ck(resets == 2, $sformatf("rounds completed %0d", resets));
    ck(lnk == 20, "one sample tick per flit cycle");
    run = 0;
    @(negedge clk); @(negedge clk);
    ck(phase == 0 && !cand_enabled, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
