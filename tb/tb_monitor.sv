// tb_monitor: self-checking test of the monitor (2 ports x 4 VCs). Random
// R delay and PBR values change on the monitor bus every flit cycle; lnk_ok
// pulses once per 65-clock flit cycle. With N_CYCLES_MT = 3 and
// N_CYCLES_TOT = 5 it checks that a sample is taken on every third tick,
// that the 40 records land at sample*8 + port*4 + vc in all three banks
// with the values of that tick, jitter = |R delay - previous R delay| (0 in
// the first sample), that exactly 5 samples are written and done rises, and
// that a new start begins again at address 0.
`timescale 1ns/1ps
module tb_monitor;
  import gm_pkg::*;
  localparam int PORTS = 2, NVC = 4, NS = PORTS * NVC, MT = 3, TOT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, lnk_ok, rd_we, pb_we, jt_we, done;
  logic [SRAM_DW-1:0] n_cycles_mt, n_cycles_tot, samples, rd_data, pb_data, jt_data;
  logic [SRAM_AW-1:0] rd_addr, pb_addr, jt_addr;
  mon_vc_t mon [PORTS][NVC];

  monitor #(.PORTS(PORTS), .NVC(NVC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  // expected records, filled when a sample is due
  int e_rd [TOT * NS], e_pb [TOT * NS], e_jt [TOT * NS];
  int prev [NS];
  int writes = 0;

  always @(posedge clk) if (rd_we) begin
    automatic int a = rd_addr;
    ck(pb_we && jt_we && pb_addr == rd_addr && jt_addr == rd_addr && a < TOT * NS, "aligned banks");
    if (a < TOT * NS)
      ck($signed(rd_data) == e_rd[a] && pb_data == 32'(e_pb[a]) && jt_data == 32'(e_jt[a]),
         $sformatf("record %0d: %0d/%0d %0d/%0d %0d/%0d", a, $signed(rd_data), e_rd[a], pb_data, e_pb[a], jt_data, e_jt[a]));
    writes++;
  end

  task automatic run_samples(int ticks);
    int taken = 0;
    for (int t = 0; t < ticks; t++) begin
      for (int p = 0; p < PORTS; p++)
        for (int v = 0; v < NVC; v++) begin
          mon[p][v].rdelay = DL_W'($urandom_range(0, 200) - 100);
          mon[p][v].pbr_rem = CNT_W'($urandom_range(0, 4095));
        end
      if ((t + 1) % MT == 0 && taken < TOT) begin
        for (int i = 0; i < NS; i++) begin
          automatic int r = mon[i / NVC][i % NVC].rdelay;
          automatic int a = taken * NS + i;
          e_rd[a] = r;
          e_pb[a] = mon[i / NVC][i % NVC].pbr_rem;
          e_jt[a] = (taken == 0) ? 0 : ((r > prev[i]) ? r - prev[i] : prev[i] - r);
          prev[i] = r;
        end
        taken++;
      end
      repeat (12) @(negedge clk);
      lnk_ok = 1; @(negedge clk); lnk_ok = 0;
      repeat (52) @(negedge clk);
    end
  endtask

  initial begin
    start = 0; lnk_ok = 0; n_cycles_mt = MT; n_cycles_tot = TOT;
    for (int p = 0; p < PORTS; p++) for (int v = 0; v < NVC; v++) mon[p][v] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    run_samples(MT * TOT + 4);
    ck(writes == TOT * NS, $sformatf("writes %0d", writes));
    ck(samples == TOT && done, "sample count and done");
    // again from address 0
    writes = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    ck(!done && samples == 0, "restart clears");
    run_samples(MT * TOT);
    ck(writes == TOT * NS && done, "second run");
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
