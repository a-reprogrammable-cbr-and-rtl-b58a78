// tb_gm_top: end-to-end test of the Generator/Monitor at its default sizes
// (2 ports, 4 VCs per port, rounds of 2048 flit cycles).
//
// The testbench plays the parts outside the design: the table bank of the
// SRAM (an array read with one clock of latency), the three monitor banks
// (arrays written by the monitor) and an ideal router that crosses the two
// ports (port 0 out -> port 1 in and back). The router can also hold back
// the credits from port 1 to port 0 for a while and release them later, and
// inject a SYNC flit.
//
// Traffic: port 0 runs the mixed case (VC0 CBR 1/16, VC1 VBR 1/16 + 16 PBR,
// VC2 VBR 1/8 + 16 PBR, VC3 CBR 1/4); port 1 runs the single-VBR case on
// VC1 (CBR_a 1/4 + 128 PBR flits per round) and fills the rest with BE on
// VC0. The test decodes every flit on the links and checks, against numbers
// computed here from the configuration: the connection set-up, a credit
// echo for every drained data flit, the flits per VC in a round, the PBR
// burst in both rounds, BE filling, the credit stall, the sync flit and
// the monitor's sample records. Each mechanism must occur at least once.
`timescale 1ns/1ps
module tb_gm_top;
  import gm_pkg::*;

  localparam int PORTS = 2, NVC = 4, K = 2048;
  localparam int NW    = PORTS * NVC * CFG_FIELDS + 2;
  localparam int MT    = 16, TOT = 16;            // monitor: every 16 cycles, 16 samples
  localparam int STALL_A = 600, STALL_B = 700;    // credit hold window (flit cycles)
  localparam int SYNC_AT = 900;                   // sync flit into port 1
  localparam int RUN_FC  = K + 400;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [SRAM_AW-1:0] tbl_addr, rd_addr, pb_addr, jt_addr;
  logic               tbl_re, rd_we, pb_we, jt_we, running, mon_done;
  logic [SRAM_DW-1:0] tbl_rdata, rd_data, pb_data, jt_data, samples;
  logic [PHIT_W-1:0]  phit_in [PORTS], phit_out [PORTS];

  gm_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- configuration table ----------------
  logic [SRAM_DW-1:0] tbl [NW];
  task automatic set_vc(int p, int v, vc_state_e st, int bwc, int bwp, int td);
    int b = (p * NVC + v) * CFG_FIELDS;
    tbl[b + 0] = st;
    tbl[b + 1] = bwc;
    tbl[b + 2] = bwp;
    tbl[b + 3] = 1 - p;   // PORT_OUT: the other port
    tbl[b + 4] = v;       // VC_OUT
    tbl[b + 5] = p;       // PORT_IN
    tbl[b + 6] = v;       // VC_IN
    tbl[b + 7] = td;
    tbl[b + 8] = 0;       // I_DELAY
  endtask

  int td [PORTS][NVC];
  int bwp[PORTS][NVC];
  vc_state_e st[PORTS][NVC];

  initial begin
    for (int i = 0; i < NW; i++) tbl[i] = '0;
    st = '{default: ST_OFF}; td = '{default: 0}; bwp = '{default: 0};
    st[0] = '{ST_QOS, ST_QOS, ST_QOS, ST_QOS};
    td[0] = '{16, 16, 8, 4};
    bwp[0] = '{0, 16, 16, 0};
    st[1][0] = ST_BE;
    st[1][1] = ST_QOS; td[1][1] = 4; bwp[1][1] = 128;
    for (int p = 0; p < PORTS; p++)
      for (int v = 0; v < NVC; v++)
        set_vc(p, v, st[p][v], (td[p][v] == 0) ? 0 : K / td[p][v], bwp[p][v], td[p][v]);
    tbl[NW - 2] = MT;
    tbl[NW - 1] = TOT;
  end

  always_ff @(posedge clk) if (tbl_re) tbl_rdata <= tbl[tbl_addr];

  // ---------------- monitor banks ----------------
  logic [SRAM_DW-1:0] rd_mem [TOT*PORTS*NVC], pb_mem [TOT*PORTS*NVC], jt_mem [TOT*PORTS*NVC];
  int n_wr = 0, bad_addr = 0;
  always_ff @(posedge clk) begin
    if (rst_n && rd_we) begin
      if (rd_addr < SRAM_AW'(TOT*PORTS*NVC) && rd_addr == pb_addr && rd_addr == jt_addr && pb_we && jt_we) begin
        rd_mem[rd_addr] <= rd_data;
        pb_mem[rd_addr] <= pb_data;
        jt_mem[rd_addr] <= jt_data;
      end else bad_addr <= bad_addr + 1;
      n_wr <= n_wr + 1;
    end
  end

  // ---------------- time: phase and flit cycle ----------------
  int n = -1;              // clocks since running rose
  int ph, fc;
  always_ff @(posedge clk) begin
    if (!running) n <= -1; else n <= n + 1;
  end
  assign ph = (n >= 0) ? n % CYCLE_PHITS : -1;
  assign fc = (n >= 0) ? n / CYCLE_PHITS : -1;

  // ---------------- ideal router ----------------
  int hold_q[$];
  logic [PHIT_W-1:0] to0, to1;
  always_comb begin
    to1 = phit_out[0];
    to0 = phit_out[1];
    if (ph == CYCLE_PHITS - 1) begin
      if (fc >= STALL_A && fc < STALL_B) to0 = '0;                       // hold back
      else if (!phit_out[1][15] && hold_q.size() > 0)
        to0 = {1'b1, 7'b0, 8'(hold_q[0])};                              // release
    end
    if (fc == SYNC_AT && ph == 0) begin
      // a SYNC flit takes the place of port 0's flit in this cycle
      to1 = {FT_SYNC, 13'b0};
    end else if (fc == SYNC_AT && ph > 0 && ph < CYCLE_PHITS - 1) to1 = '0;
  end
  assign phit_in[0] = to0;
  assign phit_in[1] = to1;

  // ---------------- link decoding ----------------
  int qos_r [2][PORTS][NVC];      // data flits per round
  int be_cnt [PORTS][NVC];
  int conn_cnt [PORTS][NVC], conf_cnt [PORTS][NVC];
  int conn_fc [PORTS][NVC];       // flit cycle in which the VC's CONFIRM arrived
  int win [PORTS][NVC];           // data flits in [conn, conn+300) and round 2 [K, K+300)
  int win2 [PORTS][NVC];
  int held = 0, idle1 = 0, stall_idle = 0, stall_sent = 0, released = 0, sync_sent = 0;
  int credit_echo = 0, rounds_seen = 0;
  logic [PHIT_W-1:0] last_hdr_in [PORTS];
  logic              last_data_in [PORTS];

  initial begin
    qos_r = '{default: 0}; be_cnt = '{default: 0}; conn_cnt = '{default: 0};
    conf_cnt = '{default: 0}; conn_fc = '{default: -1}; win = '{default: 0}; win2 = '{default: 0};
  end

  always @(negedge clk) begin
    if (running && fc >= 0 && fc < RUN_FC) begin
      for (int p = 0; p < PORTS; p++) begin
        automatic flit_type_e t = flit_type_e'(phit_out[p][15:13]);
        automatic int v = phit_out[p][7:0];
        automatic int r = (fc >= K) ? 1 : 0;
        if (ph == 0) begin
          case (t)
            FT_QOS: begin
              qos_r[r][p][v]++;
              if (conn_fc[p][v] >= 0 && fc < conn_fc[p][v] + 300) win[p][v]++;
              if (fc >= K && fc < K + 300) win2[p][v]++;
            end
            FT_BE: be_cnt[p][v]++;
            FT_CONNECT: conn_cnt[p][v]++;
            FT_CONFIRM: conf_cnt[p][v]++;
            default: ;
          endcase
          if (p == 1 && t == FT_IDLE && fc >= 100 && fc < K - 1) idle1++;
          if (p == 0 && fc >= STALL_A + 10 && fc < STALL_B) begin
            if (t == FT_IDLE) stall_idle++;
            else stall_sent++;
          end
          // what arrives on this port
          last_hdr_in[p]  = phit_in[p];
          last_data_in[p] = (phit_in[p][15:13] == FT_QOS || phit_in[p][15:13] == FT_BE);
          if (phit_in[p][15:13] == FT_CONFIRM) conn_fc[p][phit_in[p][7:0]] = fc;
          if (p == 1 && phit_in[p][15:13] == FT_SYNC) sync_sent++;
        end
        if (ph == CYCLE_PHITS - 1) begin
          // every drained data flit is answered by a credit for its VC
          if (last_data_in[p]) begin
            check(phit_out[p] == {1'b1, 7'b0, last_hdr_in[p][7:0]}, $sformatf("credit echo port %0d", p));
            credit_echo++;
          end else
            check(phit_out[p] == '0, $sformatf("no credit without data, port %0d", p));
          // a payload phit never sits in the credit slot
        end
        if (ph == 3 && phit_out[p] != '0)
          check(phit_out[p] == {8'(phit_out[p][15:8]), 8'd3}, "payload pattern");
      end
      // router bookkeeping: held and released credits
      if (ph == CYCLE_PHITS - 1) begin
        if (fc >= STALL_A && fc < STALL_B && phit_out[1][15]) begin
          hold_q.push_back(phit_out[1][7:0]);
          held++;
        end
        else if (!(fc >= STALL_A && fc < STALL_B) && !phit_out[1][15] && hold_q.size() > 0) begin
          void'(hold_q.pop_front());
          released++;
        end
      end
    end
  end

  // priority upgrades seen inside the scheduler of port 0 (SIABP)
  int upgrades = 0;
  always @(posedge clk)
    if (dut.g_gen[0].u_gen.u_sched.g_vc[3].qd > 12'd1 || dut.g_gen[0].u_gen.u_sched.g_vc[0].qd > 12'd1
        || dut.g_gen[0].u_gen.u_sched.g_vc[2].qd > 12'd1 || dut.g_gen[0].u_gen.u_sched.g_vc[1].qd > 12'd1)
      upgrades++;

  // ---------------- run ----------------
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    wait (running);
    wait (fc == RUN_FC);
    @(negedge clk);

    // connection set-up: one CONNECT per QoS VC, one CONFIRM back
    for (int p = 0; p < PORTS; p++)
      for (int v = 0; v < NVC; v++) begin
        automatic int exp = (st[p][v] == ST_QOS) ? 1 : 0;
        check(conn_cnt[p][v] == exp, $sformatf("CONNECT count p%0d v%0d = %0d", p, v, conn_cnt[p][v]));
        check(conf_cnt[1-p][v] == exp, $sformatf("CONFIRM count p%0d v%0d", 1 - p, v));
        check((conn_fc[p][v] >= 0) == (exp == 1), $sformatf("connected p%0d v%0d", p, v));
      end

    // flits per VC in round 1: CBR rate from connection to round end, plus PBR
    for (int p = 0; p < PORTS; p++)
      for (int v = 0; v < NVC; v++)
        if (st[p][v] == ST_QOS) begin
          automatic int cbr = (K - 1 - conn_fc[p][v]) / td[p][v];
          automatic int e = cbr + bwp[p][v];
          check(qos_r[0][p][v] >= e - 2 && qos_r[0][p][v] <= e + 2,
                $sformatf("round 1 flits p%0d v%0d: %0d, expected %0d", p, v, qos_r[0][p][v], e));
        end

    // PBR burst: 300 flit cycles after connection, and again in round 2
    begin
      automatic int e1 = (300 / 4) + 128;
      check(win[1][1] >= e1 - 2 && win[1][1] <= e1 + 2, $sformatf("VBR burst round 1: %0d vs %0d", win[1][1], e1));
      check(win2[1][1] >= e1 - 2 && win2[1][1] <= e1 + 2, $sformatf("VBR burst round 2: %0d vs %0d", win2[1][1], e1));
      check(qos_r[1][0][3] >= 400/4 - 2 && qos_r[1][0][3] <= 400/4 + 2, "CBR 1/4 in round 2");
    end

    // BE fills port 1
    check(be_cnt[1][0] > 1000, $sformatf("BE flits %0d", be_cnt[1][0]));
    check(idle1 == 0, $sformatf("port 1 idle cycles with BE waiting: %0d", idle1));

    // credit stall: port 0 runs out of credits and waits
    check(stall_sent <= PORTS * NVC * 4, $sformatf("flits sent without credits back: %0d", stall_sent));
    check(held > 0 && released == held, "held credits released");
    check(hold_q.size() == 0, "all held credits returned");

    // sync flit accepted and ignored
    check(dut.g_gen[1].rx_sync_cnt == 16'(sync_sent) && sync_sent == 1, "sync flit accepted");

    // monitor records
    check(mon_done && samples == TOT, "monitor sample count");
    check(n_wr == TOT * PORTS * NVC && bad_addr == 0, $sformatf("monitor writes %0d", n_wr));
    for (int s = 0; s < TOT; s++)
      for (int i = 0; i < PORTS * NVC; i++) begin
        automatic int a = s * PORTS * NVC + i;
        automatic int r_now = $signed(rd_mem[a]);
        automatic int r_old = (s == 0) ? r_now : $signed(rd_mem[a - PORTS * NVC]);
        automatic int j = (r_now > r_old) ? r_now - r_old : r_old - r_now;
        check(jt_mem[a] == SRAM_DW'(j), $sformatf("jitter s%0d i%0d", s, i));
        if (s > 0) check(pb_mem[a] <= pb_mem[a - PORTS * NVC], "PBR remaining never grows in a round");
      end
    check(pb_mem[0 * PORTS * NVC + 5] > 0 && pb_mem[(TOT - 1) * PORTS * NVC + 5] == 0,
          "PBR reserve of port 1 VC1 sampled from full to empty");

    // mechanisms
    $display("mechanisms: connect=%0d credit_echo=%0d be=%0d stall_idle=%0d released=%0d sync=%0d upgrades=%0d round2_pbr=%0d samples=%0d",
             conn_cnt[0][0], credit_echo, be_cnt[1][0], stall_idle, released, sync_sent, upgrades, win2[1][1], samples);
    check(credit_echo > 0, "mechanism: credit return");
    check(stall_idle > 0, "mechanism: credit stall");
    check(upgrades > 0, "mechanism: SIABP priority upgrade");
    check(win2[1][1] > 0, "mechanism: round reload");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((RUN_FC + 50) * CYCLE_PHITS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
