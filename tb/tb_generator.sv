// tb_generator: self-checking test of one traffic generator (4 VCs, rounds
// of 64 flit cycles) whose link is looped back on itself, so it is both the
// source and the drain of its own traffic. The configuration is written
// over Bus_CONF: VC0 VBR (CBR_a 1/4, 16 per round, 8 PBR), VC1 BE, VC2 CBR
// 1/8 (8 per round), VC3 off. Checks the connection set-up through the
// loop, the flits per VC in rounds 2 to 5 (16 + 8, 8 and the 32 BE slots
// left), that every data flit is drained and credited, one lnk_ok per flit
// cycle, and the PBR reserve the monitor bus shows early and late in a
// round. (The credit of the very last flit may still be on its way.)
`timescale 1ns/1ps
module tb_generator;
  import gm_pkg::*;
  localparam int NVC = 4, K = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  conf_wr_t conf;
  logic run, lnk_ok;
  logic [PHIT_W-1:0] phit_in, phit_out;
  mon_vc_t mon [NVC];
  logic [NVC-1:0] connected;
  logic [15:0] rx_data_cnt, rx_sync_cnt;

  generator #(.NVC(NVC), .K(K), .INIT_CREDITS(4), .PORT_ID(0)) dut (.*);
  assign phit_in = phit_out;

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  task automatic wr(int v, cfg_field_e f, int d, int port = 0);
    @(negedge clk);
    conf.we = 1; conf.port = 8'(port); conf.vc = 8'(v); conf.field = f; conf.data = 32'(d);
    @(negedge clk); conf.we = 0;
  endtask

  int pbr_early = -1, pbr_late = -1;
  int n = -1, tx_data = 0, lnk = 0, conn = 0, conf_f = 0, credits = 0;
  int cnt [8][NVC];
  always_ff @(posedge clk) if (run) n <= n + 1;
  always @(negedge clk) if (run && n >= 0) begin
    automatic int ph = n % 65, f = n / 65;
    if (lnk_ok) lnk++;
    if (ph == 0) begin
      automatic flit_type_e t = flit_type_e'(phit_out[15:13]);
      if (t == FT_QOS || t == FT_BE) begin
        tx_data++;
        if (f / K < 8) cnt[f / K][phit_out[1:0]]++;
      end
      if (t == FT_CONNECT) conn++;
      if (t == FT_CONFIRM) conf_f++;
    end
    if (ph == 64 && phit_out[15]) credits++;
    if (f == 2 * K + 1 && ph == 20) pbr_early = mon[0].pbr_rem;
    if (f == 2 * K + 48 && ph == 20) pbr_late = mon[0].pbr_rem;
  end

  initial begin
    conf = '0; run = 0; cnt = '{default: 0};
    repeat (2) @(posedge clk); rst_n = 1;
    wr(0, F_STATE, ST_QOS); wr(0, F_BW_CBR, 16); wr(0, F_BW_PBR, 8); wr(0, F_T_DELAY, 4);
    wr(1, F_STATE, ST_BE);
    wr(2, F_STATE, ST_QOS); wr(2, F_BW_CBR, 8); wr(2, F_T_DELAY, 8);
    wr(3, F_STATE, ST_QOS, 1);          // another port's word: ignored
    ck(dut.cfg[3].state == ST_OFF, "words of other ports ignored");
    @(negedge clk); run = 1;
    repeat (6 * K * 65) @(posedge clk);
    @(negedge clk);
    ck(connected == 4'b0101, "QoS VCs connected through the loop");
    ck(conn == 2 && conf_f == 2, $sformatf("set-up flits %0d/%0d", conn, conf_f));
    for (int r = 2; r < 6; r++) begin
      ck(cnt[r][0] == 24, $sformatf("round %0d VC0 %0d", r, cnt[r][0]));
      ck(cnt[r][2] == 8,  $sformatf("round %0d VC2 %0d", r, cnt[r][2]));
      ck(cnt[r][1] == 32, $sformatf("round %0d BE %0d", r, cnt[r][1]));
      ck(cnt[r][3] == 0,  "VC3 silent");
    end
    ck(rx_data_cnt == 16'(tx_data) && (credits == tx_data || credits == tx_data - 1), $sformatf("drained %0d credited %0d sent %0d", rx_data_cnt, credits, tx_data));
    ck(lnk == 6 * K, $sformatf("lnk_ok %0d", lnk));
    ck(pbr_early >= 5 && pbr_early < 8 && pbr_late == 0 && mon[2].pbr_rem == 0, $sformatf("PBR reserve on Bus_monitor %0d -> %0d", pbr_early, pbr_late));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * K * 65 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
