// tb_control_mask: self-checking test of one VC's transmit conditions.
// Part 1, a directed run: a VBR VC (one CBR_a flit every 4 flit cycles,
// 512 per round, 10 PBR flits) is connected and always sent what it offers;
// exactly 10 PBR flits and one CBR flit every 4 cycles must come out.
// Part 2, random inputs (ticks, selections, credits, round ends, set-up
// flits) with every output compared each clock against a model of the
// transmit rules and counter updates.
`timescale 1ns/1ps
module tb_control_mask;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, flit_tick, sel, round_done, credit_arrival, conn_req, confirmed;
  kind_e sel_kind;
  vc_cfg_t cfg;
  logic cbr_ett, pbr_ett, be_ett, conn_ett, conf_ett, connected;
  logic signed [DL_W-1:0] rate_cnt;
  logic [CNT_W-1:0] cbr_rem, pbr_cnt;
  logic [7:0] credits;

  control_mask #(.INIT_CREDITS(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", s, $time); end
  endtask

  // ---- model ----
  int m_dl, m_cbr, m_pbr, m_cr; bit m_conn, m_sent, m_conf;
  function automatic bit m_qos(); return cfg.state == ST_QOS && m_conn; endfunction
  function automatic bit m_due(); return m_cbr > 0 && m_dl < 1; endfunction

  task automatic compare();
    ck(cbr_ett == (m_qos() && m_cr > 0 && m_due()), "cbr_ett");
    ck(pbr_ett == (m_qos() && m_cr > 0 && !m_due() && m_pbr > 0), "pbr_ett");
    ck(be_ett == (cfg.state == ST_BE && m_cr > 0), "be_ett");
    ck(conn_ett == (cfg.state == ST_QOS && !m_conn && !m_sent), "conn_ett");
    ck(conf_ett == m_conf, "conf_ett");
    ck(rate_cnt == DL_W'(m_dl) && cbr_rem == CNT_W'(m_cbr) && pbr_cnt == CNT_W'(m_pbr) && credits == 8'(m_cr),
       $sformatf("counters dl %0d/%0d cbr %0d/%0d pbr %0d/%0d cr %0d/%0d", rate_cnt, m_dl, cbr_rem, m_cbr, pbr_cnt, m_pbr, credits, m_cr));
  endtask

  task automatic step();
    bit s_cbr, s_pbr, s_be;
    @(posedge clk);
    if (init) begin
      m_dl = cfg.i_delay; m_cbr = cfg.bw_cbr; m_pbr = cfg.bw_pbr; m_cr = 4; m_conn = 0; m_sent = 0; m_conf = 0;
    end else begin
      s_cbr = flit_tick && sel && sel_kind == K_CBR;
      s_pbr = flit_tick && sel && sel_kind == K_PBR;
      s_be  = flit_tick && sel && sel_kind == K_BE;
      m_cr = (m_cr + credit_arrival - (s_cbr || s_pbr || s_be)) & 255;
      if (flit_tick && m_qos()) begin
        if (s_cbr) m_dl = m_dl + cfg.t_delay - 1;
        else if (m_dl > -32768) m_dl = m_dl - 1;
      end
      if (flit_tick) begin
        m_cbr = ((round_done ? cfg.bw_cbr : m_cbr) - (s_cbr && !round_done)) & 12'hfff;
        m_pbr = ((round_done ? cfg.bw_pbr : m_pbr) - (s_pbr && !round_done)) & 12'hfff;
      end
      if (flit_tick && sel && sel_kind == K_CONN) m_sent = 1;
      if (confirmed && cfg.state == ST_QOS) m_conn = 1;
      if (conn_req) m_conf = 1; else if (flit_tick && sel && sel_kind == K_CONF) m_conf = 0;
    end
    #1;
  endtask

  initial begin
    int n_cbr = 0, n_pbr = 0, last_cbr = -1, gap_bad = 0;
    {init, flit_tick, sel, round_done, credit_arrival, conn_req, confirmed} = '0;
    sel_kind = K_NONE;
    cfg = '0; cfg.state = ST_QOS; cfg.bw_cbr = 512; cfg.bw_pbr = 10; cfg.t_delay = 4;
    repeat (2) @(posedge clk); rst_n = 1;
    init = 1; step(); init = 0; compare();
    ck(conn_ett && !cbr_ett, "connection asked first");
    flit_tick = 1; sel = 1; sel_kind = K_CONN; step(); flit_tick = 0; sel = 0;
    ck(!conn_ett, "connection asked once");
    confirmed = 1; step(); confirmed = 0; compare();
    // directed: send whatever is offered, credit comes back at once
    for (int f = 0; f < 100; f++) begin
      sel = cbr_ett || pbr_ett;
      sel_kind = cbr_ett ? K_CBR : K_PBR;
      if (cbr_ett) begin
        if (last_cbr >= 0 && f - last_cbr != 4) gap_bad++;
        last_cbr = f; n_cbr++;
      end
      if (pbr_ett) n_pbr++;
      credit_arrival = sel;
      flit_tick = 1; step(); flit_tick = 0; credit_arrival = 0; sel = 0;
      compare();
    end
    ck(n_pbr == 10, $sformatf("PBR flits %0d", n_pbr));
    ck(n_cbr == 25 && gap_bad == 0, $sformatf("CBR flits %0d, bad gaps %0d", n_cbr, gap_bad));

    // random
    for (int i = 0; i < 6000; i++) begin
      if ($urandom_range(0, 400) == 0) begin
        cfg.state = vc_state_e'($urandom_range(0, 2));
        cfg.bw_cbr = CNT_W'($urandom_range(0, 20)); cfg.bw_pbr = CNT_W'($urandom_range(0, 20));
        cfg.t_delay = DL_W'($urandom_range(1, 9)); cfg.i_delay = DL_W'($urandom_range(0, 5));
        init = 1;
      end else init = 0;
      flit_tick = $urandom_range(0, 1);
      sel = $urandom_range(0, 1);
      sel_kind = kind_e'($urandom_range(0, 5));
      round_done = ($urandom_range(0, 30) == 0);
      credit_arrival = ($urandom_range(0, 2) == 0);
      conn_req = ($urandom_range(0, 50) == 0);
      confirmed = ($urandom_range(0, 50) == 0);
      step();
      compare();
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
