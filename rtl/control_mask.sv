// control_mask: transmit conditions and bandwidth accounting of one VC.
//
// Holds the VC's counters and decides each flit cycle whether the VC may send
// a CBR flit (cbr_ett) or a PBR flit (pbr_ett):
//   credits != 0 and CBR_BW remained > 0 and rate counter < 1  -> CBR
//   otherwise credits != 0 and PBR counter > 0                 -> PBR
// both only once the VC's connection is established. A BE VC may send
// whenever it holds a credit. A QoS VC that is not yet connected asks for a
// connection flit (conn_ett) once; a VC that received a connection request
// asks to send the confirmation (conf_ett).
//
// Accounting, applied on flit_tick (one pulse per flit cycle, when the
// scheduler's choice is known):
//   CBR flit sent : rate counter += T_DELAY - 1, CBR_BW remained -= 1, credit -= 1
//   PBR flit sent : PBR counter -= 1, credit -= 1, rate counter -= 1
//   BE flit sent  : credit -= 1
//   otherwise     : rate counter -= 1 (once connected)
// round_done reloads CBR_BW remained and the PBR counter from the
// configuration. credit_arrival adds one credit in any clock.
//
// Choices of this design: the rate counter also counts down in flit cycles
// that send a PBR flit (otherwise a VBR stream could never become CBR-due
// while its PBR reserve lasts); "+T_DELAY" and the per-cycle decrement of the
// same flit cycle are merged into +T_DELAY-1 so that T_DELAY = C gives exactly
// one flit each C flit cycles; PBR flits consume a credit like every data
// flit; the bank credit starts at INIT_CREDITS. The rate counter is a signed
// 16-bit value that saturates at its minimum.
module control_mask
  import gm_pkg::*;
#(
  parameter int INIT_CREDITS = 4,
  parameter int CRED_W       = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,           // load start values from cfg
  input  vc_cfg_t                cfg,
  input  logic                   flit_tick,      // apply this flit cycle's choice
  input  logic                   sel,            // this VC was chosen
  input  kind_e                  sel_kind,       // what it sends
  input  logic                   round_done,     // ROUND COMPLETED
  input  logic                   credit_arrival, // CREDIT ARRIVAL for this VC
  input  logic                   conn_req,       // a CONNECT flit arrived on this VC
  input  logic                   confirmed,      // a CONFIRM flit arrived on this VC
  output logic                   cbr_ett,
  output logic                   pbr_ett,
  output logic                   be_ett,
  output logic                   conn_ett,
  output logic                   conf_ett,
  output logic                   connected,
  output logic signed [DL_W-1:0] rate_cnt,       // CBR RATE counter (R delay)
  output logic [CNT_W-1:0]       cbr_rem,        // CBR_BW REMAINED counter
  output logic [CNT_W-1:0]       pbr_cnt,        // PBR counter
  output logic [CRED_W-1:0]      credits         // BANK CREDIT
);

  logic conn_sent, conf_pend;
  logic cbr_due, credit_ok, qos_on;
  logic sent_cbr, sent_pbr, sent_data;
  logic [CNT_W-1:0] cbr_base, pbr_base;

  localparam logic signed [DL_W-1:0] DL_MIN = {1'b1, {(DL_W-1){1'b0}}};

  assign qos_on    = (cfg.state == ST_QOS) && connected;
  assign credit_ok = (credits != '0);
  assign cbr_due   = (cbr_rem != '0) && (rate_cnt < 1);
  assign cbr_ett   = qos_on && credit_ok && cbr_due;
  assign pbr_ett   = qos_on && credit_ok && !cbr_due && (pbr_cnt != '0);
  assign be_ett    = (cfg.state == ST_BE) && credit_ok;
  assign conn_ett  = (cfg.state == ST_QOS) && !connected && !conn_sent;
  assign conf_ett  = conf_pend;

  assign sent_cbr  = flit_tick && sel && (sel_kind == K_CBR);
  assign sent_pbr  = flit_tick && sel && (sel_kind == K_PBR);
  assign sent_data = sent_cbr || sent_pbr || (flit_tick && sel && (sel_kind == K_BE));

  assign cbr_base  = round_done ? cfg.bw_cbr : cbr_rem;
  assign pbr_base  = round_done ? cfg.bw_pbr : pbr_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_cnt  <= '0;
      cbr_rem   <= '0;
      pbr_cnt   <= '0;
      credits   <= '0;
      connected <= 1'b0;
      conn_sent <= 1'b0;
      conf_pend <= 1'b0;
    end else if (init) begin
      rate_cnt  <= cfg.i_delay;
      cbr_rem   <= cfg.bw_cbr;
      pbr_cnt   <= cfg.bw_pbr;
      credits   <= CRED_W'(INIT_CREDITS);
      connected <= 1'b0;
      conn_sent <= 1'b0;
      conf_pend <= 1'b0;
    end else begin
      // bank credit
      credits <= credits + CRED_W'(credit_arrival) - CRED_W'(sent_data);
      // rate counter
      if (flit_tick && qos_on) begin
        if (sent_cbr)
          rate_cnt <= rate_cnt + $signed(cfg.t_delay) - DL_W'(1);
        else if (rate_cnt != DL_MIN)
          rate_cnt <= rate_cnt - DL_W'(1);
      end
      // bandwidth counters
      if (flit_tick) begin
        cbr_rem <= cbr_base - CNT_W'(sent_cbr && !round_done);
        pbr_cnt <= pbr_base - CNT_W'(sent_pbr && !round_done);
      end
      // connection set-up
      if (flit_tick && sel && sel_kind == K_CONN) conn_sent <= 1'b1;
      if (confirmed && cfg.state == ST_QOS) connected <= 1'b1;
      if (conn_req)                                 conf_pend <= 1'b1;
      else if (flit_tick && sel && sel_kind == K_CONF) conf_pend <= 1'b0;
    end
  end

endmodule
