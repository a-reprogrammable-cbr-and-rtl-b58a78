// subscheduler: one VC's share of the scheduler.
//
// Joins the VC's CONTROL MASK and modified SIABP and turns their state into
// the VC's entry of the priority vector: a kind (what the VC would send) and
// a 12-bit priority. Within the VC a confirmation beats a connection request,
// which beats a CBR flit, which beats a PBR flit, which beats a BE flit. A
// CBR entry carries the SIABP priority, a PBR entry the PBR reserve left, a
// BE entry priority 0; a VC that can send nothing offers kind K_NONE.
//
// Timing: the entry is registered on sample (the start of local scheduling)
// and holds until the next sample, so the MAX network sees a stable vector.
// flit_tick applies the scheduler's choice to the counters (see
// control_mask). The local VC index is the VC number on the link.
module subscheduler
  import gm_pkg::*;
#(
  parameter int INIT_CREDITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  vc_cfg_t           cfg,
  input  logic              sample,        // latch this VC's entry
  input  logic              flit_tick,     // VC_SELECT / RESET strobe
  input  logic              sel,           // this VC chosen
  input  kind_e             sel_kind,
  input  logic              round_done,
  input  logic              credit_arrival,
  input  logic              conn_req,
  input  logic              confirmed,
  output kind_e             kind_q,        // priority vector entry: kind
  output logic [PRIO_W-1:0] prio_q,        // priority vector entry: priority
  output mon_vc_t           mon,
  output logic              connected,
  output logic [PRIO_W-1:0] qdelay
);

  logic cbr_ett, pbr_ett, be_ett, conn_ett, conf_ett;
  logic signed [DL_W-1:0] rate_cnt;
  logic [CNT_W-1:0] cbr_rem, pbr_cnt;
  logic [7:0] credits;
  logic [PRIO_W-1:0] prio;
  kind_e kind;

  control_mask #(.INIT_CREDITS(INIT_CREDITS)) u_mask (
    .clk, .rst_n, .init, .cfg, .flit_tick, .sel, .sel_kind, .round_done,
    .credit_arrival, .conn_req, .confirmed,
    .cbr_ett, .pbr_ett, .be_ett, .conn_ett, .conf_ett, .connected,
    .rate_cnt, .cbr_rem, .pbr_cnt, .credits
  );

  siabp #(.W(PRIO_W)) u_siabp (
    .clk, .rst_n, .init,
    .base_prio (PRIO_W'(cfg.bw_cbr)),
    .flit_tick,
    .selected  (sel && sel_kind == K_CBR),
    .waiting   (cbr_ett),
    .cbr_oe    (cbr_ett),
    .pbr_oe    (pbr_ett),
    .pbr_count (PRIO_W'(pbr_cnt)),
    .prio_out  (prio),
    .qdelay
  );

  always_comb begin
    if      (conf_ett) kind = K_CONF;
    else if (conn_ett) kind = K_CONN;
    else if (cbr_ett)  kind = K_CBR;
    else if (pbr_ett)  kind = K_PBR;
    else if (be_ett)   kind = K_BE;
    else               kind = K_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kind_q <= K_NONE;
      prio_q <= '0;
    end else if (init) begin
      kind_q <= K_NONE;
      prio_q <= '0;
    end else if (sample) begin
      kind_q <= kind;
      prio_q <= (kind == K_CBR || kind == K_PBR) ? prio : '0;
    end
  end

  assign mon.rdelay  = rate_cnt;
  assign mon.pbr_rem = pbr_cnt;

endmodule
