// generator: traffic GENERATOR of one router port.
//
// A source and an ideal drain of traffic for NVC virtual channels. It holds
// the per-VC configuration (kind of connection, CBR_a and PBR reserves,
// route, T_DELAY, I_DELAY), written word by word over Bus_CONF (conf) by the
// table loader; only words whose port field equals PORT_ID are taken.
// When `run` rises the VC counters are loaded from it (init) and traffic
// starts: QoS VCs first set up their connection (CONNECT out, CONFIRM back),
// then send CBR_a and PBR flits as the scheduler decides; BE VCs fill what
// is left. Four parts (Fig. 2 of the reference design):
//   pqti       input: credits, drained data, set-up flits
//   scheduler  subschedulers + MAX network: which VC sends next
//   gen_ctrl   timing and sequencing (CRTL)
//   pqto       output: flits and credit phits
// mon/lnk_ok form this generator's part of Bus_monitor: the R delay and PBR
// remaining of every VC, with a pulse after each scheduling.
module generator
  import gm_pkg::*;
#(
  parameter int NVC          = 4,
  parameter int K            = 2048,
  parameter int INIT_CREDITS = 4,
  parameter int PORT_ID      = 0,
  localparam int IDW         = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  conf_wr_t          conf,       // Bus_CONF
  input  logic              run,
  input  logic [PHIT_W-1:0] phit_in,
  output logic [PHIT_W-1:0] phit_out,
  output mon_vc_t           mon [NVC],  // Bus_monitor
  output logic              lnk_ok,
  output logic [NVC-1:0]    connected,
  output logic [15:0]       rx_data_cnt,
  output logic [15:0]       rx_sync_cnt
);

  vc_cfg_t cfg [NVC];
  logic    run_q, init;

  // ---- configuration registers (Bus_CONF) ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) cfg[v] <= '0;
    end else if (conf.we && conf.port == PORTF_W'(PORT_ID) && conf.vc < VC_W'(NVC)) begin
      for (int v = 0; v < NVC; v++) begin
        if (conf.vc == VC_W'(v)) begin
          case (conf.field)
            F_STATE:    cfg[v].state    <= vc_state_e'(conf.data[1:0]);
            F_BW_CBR:   cfg[v].bw_cbr   <= conf.data[CNT_W-1:0];
            F_BW_PBR:   cfg[v].bw_pbr   <= conf.data[CNT_W-1:0];
            F_PORT_OUT: cfg[v].port_out <= conf.data[PORTF_W-1:0];
            F_VC_OUT:   cfg[v].vc_out   <= conf.data[VC_W-1:0];
            F_PORT_IN:  cfg[v].port_in  <= conf.data[PORTF_W-1:0];
            F_VC_IN:    cfg[v].vc_in    <= conf.data[VC_W-1:0];
            F_T_DELAY:  cfg[v].t_delay  <= conf.data[DL_W-1:0];
            F_I_DELAY:  cfg[v].i_delay  <= conf.data[DL_W-1:0];
            default: ;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= run;
  end
  assign init = run && !run_q;

  // ---- parts ----
  logic              credit_enabled, qos_enabled, conn_en, confirm_en;
  logic [VC_W-1:0]   credit_vc, qos_vc, conn_vc, confirm_vc;
  logic              local_start, max_start, cred_dec, do_reset, sel_valid;
  logic [IDW-1:0]    sel_vc, high_vc_id, cand_vc;
  kind_e             sel_kind, high_kind, cand_kind;
  logic              high_valid, cand_enabled, credit_sent;
  logic [PRIO_W-1:0] high_prio;
  logic [6:0]        phase;
  logic [15:0]       flit_cnt;
  logic [$clog2(K)-1:0] round_pos;
  logic              ctl_run;

  // counters are loaded in the init clock; scheduling starts one clock later
  assign ctl_run = run_q;

  pqti u_pqti (
    .clk, .rst_n, .run (ctl_run), .phase, .data_in (phit_in),
    .credit_enabled, .credit_vc, .qos_enabled, .qos_vc,
    .conn_en, .conn_vc, .confirm_en, .confirm_vc,
    .rx_data_cnt, .rx_sync_cnt
  );

  scheduler #(.NVC(NVC), .INIT_CREDITS(INIT_CREDITS)) u_sched (
    .clk, .rst_n, .init, .cfg,
    .local_start, .max_start, .cred_dec, .do_reset,
    .sel_valid, .sel_vc, .sel_kind,
    .credit_enabled, .do_add_credit (credit_vc),
    .conn_en, .conn_vc, .confirm_en, .confirm_vc,
    .high_valid, .high_vc_id, .high_kind, .high_prio,
    .mon, .connected
  );

  gen_ctrl #(.NVC(NVC), .K(K)) u_ctrl (
    .clk, .rst_n, .run (ctl_run),
    .high_valid, .high_vc_id, .high_kind,
    .local_start, .max_start, .cred_dec, .do_reset,
    .sel_valid, .sel_vc, .sel_kind,
    .phase, .flit_cnt, .cand_enabled, .cand_vc, .cand_kind,
    .lnk_ok, .round_pos
  );

  pqto #(.NVC(NVC), .PORT_ID(PORT_ID)) u_pqto (
    .clk, .rst_n, .run (ctl_run), .phase, .flit_cnt,
    .credit_enabled (qos_enabled), .credit_vc (qos_vc),
    .qos_enabled (cand_enabled), .qos_vc (cand_vc), .qos_kind (cand_kind),
    .route_port (cfg[cand_vc].port_out), .route_vc (cfg[cand_vc].vc_out),
    .data_out (phit_out), .credit_sent
  );

endmodule
