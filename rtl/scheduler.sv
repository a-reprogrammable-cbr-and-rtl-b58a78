// scheduler: QoS link scheduler of one generator.
//
// One subscheduler per VC builds the priority vector, the MAX network picks
// the VC with the highest {kind, priority}. The scheduling runs once per flit
// cycle, driven by the control module:
//   local_start  every subscheduler latches its entry of the priority vector
//   max_start    the vector enters the MAX network; the winner (high_*)
//                leaves log2(NVC) clocks later with high_valid
//   cred_dec     the control module's update strobe: the chosen VC
//                (sel_vc, sel_kind, sel_valid) is charged for its flit and
//                every other VC's counters advance by one flit cycle
//   do_reset     with cred_dec: the round is complete, reload reserves
// Credits (do_add_credit/credit_enabled), connection requests and
// confirmations from the input module are routed to the VC they name.
module scheduler
  import gm_pkg::*;
#(
  parameter int NVC          = 4,
  parameter int INIT_CREDITS = 4,
  localparam int IDW         = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  vc_cfg_t           cfg [NVC],
  input  logic              local_start,
  input  logic              max_start,
  input  logic              cred_dec,
  input  logic              do_reset,
  input  logic              sel_valid,
  input  logic [IDW-1:0]    sel_vc,
  input  kind_e             sel_kind,
  input  logic              credit_enabled,
  input  logic [VC_W-1:0]   do_add_credit,  // VC of the arriving credit
  input  logic              conn_en,
  input  logic [VC_W-1:0]   conn_vc,
  input  logic              confirm_en,
  input  logic [VC_W-1:0]   confirm_vc,
  output logic              high_valid,
  output logic [IDW-1:0]    high_vc_id,
  output kind_e             high_kind,
  output logic [PRIO_W-1:0] high_prio,
  output mon_vc_t           mon [NVC],
  output logic [NVC-1:0]    connected
);

  localparam int KEY_W = 3 + PRIO_W;

  logic [NVC-1:0][KEY_W-1:0] keys;
  logic [KEY_W-1:0]          max_key;

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    kind_e             k;
    logic [PRIO_W-1:0] p;
    logic [PRIO_W-1:0] qd;
    subscheduler #(.INIT_CREDITS(INIT_CREDITS)) u_sub (
      .clk, .rst_n, .init,
      .cfg            (cfg[v]),
      .sample         (local_start),
      .flit_tick      (cred_dec),
      .sel            (sel_valid && sel_vc == IDW'(v)),
      .sel_kind,
      .round_done     (do_reset),
      .credit_arrival (credit_enabled && do_add_credit == VC_W'(v)),
      .conn_req       (conn_en && conn_vc == VC_W'(v)),
      .confirmed      (confirm_en && confirm_vc == VC_W'(v)),
      .kind_q         (k),
      .prio_q         (p),
      .mon            (mon[v]),
      .connected      (connected[v]),
      .qdelay         (qd)
    );
    assign keys[v] = {k, p};
  end

  max_network #(.N(NVC), .KEY_W(KEY_W)) u_max (
    .clk, .rst_n,
    .in_valid  (max_start),
    .keys,
    .out_valid (high_valid),
    .max_key,
    .max_id    (high_vc_id)
  );

  assign high_kind = kind_e'(max_key[KEY_W-1 -: 3]);
  assign high_prio = max_key[PRIO_W-1:0];

endmodule
