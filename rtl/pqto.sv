// pqto: output module of a generator.
//
// Drives the generator's link to the router, one phit per clock, as a
// function of the flit-cycle phase:
//   phase 0      header {flit type, VC} of the flit chosen by the control
//                module (cand_*); an IDLE flit (all zero) when none
//   phase 1      route {PORT_OUT, VC_OUT} of that VC; for a CONNECT flit
//                {own port, VC} so the far end can answer
//   phase 2      time stamp (low bits of the flit-cycle count)
//   phase 3..63  payload {VC, phase}
//   phase 64     flow-control phit: a credit for the VC named by the input
//                module (credit_enabled/credit_vc) in this flit cycle, if any
// The phit is combinational from registered state (phase, candidate, route).
// A credit notice that arrives after phase 64 waits for the next flit
// cycle; one is pending at a time (the input module drains one flit per
// cycle, so one credit per cycle suffices).
module pqto
  import gm_pkg::*;
#(
  parameter int NVC     = 4,
  parameter int PORT_ID = 0,
  localparam int IDW    = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic [6:0]         phase,
  input  logic [15:0]        flit_cnt,
  // credit owed (from the input module)
  input  logic               credit_enabled,
  input  logic [VC_W-1:0]    credit_vc,
  // flit to send this cycle (from the control module)
  input  logic               qos_enabled,
  input  logic [IDW-1:0]     qos_vc,
  input  kind_e              qos_kind,
  input  logic [PORTF_W-1:0] route_port,  // PORT_OUT of qos_vc
  input  logic [VC_W-1:0]    route_vc,    // VC_OUT of qos_vc
  output logic [PHIT_W-1:0]  data_out,
  output logic               credit_sent   // pulse: a credit phit went out
);

  logic            cred_pend;
  logic [VC_W-1:0] cred_vc_q;
  flit_type_e      ftype;
  logic            ctl;

  assign ftype       = qos_enabled ? kind_to_ftype(qos_kind) : FT_IDLE;
  assign ctl         = run && (phase == 7'(CYCLE_PHITS - 1));
  assign credit_sent = ctl && cred_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cred_pend <= 1'b0;
      cred_vc_q <= '0;
    end else if (credit_enabled) begin
      cred_pend <= 1'b1;
      cred_vc_q <= credit_vc;
    end else if (ctl) begin
      cred_pend <= 1'b0;
    end
  end

  always_comb begin
    data_out = '0;
    if (run) begin
      if (phase == 7'(CYCLE_PHITS - 1)) begin
        if (cred_pend) data_out = {1'b1, 7'b0, cred_vc_q};
      end else if (ftype != FT_IDLE) begin
        case (phase)
          7'd0:    data_out = {ftype, 5'b0, VC_W'(qos_vc)};
          7'd1:    data_out = (ftype == FT_CONNECT) ? {PORTF_W'(PORT_ID), VC_W'(qos_vc)}
                                                    : {route_port, route_vc};
          7'd2:    data_out = flit_cnt;
          default: data_out = {VC_W'(qos_vc), 1'b0, phase};
        endcase
      end
    end
  end

endmodule
