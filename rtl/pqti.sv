// pqti: input module of a generator.
//
// Reads the phits arriving from the router and classifies each flit cycle by
// its header phit (phase 0) and its flow-control phit (phase 64):
//   QoS or BE data flit  the generator drains it (ideal sink) and tells the
//                        output module to return a credit for its VC
//                        (qos_enabled/qos_vc, one-clock pulse)
//   CONNECT flit         connection request for that VC (conn_en/conn_vc)
//   CONFIRM flit         the VC's connection is established
//                        (confirm_en/confirm_vc)
//   SYNC flit            accepted, nothing else done
//   credit phit          credit for the named VC to the scheduler
//                        (credit_enabled/credit_vc)
// The phase comes from the generator's control module: links are
// synchronous and flits arrive aligned to the local flit cycle.
// Counters of drained flits and of synchronization flits are kept for
// observation.
module pqti
  import gm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [6:0]        phase,
  input  logic [PHIT_W-1:0] data_in,
  output logic              credit_enabled,
  output logic [VC_W-1:0]   credit_vc,
  output logic              qos_enabled,
  output logic [VC_W-1:0]   qos_vc,
  output logic              conn_en,
  output logic [VC_W-1:0]   conn_vc,
  output logic              confirm_en,
  output logic [VC_W-1:0]   confirm_vc,
  output logic [15:0]       rx_data_cnt,  // data flits drained
  output logic [15:0]       rx_sync_cnt   // synchronization flits seen
);

  flit_type_e ftype;
  logic hdr, ctl;

  assign ftype = flit_type_e'(data_in[15:13]);
  assign hdr   = run && (phase == 7'd0);
  assign ctl   = run && (phase == 7'(CYCLE_PHITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_enabled <= 1'b0;
      credit_vc      <= '0;
      qos_enabled    <= 1'b0;
      qos_vc         <= '0;
      conn_en        <= 1'b0;
      conn_vc        <= '0;
      confirm_en     <= 1'b0;
      confirm_vc     <= '0;
      rx_data_cnt    <= '0;
      rx_sync_cnt    <= '0;
    end else begin
      credit_enabled <= 1'b0;
      qos_enabled    <= 1'b0;
      conn_en        <= 1'b0;
      confirm_en     <= 1'b0;
      if (hdr) begin
        case (ftype)
          FT_QOS, FT_BE: begin
            qos_enabled <= 1'b1;
            qos_vc      <= data_in[VC_W-1:0];
            rx_data_cnt <= rx_data_cnt + 16'd1;
          end
          FT_CONNECT: begin
            conn_en <= 1'b1;
            conn_vc <= data_in[VC_W-1:0];
          end
          FT_CONFIRM: begin
            confirm_en <= 1'b1;
            confirm_vc <= data_in[VC_W-1:0];
          end
          FT_SYNC: rx_sync_cnt <= rx_sync_cnt + 16'd1;
          default: ;
        endcase
      end
      if (ctl && data_in[15]) begin
        credit_enabled <= 1'b1;
        credit_vc      <= data_in[VC_W-1:0];
      end
    end
  end

endmodule
