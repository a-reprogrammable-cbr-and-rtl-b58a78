// gen_ctrl: control module (CRTL) of one generator.
//
// Keeps the generator's time and sequences the scheduler. Time is counted in
// phits (phase 0..64 of a 65-phit flit cycle), flit cycles and rounds of K
// flit cycles. Each flit cycle schedules the flit of the next one:
//   phase 0             local_start: subschedulers latch the priority vector
//   phase LOCAL_CYC     max_start: the vector enters the MAX network
//   high_valid          winner latched; one clock later cred_dec updates the
//                       VC states (do_reset with it on the last flit cycle of
//                       a round)
//   phase 10+log2(NVC)  sched_done: the winner becomes the next candidate and
//                       lnk_ok tells the monitor a sample may be taken
//   phase 64 -> 0       the candidate is handed to the output module
//                       (cand_vc, cand_kind, cand_enabled) for the new cycle
// So a scheduling takes LOCAL_CYC + log2(NVC) + UPD_CYC clocks, the
// 5 + log2(N_CV) + 5 of the reference design, and the flit being sent and the
// next one being scheduled overlap. Nothing runs before `run`.
module gen_ctrl
  import gm_pkg::*;
#(
  parameter int NVC       = 4,
  parameter int K         = 2048,   // flit cycles per round
  parameter int LOCAL_CYC = 5,      // local scheduling
  parameter int UPD_CYC   = 5,      // state update and output synchronisation
  localparam int IDW      = (NVC > 1) ? $clog2(NVC) : 1,
  localparam int RW       = (K > 1) ? $clog2(K) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  // from the scheduler
  input  logic            high_valid,
  input  logic [IDW-1:0]  high_vc_id,
  input  kind_e           high_kind,
  // to the scheduler
  output logic            local_start,
  output logic            max_start,
  output logic            cred_dec,
  output logic            do_reset,
  output logic            sel_valid,
  output logic [IDW-1:0]  sel_vc,
  output kind_e           sel_kind,
  // to the output and input modules
  output logic [6:0]      phase,
  output logic [15:0]     flit_cnt,     // flit cycles since run, wraps
  output logic            cand_enabled,
  output logic [IDW-1:0]  cand_vc,
  output kind_e           cand_kind,
  // to the monitor
  output logic            lnk_ok,
  output logic [RW-1:0]   round_pos
);

  localparam int DONE_PH = LOCAL_CYC + $clog2(NVC) + UPD_CYC;

  logic            nxt_en;
  logic [IDW-1:0]  nxt_vc;
  kind_e           nxt_kind;
  logic            last_phase;

  assign last_phase  = (phase == 7'(CYCLE_PHITS - 1));
  assign local_start = run && (phase == 7'd0);
  assign max_start   = run && (phase == 7'(LOCAL_CYC));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= '0;
      flit_cnt     <= '0;
      round_pos    <= '0;
      cred_dec     <= 1'b0;
      do_reset     <= 1'b0;
      sel_valid    <= 1'b0;
      sel_vc       <= '0;
      sel_kind     <= K_NONE;
      nxt_en       <= 1'b0;
      nxt_vc       <= '0;
      nxt_kind     <= K_NONE;
      cand_enabled <= 1'b0;
      cand_vc      <= '0;
      cand_kind    <= K_NONE;
      lnk_ok       <= 1'b0;
    end else if (!run) begin
      phase        <= '0;
      flit_cnt     <= '0;
      round_pos    <= '0;
      cred_dec     <= 1'b0;
      do_reset     <= 1'b0;
      cand_enabled <= 1'b0;
      nxt_en       <= 1'b0;
      lnk_ok       <= 1'b0;
    end else begin
      cred_dec <= 1'b0;
      do_reset <= 1'b0;
      lnk_ok   <= 1'b0;
      // winner of the MAX network
      if (high_valid) begin
        sel_valid <= (high_kind != K_NONE);
        sel_vc    <= high_vc_id;
        sel_kind  <= high_kind;
        cred_dec  <= 1'b1;
        do_reset  <= (round_pos == RW'(K - 1));
      end
      if (phase == 7'(DONE_PH - 1)) begin
        nxt_en   <= sel_valid;
        nxt_vc   <= sel_vc;
        nxt_kind <= sel_valid ? sel_kind : K_NONE;
        lnk_ok   <= 1'b1;
      end
      // flit cycle boundary
      if (last_phase) begin
        phase        <= '0;
        flit_cnt     <= flit_cnt + 16'd1;
        round_pos    <= (round_pos == RW'(K - 1)) ? '0 : round_pos + RW'(1);
        cand_enabled <= nxt_en;
        cand_vc      <= nxt_vc;
        cand_kind    <= nxt_kind;
        nxt_en       <= 1'b0;
      end else begin
        phase <= phase + 7'd1;
      end
    end
  end

endmodule
