// monitor: samples the state of every data stream into the SRAM banks.
//
// Works beside the generators, in step with them: lnk_ok (one pulse per flit
// cycle, after the scheduling) is its time base. Every n_cycles_mt flit
// cycles it takes a sample of all PORTS x NVC streams, until n_cycles_tot
// samples are stored. A sample is a snapshot of Bus_monitor, written one
// stream per clock into three banks at the same address
//   addr = sample * PORTS * NVC + port * NVC + vc
//   Rdelay_writeBank  R DELAY CBR  : the stream's CBR rate counter (signed;
//                                    <= 0 means a CBR flit is due or late)
//   PBR_writeBank     PBR REMAINING: PBR reserve left in the round
//   Jitter_writeBank  JITTER       : |R delay - R delay of the previous
//                                    sample| (0 in the first sample)
// The previous R delay of every stream is kept in the monitor. What the three
// quantities are is taken from the reference design; how R delay and jitter
// are measured is this design's own reading. A sweep takes PORTS*NVC clocks
// and must end before the next lnk_ok, so PORTS*NVC must stay below the
// 65-clock flit cycle when n_cycles_mt is 1. `start` clears the sample count.
module monitor
  import gm_pkg::*;
#(
  parameter int PORTS = 2,
  parameter int NVC   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SRAM_DW-1:0] n_cycles_mt,
  input  logic [SRAM_DW-1:0] n_cycles_tot,
  input  logic               lnk_ok,
  input  mon_vc_t            mon [PORTS][NVC],
  output logic               rd_we,
  output logic [SRAM_AW-1:0] rd_addr,
  output logic [SRAM_DW-1:0] rd_data,
  output logic               pb_we,
  output logic [SRAM_AW-1:0] pb_addr,
  output logic [SRAM_DW-1:0] pb_data,
  output logic               jt_we,
  output logic [SRAM_AW-1:0] jt_addr,
  output logic [SRAM_DW-1:0] jt_data,
  output logic [SRAM_DW-1:0] samples,
  output logic               done
);

  localparam int NS  = PORTS * NVC;
  localparam int SW  = (NS > 1) ? $clog2(NS) : 1;

  mon_vc_t                 snap  [NS];
  logic signed [DL_W-1:0]  prev  [NS];
  logic                    first;
  logic                    sweeping;
  logic [SW-1:0]           idx;
  logic [SRAM_DW-1:0]      tick_cnt;
  logic [SRAM_AW-1:0]      base;
  logic signed [DL_W:0]    diff;
  logic [DL_W:0]           jabs;
  logic                    take;

  assign done = (samples >= n_cycles_tot);
  assign take = lnk_ok && !done && !sweeping && (tick_cnt + 1 >= n_cycles_mt);
  assign diff = (DL_W+1)'(snap[idx].rdelay) - (DL_W+1)'(prev[idx]);
  assign jabs = diff[DL_W] ? $unsigned(-diff) : $unsigned(diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        snap[s] <= '0;
        prev[s] <= '0;
      end
      first    <= 1'b1;
      sweeping <= 1'b0;
      idx      <= '0;
      tick_cnt <= '0;
      samples  <= '0;
      base     <= '0;
      rd_we <= 1'b0; rd_addr <= '0; rd_data <= '0;
      pb_we <= 1'b0; pb_addr <= '0; pb_data <= '0;
      jt_we <= 1'b0; jt_addr <= '0; jt_data <= '0;
    end else if (start) begin
      first    <= 1'b1;
      sweeping <= 1'b0;
      idx      <= '0;
      tick_cnt <= '0;
      samples  <= '0;
      base     <= '0;
      rd_we <= 1'b0; pb_we <= 1'b0; jt_we <= 1'b0;
    end else begin
      rd_we <= 1'b0; pb_we <= 1'b0; jt_we <= 1'b0;
      if (lnk_ok && !done)
        tick_cnt <= take ? '0 : tick_cnt + 1;
      if (take) begin
        for (int p = 0; p < PORTS; p++)
          for (int v = 0; v < NVC; v++)
            snap[p*NVC+v] <= mon[p][v];
        sweeping <= 1'b1;
        idx      <= '0;
      end else if (sweeping) begin
        rd_we   <= 1'b1;
        pb_we   <= 1'b1;
        jt_we   <= 1'b1;
        rd_addr <= base + SRAM_AW'(idx);
        pb_addr <= base + SRAM_AW'(idx);
        jt_addr <= base + SRAM_AW'(idx);
        rd_data <= SRAM_DW'(snap[idx].rdelay);   // sign-extended
        pb_data <= SRAM_DW'(snap[idx].pbr_rem);
        jt_data <= first ? '0 : SRAM_DW'(jabs);
        prev[idx] <= snap[idx].rdelay;
        if (idx == SW'(NS - 1)) begin
          sweeping <= 1'b0;
          first    <= 1'b0;
          samples  <= samples + 1;
          base     <= base + SRAM_AW'(NS);
        end else begin
          idx <= idx + SW'(1);
        end
      end
    end
  end

endmodule
