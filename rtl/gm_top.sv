// gm_top: CBR/VBR traffic Generator/Monitor for a QoS router.
//
// One GENERATOR per router port, a configuration loader and a MONITOR, as
// they sit next to the router under test on one FPGA. On `start` the loader
// reads the configuration table from the table bank of the external SRAM and
// writes it into the generators over Bus_CONF; then `running` rises and every
// generator sets up its QoS connections and sends CBR, VBR (CBR_a + PBR) and
// BE traffic on its port while draining what arrives. The monitor writes the
// R delay, PBR remaining and jitter of every stream into three more SRAM
// banks every N_CYCLES_MT flit cycles until N_CYCLES_TOT samples are stored.
//
// Outside this module: the router (phit_in/phit_out, one 16-bit phit per
// clock and port, flit cycles of 65 phits aligned on all ports) and the SRAM
// (four banks of 512K x 32 bits: one read, three written; reads return data
// one clock after the address). The defaults are the configuration of the
// reference experiments: two ports, four VCs per port, rounds of 2048 flit
// cycles. INIT_CREDITS, the credits each VC starts with, is this design's
// choice.
module gm_top
  import gm_pkg::*;
#(
  parameter int PORTS        = 2,
  parameter int NVC          = 4,
  parameter int K            = 2048,
  parameter int INIT_CREDITS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // table_readBank
  output logic [SRAM_AW-1:0] tbl_addr,
  output logic               tbl_re,
  input  logic [SRAM_DW-1:0] tbl_rdata,
  // Rdelay_writeBank, PBR_writeBank, Jitter_writeBank
  output logic               rd_we,
  output logic [SRAM_AW-1:0] rd_addr,
  output logic [SRAM_DW-1:0] rd_data,
  output logic               pb_we,
  output logic [SRAM_AW-1:0] pb_addr,
  output logic [SRAM_DW-1:0] pb_data,
  output logic               jt_we,
  output logic [SRAM_AW-1:0] jt_addr,
  output logic [SRAM_DW-1:0] jt_data,
  // router ports
  input  logic [PHIT_W-1:0]  phit_in  [PORTS],
  output logic [PHIT_W-1:0]  phit_out [PORTS],
  // status
  output logic               running,
  output logic [SRAM_DW-1:0] samples,
  output logic               mon_done
);

  conf_wr_t           conf;
  logic [SRAM_DW-1:0] n_cycles_mt, n_cycles_tot;
  logic               cfg_done, start_q;
  mon_vc_t            mon [PORTS][NVC];
  logic [PORTS-1:0]   lnk_ok;

  init_tables #(.PORTS(PORTS), .NVC(NVC)) u_init (
    .clk, .rst_n, .start,
    .tbl_addr, .tbl_re, .tbl_rdata,
    .conf, .n_cycles_mt, .n_cycles_tot, .done (cfg_done)
  );

  // generators run from the end of loading until the next start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      start_q <= 1'b0;
    end else begin
      start_q <= start;
      if (start)         running <= 1'b0;
      else if (cfg_done) running <= 1'b1;
    end
  end

  for (genvar p = 0; p < PORTS; p++) begin : g_gen
    logic [NVC-1:0] connected;
    logic [15:0]    rx_data_cnt, rx_sync_cnt;
    generator #(.NVC(NVC), .K(K), .INIT_CREDITS(INIT_CREDITS), .PORT_ID(p)) u_gen (
      .clk, .rst_n, .conf, .run (running),
      .phit_in (phit_in[p]), .phit_out (phit_out[p]),
      .mon (mon[p]), .lnk_ok (lnk_ok[p]),
      .connected, .rx_data_cnt, .rx_sync_cnt
    );
  end

  monitor #(.PORTS(PORTS), .NVC(NVC)) u_mon (
    .clk, .rst_n, .start (start_q),
    .n_cycles_mt, .n_cycles_tot,
    .lnk_ok (lnk_ok[0]),
    .mon,
    .rd_we, .rd_addr, .rd_data,
    .pb_we, .pb_addr, .pb_data,
    .jt_we, .jt_addr, .jt_data,
    .samples, .done (mon_done)
  );

endmodule
