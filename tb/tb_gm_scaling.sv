// tb_gm_scaling: the whole Generator/Monitor at 8, 16 and 32 VCs per port
// (two ports each), side by side. Every VC of both ports carries a CBR
// stream of 1/(2*NVC) of the link, so the links are half loaded and every
// VC gets the same share. After 1000 flit cycles each VC must have been
// connected and have sent its share since connection (within 2 flits), and
// the monitor must have written all its records (one sample per 50 flit
// cycles, 4 samples, PORTS*NVC records each; the 2 x 32 sweep uses 64 of
// the 65 clocks of a flit cycle). An ideal router crosses the two ports.
`timescale 1ns/1ps
module tb_gm_scaling;
  import gm_pkg::*;
  localparam int RUN_FC = 1000;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  for (genvar s = 0; s < 3; s++) begin : g_size
    localparam int NVC = 8 << s;
    localparam int NW  = 2 * NVC * CFG_FIELDS + 2;
    logic [SRAM_AW-1:0] tbl_addr, rd_addr, pb_addr, jt_addr;
    logic tbl_re, rd_we, pb_we, jt_we, running, mon_done;
    logic [SRAM_DW-1:0] tbl_rdata, rd_data, pb_data, jt_data, samples;
    logic [PHIT_W-1:0] phit_in [2], phit_out [2];
    logic [SRAM_DW-1:0] tbl [NW];

    gm_top #(.PORTS(2), .NVC(NVC)) dut (.*);
    assign phit_in[0] = phit_out[1];
    assign phit_in[1] = phit_out[0];

    initial begin
      for (int p = 0; p < 2; p++)
        for (int v = 0; v < NVC; v++) begin
          automatic int b = (p * NVC + v) * CFG_FIELDS;
          tbl[b + 0] = SRAM_DW'(ST_QOS);
          tbl[b + 1] = 2048 / (2 * NVC);
          tbl[b + 2] = 0;
          tbl[b + 3] = 1 - p;
          tbl[b + 4] = v;
          tbl[b + 5] = p;
          tbl[b + 6] = v;
          tbl[b + 7] = 2 * NVC;
          tbl[b + 8] = 0;
        end
      tbl[NW - 2] = 50;
      tbl[NW - 1] = 4;
    end
    always_ff @(posedge clk) if (tbl_re) tbl_rdata <= tbl[tbl_addr];

    int n = -1, wr = 0;
    int sent [2][NVC], conn_fc [2][NVC];
    always_ff @(posedge clk) if (!running) n <= -1; else n <= n + 1;
    always @(posedge clk) if (rst_n && rd_we) wr++;
    initial begin sent = '{default: 0}; conn_fc = '{default: -1}; end
    always @(negedge clk) if (running && n >= 0 && n % CYCLE_PHITS == 0 && n / CYCLE_PHITS < RUN_FC) begin
      for (int p = 0; p < 2; p++) begin
        if (phit_out[p][15:13] == FT_QOS) sent[p][phit_out[p][7:0]]++;
        if (phit_in[p][15:13] == FT_CONFIRM) conn_fc[p][phit_in[p][7:0]] = n / CYCLE_PHITS;
      end
    end

    initial begin
      wait (running);
      wait (n == RUN_FC * CYCLE_PHITS);
      for (int p = 0; p < 2; p++)
        for (int v = 0; v < NVC; v++) begin
          automatic int e = (RUN_FC - 1 - conn_fc[p][v]) / (2 * NVC);
          checks++;
          if (conn_fc[p][v] < 0 || sent[p][v] < e - 2 || sent[p][v] > e + 2) begin
            failures++;
            $display("FAIL NVC=%0d port %0d VC %0d: %0d flits, expected %0d", NVC, p, v, sent[p][v], e);
          end
        end
      checks++;
      if (!(mon_done && samples == 4 && wr == 4 * 2 * NVC)) begin
        failures++;
        $display("FAIL NVC=%0d monitor: %0d samples, %0d records", NVC, samples, wr);
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (finished == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((RUN_FC + 20) * CYCLE_PHITS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
