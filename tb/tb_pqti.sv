// tb_pqti: self-checking test of the input module. Sends 300 random flit
// cycles (IDLE, SYNC, QoS, BE, CONNECT, CONFIRM flits with random VCs and
// payload, credit phit present or not) and checks the notices that must
// come out one clock after the header and after the credit phit, that no
// notice comes out at any other time, and the drained-flit and sync counts.
`timescale 1ns/1ps
module tb_pqti;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run;
  logic [6:0] phase;
  logic [PHIT_W-1:0] data_in;
  logic credit_enabled, qos_enabled, conn_en, confirm_en;
  logic [VC_W-1:0] credit_vc, qos_vc, conn_vc, confirm_vc;
  logic [15:0] rx_data_cnt, rx_sync_cnt;

  pqti dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  initial begin
    int n_data = 0, n_sync = 0;
    run = 0; phase = 0; data_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); run = 1;
    for (int f = 0; f < 300; f++) begin
      automatic flit_type_e t = flit_type_e'($urandom_range(0, 5));
      automatic int v = $urandom_range(0, 255);
      automatic bit cr = $urandom_range(0, 1);
      automatic int cv = $urandom_range(0, 255);
      for (int p = 0; p < CYCLE_PHITS; p++) begin
        phase = 7'(p);
        if (p == 0) data_in = (t == FT_IDLE) ? '0 : {t, 5'($urandom), 8'(v)};
        else if (p == CYCLE_PHITS - 1) data_in = cr ? {1'b1, 7'($urandom), 8'(cv)} : {1'b0, 15'($urandom)};
        else data_in = PHIT_W'($urandom);    // payload may look like anything
        @(negedge clk);
        if (p == 0) begin
          ck(qos_enabled == (t == FT_QOS || t == FT_BE) && (!qos_enabled || qos_vc == 8'(v)), "data drained");
          ck(conn_en == (t == FT_CONNECT) && (!conn_en || conn_vc == 8'(v)), "connection request");
          ck(confirm_en == (t == FT_CONFIRM) && (!confirm_en || confirm_vc == 8'(v)), "confirmation");
          ck(!credit_enabled, "no credit from a header");
          if (t == FT_QOS || t == FT_BE) n_data++;
          if (t == FT_SYNC) n_sync++;
        end else if (p == CYCLE_PHITS - 1) begin
          ck(credit_enabled == cr && (!cr || credit_vc == 8'(cv)), "credit");
        end else begin
          ck(!qos_enabled && !conn_en && !confirm_en && !credit_enabled, "nothing from payload");
        end
      end
    end
    ck(rx_data_cnt == 16'(n_data), "drained count");
    ck(rx_sync_cnt == 16'(n_sync), "sync count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
