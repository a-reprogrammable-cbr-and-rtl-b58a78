// tb_pqto: self-checking test of the output module (port 3). For 200 flit
// cycles it sets a random candidate (or none) and sometimes raises a credit
// notice during the cycle, and checks every phit of the link against the
// format: header {type, VC}, route (or {port, VC} for CONNECT), time stamp,
// payload {VC, phase}, credit phit {1, VC} in phase 64 when a notice came
// earlier in the same cycle, all zero for an IDLE flit.
`timescale 1ns/1ps
module tb_pqto;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, credit_enabled, qos_enabled, credit_sent;
  logic [6:0] phase;
  logic [15:0] flit_cnt;
  logic [VC_W-1:0] credit_vc, route_vc;
  logic [PORTF_W-1:0] route_port;
  logic [1:0] qos_vc;
  kind_e qos_kind;
  logic [PHIT_W-1:0] data_out;

  pqto #(.NVC(4), .PORT_ID(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s: %h", s, data_out); end
  endtask

  initial begin
    int n_cred = 0;
    run = 0; phase = 0; flit_cnt = 0; credit_enabled = 0; credit_vc = 0; qos_enabled = 0;
    qos_vc = 0; qos_kind = K_NONE; route_port = 0; route_vc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); run = 1;
    for (int f = 0; f < 200; f++) begin
      automatic bit en = $urandom_range(0, 3) != 0;
      automatic kind_e k = kind_e'($urandom_range(1, 5));
      automatic int cr_at = $urandom_range(0, 1) ? $urandom_range(1, 60) : -1;
      automatic int cv = $urandom_range(0, 255);
      automatic flit_type_e t = en ? kind_to_ftype(k) : FT_IDLE;
      flit_cnt = 16'(f);
      qos_enabled = en; qos_kind = k; qos_vc = 2'($urandom); route_port = 8'($urandom); route_vc = 8'($urandom);
      for (int p = 0; p < CYCLE_PHITS; p++) begin
        phase = 7'(p);
        #1;
        if (p == CYCLE_PHITS - 1)
          ck(data_out == ((cr_at >= 0) ? {1'b1, 7'b0, 8'(cv)} : 16'h0) && credit_sent == (cr_at >= 0), "credit phit");
        else if (t == FT_IDLE) ck(data_out == 0, "idle flit");
        else if (p == 0) ck(data_out == {t, 5'b0, 6'b0, qos_vc}, "header");
        else if (p == 1) ck(data_out == ((t == FT_CONNECT) ? {8'd3, 6'b0, qos_vc} : {route_port, route_vc}), "route");
        else if (p == 2) ck(data_out == 16'(f), "time stamp");
        else ck(data_out == {6'b0, qos_vc, 1'b0, 7'(p)}, "payload");
        if (p == cr_at) begin credit_enabled = 1; credit_vc = 8'(cv); n_cred++; end
        @(negedge clk);
        credit_enabled = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
