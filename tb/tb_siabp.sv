// tb_siabp: self-checking test of the modified SIABP priority.
// Drives random flit ticks with random selected/waiting/output-enable
// inputs and compares the priority and delay outputs, every clock, with a
// model of the rule: the delay counts the flit cycles a CBR flit waits, and
// the priority doubles (saturating) each time the delay reaches a power of
// two; a CBR selection restarts both. Also checks an exact doubling
// sequence 5, 10, 20, 40 from a fixed start.
`timescale 1ns/1ps
module tb_siabp;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, flit_tick, selected, waiting, cbr_oe, pbr_oe;
  logic [W-1:0] base_prio, pbr_count, prio_out, qdelay;

  siabp #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  // reference state
  int m_q = 1, m_np = 1, m_pr = 0;

  task automatic compare(string tag);
    int exp_out = cbr_oe ? m_pr : (pbr_oe ? pbr_count : 0);
    checks++;
    if (prio_out !== W'(exp_out) || qdelay !== W'(m_q)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: prio %0d/%0d delay %0d/%0d", tag, prio_out, exp_out, qdelay, m_q);
    end
  endtask

  task automatic step();
    @(posedge clk);
    if (init) begin m_q = 1; m_np = 1; m_pr = base_prio; end
    else if (flit_tick) begin
      if (selected) begin m_q = 1; m_np = 1; m_pr = base_prio; end
      else if (waiting) begin
        automatic bit hit = (m_q == m_np);
        if (m_q != (1 << W) - 1) m_q++;
        if (hit) begin
          m_np = (m_np << 1) & ((1 << W) - 1);
          m_pr = (m_pr >= (1 << (W - 1))) ? (1 << W) - 1 : m_pr << 1;
        end
      end
    end
    #1;
  endtask

  initial begin
    {init, flit_tick, selected, waiting, cbr_oe, pbr_oe} = '0;
    base_prio = 5; pbr_count = 77;
    repeat (2) @(posedge clk);
    rst_n = 1;
    init = 1; step(); init = 0;
    cbr_oe = 1;
    // fixed sequence: waiting every tick
    waiting = 1;
    for (int i = 0; i < 8; i++) begin
      flit_tick = 1; step(); flit_tick = 0;
      compare("doubling");
    end
    checks++;
    if (prio_out != 12'd5 * 16) begin failures++; $display("FAIL after 8 waits: %0d", prio_out); end
    // random
    for (int i = 0; i < 4000; i++) begin
      flit_tick = ($urandom_range(0, 3) != 0);
      selected  = ($urandom_range(0, 15) == 0);
      waiting   = ($urandom_range(0, 7) != 0);
      cbr_oe    = $urandom_range(0, 1);
      pbr_oe    = $urandom_range(0, 1);
      pbr_count = W'($urandom);
      if ($urandom_range(0, 200) == 0) base_prio = W'($urandom_range(1, 600));
      init      = ($urandom_range(0, 500) == 0);
      step();
      compare("random");
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
