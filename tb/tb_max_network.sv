// tb_max_network: self-checking test of the MAX network with 8 inputs.
// Feeds a new random priority vector every clock (small key range, so ties
// are frequent) and checks that each result leaves exactly log2(8) = 3
// clocks later, carries the largest key and, on a tie, the lowest index.
`timescale 1ns/1ps
module tb_max_network;
  localparam int N = 8, KW = 15, L = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [N-1:0][KW-1:0] keys;
  logic [KW-1:0] max_key;
  logic [2:0] max_id;

  max_network #(.N(N), .KEY_W(KW)) dut (.*);

  int checks = 0, failures = 0;
  int hk [4000], hi [4000];
  bit hv [4000];
  int sent = 0, got = 0;

  // the result for the vector driven in loop step t is visible in step t + L
  task automatic check_out(int t);
    if (out_valid) got++;
    if (t >= L) begin
      checks++;
      if (out_valid != hv[t - L] || (hv[t - L] && (max_key != KW'(hk[t - L]) || max_id != 3'(hi[t - L])))) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got %0d@%0d valid %0d, want %0d@%0d valid %0d",
                                    t, max_key, max_id, out_valid, hk[t - L], hi[t - L], hv[t - L]);
      end
    end
  endtask

  initial begin
    in_valid = 0; keys = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000 + L + 1; t++) begin
      @(negedge clk);
      check_out(t);
      in_valid = (t < 3000) && ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N; i++) keys[i] = KW'((t % 2) ? $urandom_range(0, 6) : $urandom);
      begin
        automatic int bk = -1, bi = 0;
        for (int i = 0; i < N; i++) if (int'(keys[i]) > bk) begin bk = keys[i]; bi = i; end
        hk[t] = bk; hi[t] = bi; hv[t] = in_valid;
        if (in_valid) sent++;
      end
    end
    checks++;
    if (got != sent) begin failures++; $display("FAIL %0d results for %0d vectors", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
