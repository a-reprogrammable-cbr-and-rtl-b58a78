// tb_init_tables: self-checking test of the configuration loader (2 ports,
// 4 VCs). A synchronous SRAM model (data one clock after the address) holds
// a table of distinct values. Checks that every VC field appears exactly
// once on Bus_CONF with the right port, VC, field and value, in table
// order, that N_CYCLES_MT and N_CYCLES_TOT are taken from the last two
// words, that the bank is read once per clock, and that done rises and a
// second start loads the table again.
`timescale 1ns/1ps
module tb_init_tables;
  import gm_pkg::*;
  localparam int PORTS = 2, NVC = 4, NW = PORTS * NVC * CFG_FIELDS + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, tbl_re, done;
  logic [SRAM_AW-1:0] tbl_addr;
  logic [SRAM_DW-1:0] tbl_rdata, n_cycles_mt, n_cycles_tot;
  conf_wr_t conf;

  init_tables #(.PORTS(PORTS), .NVC(NVC)) dut (.*);

  logic [SRAM_DW-1:0] mem [NW];
  always_ff @(posedge clk) if (tbl_re) tbl_rdata <= mem[tbl_addr[6:0]];

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  int seen = 0, reads = 0;
  always @(negedge clk) begin
    if (conf.we) begin
      automatic int w = seen % (PORTS * NVC * CFG_FIELDS);
      ck(conf.port == 8'(w / (NVC * CFG_FIELDS)) && conf.vc == 8'((w / CFG_FIELDS) % NVC)
         && conf.field == cfg_field_e'(w % CFG_FIELDS) && conf.data == mem[w], $sformatf("Bus_CONF word %0d", w));
      seen++;
    end
    if (tbl_re) begin
      ck(tbl_addr == SRAM_AW'(reads % NW), "sequential read");
      reads++;
    end
  end

  initial begin
    int t;
    start = 0;
    for (int i = 0; i < NW; i++) mem[i] = 32'h1000 * i + 32'(i * 7 + 3);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pass = 1; pass <= 2; pass++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 0;
      while (!done && t < 500) begin @(negedge clk); t++; end
      ck(done, "done");
      ck(t >= NW && t <= NW + 4, $sformatf("load time %0d clocks", t));
      ck(seen == pass * PORTS * NVC * CFG_FIELDS, $sformatf("words on Bus_CONF %0d", seen));
      ck(reads == pass * NW, "each word read once");
      ck(n_cycles_mt == mem[NW - 2] && n_cycles_tot == mem[NW - 1], "monitor parameters");
      repeat (5) @(negedge clk);
      ck(done && seen == pass * PORTS * NVC * CFG_FIELDS, "quiet after done");
      mem[NW - 1] = 32'd99;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
