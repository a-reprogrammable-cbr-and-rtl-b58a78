// siabp: modified SIABP priority of one VC.
//
// The VC's CBR priority starts at its base value (its CBR bandwidth in flits
// per round) and doubles every time the queuing delay of its waiting CBR flit
// reaches the next power of two, so that the priority grows roughly with the
// ratio of the delay to the flit inter-arrival time. Three registers do it:
// the queuing delay counter, the NPW2 register (next power of two) and the
// current CBR priority register. When the delay count equals NPW2, both NPW2
// and the priority shift left by one. Selecting the VC for a CBR flit sets the
// delay and NPW2 back to 1 and reloads the base priority.
//
// The output is the current VC priority: the CBR priority register when
// cbr_oe is high, the PBR counter when pbr_oe is high, zero otherwise.
//
// Timing: all registers change only on flit_tick (one pulse per flit cycle);
// init loads the start values. The delay counts only while `waiting` is high
// (a CBR flit is due but not sent). Register widths are 12 bits as in the
// reference design; the priority saturates at all-ones instead of
// overflowing, and the counter saturates too (this design's choice).
module siabp #(
  parameter int W = gm_pkg::PRIO_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,        // load start values
  input  logic [W-1:0] base_prio,   // VCi_CBR_PRIORITY
  input  logic         flit_tick,   // one pulse per flit cycle
  input  logic         selected,    // VC_Select: a CBR flit of this VC was chosen
  input  logic         waiting,     // enable count: CBR flit due and not sent
  input  logic         cbr_oe,
  input  logic         pbr_oe,
  input  logic [W-1:0] pbr_count,   // PBR counter of the control mask
  output logic [W-1:0] prio_out,    // CURRENT VC_PRIORITY
  output logic [W-1:0] qdelay       // queuing delay count
);

  logic [W-1:0] npw2_q, prio_q;
  logic         hit;

  assign hit = (qdelay == npw2_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qdelay <= W'(1);
      npw2_q <= W'(1);
      prio_q <= '0;
    end else if (init) begin
      qdelay <= W'(1);
      npw2_q <= W'(1);
      prio_q <= base_prio;
    end else if (flit_tick) begin
      if (selected) begin
        qdelay <= W'(1);
        npw2_q <= W'(1);
        prio_q <= base_prio;
      end else if (waiting) begin
        if (qdelay != '1) qdelay <= qdelay + W'(1);
        if (hit) begin
          npw2_q <= npw2_q << 1;
          prio_q <= prio_q[W-1] ? '1 : (prio_q << 1);
        end
      end
    end
  end

  always_comb begin
    if (cbr_oe)      prio_out = prio_q;
    else if (pbr_oe) prio_out = pbr_count;
    else             prio_out = '0;
  end

endmodule
