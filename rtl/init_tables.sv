// init_tables: configuration loader (INIT / BK TABLES).
//
// On `start` it reads the configuration table from its SRAM bank
// (table_readBank) and forwards every entry to the generators over Bus_CONF.
// Table layout, one 32-bit word per field:
//   word ((port * NVC) + vc) * 9 + f   field f of one VC (order of
//                                      gm_pkg::cfg_field_e: STATE, BW CBR,
//                                      BW PBR, PORT OUT, VC OUT, PORT IN,
//                                      VC IN, T DELAY, I DELAY)
//   word PORTS * NVC * 9               N_CYCLES_MT  (sampling period)
//   word PORTS * NVC * 9 + 1           N_CYCLES_TOT (number of samples)
// The field list comes from the reference design; the word layout and the
// bank timing are this design's own. The bank is read one word per clock,
// data valid one clock after the address (synchronous SRAM). `done` rises
// after the last word and stays high until the next start.
module init_tables
  import gm_pkg::*;
#(
  parameter int PORTS = 2,
  parameter int NVC   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic [SRAM_AW-1:0] tbl_addr,
  output logic               tbl_re,
  input  logic [SRAM_DW-1:0] tbl_rdata,
  output conf_wr_t           conf,          // Bus_CONF
  output logic [SRAM_DW-1:0] n_cycles_mt,
  output logic [SRAM_DW-1:0] n_cycles_tot,
  output logic               done
);

  localparam int NWORDS = PORTS * NVC * CFG_FIELDS + 2;
  localparam int VC_WORDS = PORTS * NVC * CFG_FIELDS;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DONE} state_e;
  state_e state;

  // position of the word whose data arrives now
  logic               rd_v;
  logic [SRAM_AW-1:0] rd_addr;
  logic [PORTF_W-1:0] rd_port;
  logic [VC_W-1:0]    rd_vc;
  logic [3:0]         rd_field;
  // position of the word being addressed now
  logic [PORTF_W-1:0] a_port;
  logic [VC_W-1:0]    a_vc;
  logic [3:0]         a_field;

  assign tbl_re = (state == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      tbl_addr     <= '0;
      a_port       <= '0;
      a_vc         <= '0;
      a_field      <= '0;
      rd_v         <= 1'b0;
      rd_addr      <= '0;
      rd_port      <= '0;
      rd_vc        <= '0;
      rd_field     <= '0;
      conf         <= '0;
      n_cycles_mt  <= '0;
      n_cycles_tot <= '0;
      done         <= 1'b0;
    end else begin
      // pipeline of the read in flight
      rd_v     <= tbl_re;
      rd_addr  <= tbl_addr;
      rd_port  <= a_port;
      rd_vc    <= a_vc;
      rd_field <= a_field;
      conf.we  <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_READ;
          tbl_addr <= '0;
          a_port   <= '0;
          a_vc     <= '0;
          a_field  <= '0;
          done     <= 1'b0;
        end
        S_READ: begin
          if (tbl_addr == SRAM_AW'(NWORDS - 1)) state <= S_DONE;
          tbl_addr <= tbl_addr + SRAM_AW'(1);
          if (a_field == 4'(CFG_FIELDS - 1)) begin
            a_field <= '0;
            if (a_vc == VC_W'(NVC - 1)) begin
              a_vc   <= '0;
              a_port <= a_port + PORTF_W'(1);
            end else begin
              a_vc <= a_vc + VC_W'(1);
            end
          end else begin
            a_field <= a_field + 4'd1;
          end
        end
        S_DONE: begin
          if (!rd_v) done <= 1'b1;
          if (start && done) begin
            state    <= S_READ;
            tbl_addr <= '0;
            a_port   <= '0;
            a_vc     <= '0;
            a_field  <= '0;
            done     <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
      // data of the previous address
      if (rd_v) begin
        if (rd_addr < SRAM_AW'(VC_WORDS)) begin
          conf.we    <= 1'b1;
          conf.port  <= rd_port;
          conf.vc    <= rd_vc;
          conf.field <= cfg_field_e'(rd_field);
          conf.data  <= tbl_rdata;
        end else if (rd_addr == SRAM_AW'(VC_WORDS)) begin
          n_cycles_mt <= tbl_rdata;
        end else begin
          n_cycles_tot <= tbl_rdata;
        end
      end
    end
  end

endmodule
