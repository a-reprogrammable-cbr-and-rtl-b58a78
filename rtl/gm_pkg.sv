// gm_pkg: constants and types shared by the CBR/VBR traffic Generator/Monitor.
//
// Link format. A link carries one 16-bit phit per clock. A flit cycle is 65
// phits: a 64-phit data flit followed by one flow-control phit (the credit,
// sent in the router's reconfiguration slot). These sizes are the design's
// reference numbers. The layout of the phits inside a flit is this design's
// own choice:
//   phit 0      header   {type[15:13], 5'b0, vc[7:0]}   (vc = link VC)
//   phit 1      route    {port_out[15:8], vc_out[7:0]}  (CONNECT: {own port, own vc})
//   phit 2      time stamp, low 16 bits of the sender's flit-cycle count
//   phit 3..63  payload  {vc[7:0], phit index[7:0]}
//   phit 64     credit   {valid[15], 7'b0, vc[7:0]}
// A flit cycle with nothing to send carries an all-zero (IDLE) flit.
//
// Scheduling. Every VC offers one key {kind, priority} to the MAX network.
// The kind orders the classes (confirmation > connection request > CBR >
// PBR > BE > nothing); the 12-bit priority orders VCs of the same class.
package gm_pkg;

  localparam int PHIT_W      = 16;  // link word
  localparam int FLIT_PHITS  = 64;  // phits of a data flit
  localparam int CYCLE_PHITS = 65;  // flit + flow-control phit
  localparam int PRIO_W      = 12;  // priority / counter width (Fig. 5: 12b)
  localparam int CNT_W       = 12;  // bandwidth counters (flits per round)
  localparam int DL_W        = 16;  // signed CBR rate (deadline) counter
  localparam int VC_W        = 8;   // VC number field
  localparam int PORTF_W     = 8;   // port number field
  localparam int SRAM_AW     = 19;  // 512K words per bank
  localparam int SRAM_DW     = 32;  // bank word
  localparam int CFG_FIELDS  = 9;   // words per VC in the configuration table

  typedef enum logic [2:0] {
    FT_IDLE    = 3'd0,
    FT_SYNC    = 3'd1,
    FT_QOS     = 3'd2,
    FT_BE      = 3'd3,
    FT_CONNECT = 3'd4,
    FT_CONFIRM = 3'd5
  } flit_type_e;

  // Kind of flit a VC asks to send; the numeric order is the class priority.
  typedef enum logic [2:0] {
    K_NONE = 3'd0,
    K_BE   = 3'd1,
    K_PBR  = 3'd2,
    K_CBR  = 3'd3,
    K_CONN = 3'd4,
    K_CONF = 3'd5
  } kind_e;

  // Kind of connection (STATE field of the configuration table).
  typedef enum logic [1:0] {
    ST_OFF = 2'd0,
    ST_QOS = 2'd1,   // CBR, or VBR when BW_PBR > 0
    ST_BE  = 2'd2
  } vc_state_e;

  // Field order of one VC's entry in the configuration table.
  typedef enum logic [3:0] {
    F_STATE    = 4'd0,
    F_BW_CBR   = 4'd1,
    F_BW_PBR   = 4'd2,
    F_PORT_OUT = 4'd3,
    F_VC_OUT   = 4'd4,
    F_PORT_IN  = 4'd5,
    F_VC_IN    = 4'd6,
    F_T_DELAY  = 4'd7,
    F_I_DELAY  = 4'd8
  } cfg_field_e;

  typedef struct packed {
    vc_state_e              state;
    logic [CNT_W-1:0]       bw_cbr;    // CBR_a flits per round
    logic [CNT_W-1:0]       bw_pbr;    // PBR flits per round
    logic [PORTF_W-1:0]     port_out;
    logic [VC_W-1:0]        vc_out;
    logic [PORTF_W-1:0]     port_in;
    logic [VC_W-1:0]        vc_in;
    logic [DL_W-1:0]        t_delay;   // CBR rate C: one flit every C flit cycles
    logic signed [DL_W-1:0] i_delay;   // initial value of the rate counter
  } vc_cfg_t;

  // One word of Bus_CONF: a field of one VC of one port.
  typedef struct packed {
    logic               we;
    logic [PORTF_W-1:0] port;
    logic [VC_W-1:0]    vc;
    cfg_field_e         field;
    logic [SRAM_DW-1:0] data;
  } conf_wr_t;

  // What a generator shows the monitor for one VC (Bus_monitor).
  typedef struct packed {
    logic signed [DL_W-1:0] rdelay;    // CBR rate counter: <= 0 means due or late
    logic [CNT_W-1:0]       pbr_rem;   // PBR reserve left in this round
  } mon_vc_t;

  function automatic flit_type_e kind_to_ftype(kind_e k);
    case (k)
      K_CBR, K_PBR: return FT_QOS;
      K_BE:         return FT_BE;
      K_CONN:       return FT_CONNECT;
      K_CONF:       return FT_CONFIRM;
      default:      return FT_IDLE;
    endcase
  endfunction

endpackage
