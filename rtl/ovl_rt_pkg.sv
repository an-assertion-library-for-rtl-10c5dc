// Types and constants shared by the run-time assertion chip.
//
// The chip watches its design through probe structs: det_probe_t carries the
// signals of the deterministic assertions, nondet_probe_t those of the
// non-deterministic ones (the classes of the OVL assertion list). The
// constants fix the configuration of each assertion instance in the chip, and
// rt_assert_id_e gives the order of the error scan chain, which a monitor must
// know to tell which assertion failed: position 0 is next to the chip's (tied)
// scan input, position CHAIN_LEN-1 drives the chip's esco pin. When the monitor
// raises escen it sees position CHAIN_LEN-1 first; every esclk pulse brings the
// next lower position to esco. A 0 read back marks a failed assertion.
package ovl_rt_pkg;

  // width of the multi-bit probes
  localparam int PW = 8;

  // configuration of the assertion instances (this design's choices)
  localparam int unsigned INC_VALUE        = 1;
  localparam int unsigned DEC_VALUE        = 1;
  localparam int unsigned DELTA_MIN        = 1;
  localparam int unsigned DELTA_MAX        = 4;
  localparam int unsigned OVF_MIN          = 0;
  localparam int unsigned OVF_MAX          = 200;
  localparam int unsigned UNF_MIN          = 10;
  localparam int unsigned UNF_MAX          = 255;
  localparam int unsigned RANGE_MIN        = 16;
  localparam int unsigned RANGE_MAX        = 240;
  localparam int          AOE_EDGE         = 1;    // rising sampling edge
  localparam int          ONE_COLD_INACT   = 2;    // no idle code allowed
  localparam int          CHANGE_CKS       = 4;
  localparam int          UNCHANGE_CKS     = 4;
  localparam int          TIME_CKS         = 4;
  localparam int          NEXT_CKS         = 2;
  localparam int          FRAME_MIN        = 2;
  localparam int          FRAME_MAX        = 6;
  localparam int          WIDTH_MIN        = 2;
  localparam int          WIDTH_MAX        = 8;
  localparam int          HS_MIN_ACK       = 1;
  localparam int          HS_MAX_ACK       = 8;
  localparam bit          HS_REQ_DROP      = 1'b1;
  localparam int          CS_LEN           = 3;
  localparam int          CS_COND          = 0;

  typedef struct packed {
    logic          always_expr;
    logic          aoe_sample;
    logic          aoe_expr;
    logic [PW-1:0] dec_value;
    logic [PW-1:0] delta_value;
    logic [PW-1:0] even_par;
    logic          imp_ante;
    logic          imp_cons;
    logic [PW-1:0] inc_value;
    logic          never_expr;
    logic [PW-1:0] ovf_value;
    logic [PW-1:0] unf_value;
    logic [PW-1:0] ntr_state;
    logic [PW-1:0] ntr_start;
    logic [PW-1:0] ntr_next;
    logic [PW-1:0] odd_par;
    logic [PW-1:0] one_cold;
    logic [PW-1:0] one_hot;
    logic          prop_expr;
    logic [PW-1:0] qs_state;
    logic [PW-1:0] qs_check;
    logic          qs_sample;
    logic [PW-1:0] tr_state;
    logic [PW-1:0] tr_start;
    logic [PW-1:0] tr_next;
    logic [PW-1:0] zoh;
  } det_probe_t;

  typedef struct packed {
    logic              chg_start;
    logic [PW-1:0]     chg_expr;
    logic [CS_LEN-1:0] cs_events;
    logic              fr_start;
    logic              fr_expr;
    logic              hs_req;
    logic              hs_ack;
    logic              nx_start;
    logic              nx_expr;
    logic [PW-1:0]     rng_expr;
    logic              tm_start;
    logic              tm_expr;
    logic              unc_start;
    logic [PW-1:0]     unc_expr;
    logic              wd_expr;
    logic              wc_start;
    logic [PW-1:0]     wc_expr;
    logic              wc_end;
    logic              wu_start;
    logic [PW-1:0]     wu_expr;
    logic              wu_end;
    logic              win_start;
    logic              win_expr;
    logic              win_end;
  } nondet_probe_t;

  // error scan chain order, position 0 first after the chip's scan input
  typedef enum int {
    A_ALWAYS, A_ALWAYS_ON_EDGE, A_DECREMENT, A_DELTA, A_EVEN_PARITY,
    A_IMPLICATION, A_INCREMENT, A_NEVER, A_NO_OVERFLOW, A_NO_UNDERFLOW,
    A_NO_TRANSITION, A_ODD_PARITY, A_ONE_COLD, A_ONE_HOT, A_PROPOSITION,
    A_QUIESCENT_STATE, A_TRANSITION, A_ZERO_ONE_HOT,
    A_CHANGE, A_CYCLE_SEQUENCE, A_FRAME, A_HANDSHAKE, A_NEXT, A_RANGE,
    A_TIME, A_UNCHANGE, A_WIDTH, A_WIN_CHANGE, A_WIN_UNCHANGE, A_WINDOW
  } rt_assert_id_e;

  localparam int N_DET     = 18;
  localparam int N_NONDET  = 12;
  localparam int CHAIN_LEN = N_DET + N_NONDET;

endpackage
