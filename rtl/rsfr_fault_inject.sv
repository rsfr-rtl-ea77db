// rsfr_fault_inject: forces a router into one of the fault models the
// scheme considers, for evaluation of the online test.
//
// Sits between the routing decision and the output registers and rewrites
// the one-hot set of output ports a packet goes to (bits 0..3 = W, E, S, N,
// bit 4 = local):
//   FM_SAP      stuck-at-port: every packet goes to port cfg.dir;
//   FM_MULTI    multiple copies in space: an extra copy goes to cfg.dir;
//   FM_TURN     a packet on a turn path goes to cfg.dir instead;
//   FM_STRAIGHT a packet on a straight path goes to cfg.dir instead;
//   FM_DROP     the packet vanishes (transient dropping while set).
// A path is straight when it leaves opposite to the side it came in, a turn
// when it leaves through another side; packets from or to the local port
// are neither. The scheme only names the unit of its emulation environment;
// these fault behaviours follow its fault-model definitions. Combinational.
module rsfr_fault_inject
  import rsfr_pkg::*;
(
  input  fcfg_t      cfg,
  input  logic       in_local,
  input  dir_e       in_dir,
  input  logic [4:0] want,      // ports the routing logic chose
  output logic [4:0] act        // ports the packet really goes to
);

  logic [4:0] dmask;
  logic       is_turn, is_straight;
  logic       to_dir;
  dir_e       od;

  always_comb begin
    dmask       = 5'b00001 << cfg.dir;
    od          = DIR_W;
    to_dir      = 1'b0;
    for (int i = 3; i >= 0; i--) if (want[i]) begin od = dir_e'(i); to_dir = 1'b1; end
    is_straight = !in_local && to_dir && od == opp(in_dir);
    is_turn     = !in_local && to_dir && od != opp(in_dir) && od != in_dir;
    act         = want;
    if (want != '0) begin
      unique case (cfg.mode)
        FM_SAP:      act = dmask;
        FM_MULTI:    act = want | dmask;
        FM_TURN:     if (is_turn)     act = dmask;
        FM_STRAIGHT: if (is_straight) act = dmask;
        FM_DROP:     act = '0;
        default:     act = want;
      endcase
    end
  end

endmodule
