// rsfr_fault_detect: the online test of the previous router, done by the
// router that receives a packet, plus decoding of the header's fault report.
//
// Previous-router check (scheme Secs. 4.2 and 5.2): from the input port the
// receiving router knows where the previous router P sits and which output
// P used. P's priority list for the packet's destination is computed with
// an rsfr_prio instance. P misrouted the packet if
//   - P was itself the destination (it should have ejected the packet), or
//   - the force bit is 0 and P's output is not its first-priority port, or
//   - the force bit is 1 and P's output is not in its priority list.
// Backtracked packets (self-announcement "01") are not checked. The type of
// a misroute comes from the PID field, P's own input side: if P's supposed
// output was straight across from PID the fault is a straight fault, else a
// turn fault; a misroute at the destination is a general fault.
//
// Header report: when the faulty-router field names P itself, the TOF is a
// self-announcement (dropper, backtrack, clearing, nothing). When it names
// another router that is a neighbour of this one, it reports that
// neighbour's fault type (11: it is fault-free again).
//
// Purely combinational. NX/NY give the mesh size; neighbours outside it do
// not exist.
module rsfr_fault_detect
  import rsfr_pkg::*;
#(
  parameter int unsigned NX = 8,
  parameter int unsigned NY = 8
) (
  input  addr_t cur,
  input  logic  in_local,     // packet came from the local port
  input  dir_e  in_dir,       // otherwise: the port it came through
  input  hdr_t  hdr,
  output addr_t prev_addr,
  output logic  misroute,     // previous router broke the routing algorithm
  output tof_e  mis_tof,      // and its fault type
  output logic  self_drop,    // header: previous router announces it dropped
  output logic  self_bt,      // header: previous router backtracked this packet
  output logic  self_clear,   // header: previous router announces clearing
  output logic  nb_rep,       // header reports a neighbour other than previous
  output dir_e  nb_dir,
  output tof_e  nb_tof
);

  logic       p_at_dest;
  logic [2:0] p_cnt;
  dir_e       p_list [4];
  dir_e       p_out;
  logic       in_list;
  logic       from_prev;

  always_comb begin
    prev_addr = cur;
    unique case (in_dir)
      DIR_W: prev_addr.x = cur.x - 1'b1;
      DIR_E: prev_addr.x = cur.x + 1'b1;
      DIR_S: prev_addr.y = cur.y - 1'b1;
      DIR_N: prev_addr.y = cur.y + 1'b1;
    endcase
  end

  rsfr_prio u_prev_prio (
    .cur(prev_addr), .dest(hdr.dest), .at_dest(p_at_dest), .cnt(p_cnt), .list(p_list)
  );

  assign p_out     = opp(in_dir);
  assign from_prev = !in_local && (hdr.faulty == prev_addr);

  always_comb begin
    in_list = 1'b0;
    for (int k = 0; k < 4; k++)
      if (3'(k) < p_cnt && p_list[k] == p_out) in_list = 1'b1;
  end

  always_comb begin
    self_drop  = from_prev && hdr.tof == SELF_DROPPER;
    self_bt    = from_prev && hdr.tof == SELF_BT;
    self_clear = from_prev && hdr.tof == SELF_CLEAR;

    misroute = 1'b0;
    mis_tof  = TOF_GEN;
    if (!in_local && !self_bt) begin
      if (p_at_dest) begin
        misroute = 1'b1;
      end else if (!hdr.frc ? (p_list[0] != p_out) : !in_list) begin
        misroute = 1'b1;
        mis_tof  = (p_list[0] == opp(hdr.pid)) ? TOF_STRAIGHT : TOF_TURN;
      end
    end

    // report about another router: is it one of our neighbours?
    nb_rep = 1'b0;
    nb_dir = DIR_W;
    nb_tof = hdr.tof;
    if (!in_local && !from_prev) begin
      if (hdr.faulty.y == cur.y && cur.x != '0 && hdr.faulty.x == cur.x - 1'b1) begin
        nb_rep = 1'b1; nb_dir = DIR_W;
      end else if (hdr.faulty.y == cur.y && 32'(cur.x) < NX-1 && hdr.faulty.x == cur.x + 1'b1) begin
        nb_rep = 1'b1; nb_dir = DIR_E;
      end else if (hdr.faulty.x == cur.x && cur.y != '0 && hdr.faulty.y == cur.y - 1'b1) begin
        nb_rep = 1'b1; nb_dir = DIR_S;
      end else if (hdr.faulty.x == cur.x && 32'(cur.y) < NY-1 && hdr.faulty.y == cur.y + 1'b1) begin
        nb_rep = 1'b1; nb_dir = DIR_N;
      end
    end
  end

endmodule
