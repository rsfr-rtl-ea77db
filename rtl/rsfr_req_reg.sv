// rsfr_req_reg: the 8-bit requisite (local) register of an RSFR router.
//
// Layout (Fig. 8 of the scheme): bits 7:6 direction of one risky neighbour
// (00 W, 01 E, 10 S, 11 N), bits 5:2 faulty status of the W, E, S, N
// neighbours, bits 1:0 type of fault of one faulty neighbour (rsfr_pkg::tof_e).
//
// The type bits belong to the faulty neighbour of highest priority in the
// order west, east, south, north (the "owner"). A newly detected fault writes
// the type bits only if its neighbour becomes the owner. A fault found again
// for the owner with a different type than recorded turns the type into 00
// (general), so the router stops trusting that neighbour for either path
// kind. When the owner is cleared, ownership passes to the next faulty
// neighbour with type 00 (its type is unknown), or the type returns to 11
// when no faulty neighbour is left: this hand-over is this design's choice.
//
// The scheme has no bit telling whether bits 7:6 hold a risky neighbour at
// all; this design keeps that in a separate flag, risky_vld.
//
// A neighbour marked faulty only because it backtracked a packet to this
// router is kept in the register but must not be announced to others; the
// 4-bit local_only mask (this design's addition) remembers which faulty
// bits are of that kind. A real detection or report of the same neighbour
// makes its mark announceable; clearing removes it.
//
// Two fault events (ev0 first, then ev1) and one risky update are applied per
// packet. nxt/nxt_risky_vld show the register with this packet's updates
// applied (combinational), so the routing decision for the same packet uses
// them; the flops take nxt when upd is high. own_risky is the router's own
// risky status: more than one faulty neighbour.
module rsfr_req_reg
  import rsfr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    upd,
  input  logic    ev0_en,
  input  logic    ev0_set,     // 1: mark faulty, 0: clear
  input  dir_e    ev0_dir,
  input  tof_e    ev0_tof,
  input  logic    ev0_local,   // ev0 is a mark that must not be announced
  input  logic    ev1_en,
  input  logic    ev1_set,
  input  dir_e    ev1_dir,
  input  tof_e    ev1_tof,
  input  logic    risky_en,    // a packet came from neighbour risky_dir
  input  dir_e    risky_dir,
  input  logic    risky_val,   // header risky bit of that packet
  output reqreg_t q,
  output logic    risky_vld_q,
  output reqreg_t nxt,
  output logic    nxt_risky_vld,
  output logic    owner_vld,   // of nxt
  output dir_e    owner_dir,
  output logic    own_risky,   // of nxt
  output logic [3:0] nxt_local_only
);

  reqreg_t    r_q;
  logic       rv_q;
  logic [3:0] lo_q;

  function automatic logic owner_of(logic [3:0] f, output dir_e d);
    d = DIR_W;
    for (int i = 3; i >= 0; i--) if (f[i]) d = dir_e'(i);
    return |f;
  endfunction

  function automatic reqreg_t apply(reqreg_t r, logic en, logic set, dir_e d, tof_e t);
    reqreg_t o;
    dir_e    od, nd;
    logic    ov, nv;
    o  = r;
    if (!en) return o;
    ov = owner_of(r.faulty, od);
    if (set) begin
      o.faulty[d] = 1'b1;
      nv = owner_of(o.faulty, nd);
      if (nd == d) begin
        if (r.faulty[d] && ov && od == d) begin
          if (r.tof != t) o.tof = TOF_GEN;
        end else begin
          o.tof = t;
        end
      end
    end else begin
      o.faulty[d] = 1'b0;
      nv = owner_of(o.faulty, nd);
      if (!nv)                         o.tof = TOF_OK;
      else if (ov && od == d)          o.tof = TOF_GEN;
    end
    return o;
  endfunction

  reqreg_t s1;

  always_comb begin
    s1  = apply(r_q, ev0_en, ev0_set, ev0_dir, ev0_tof);
    nxt = apply(s1,  ev1_en, ev1_set, ev1_dir, ev1_tof);
    nxt_risky_vld = rv_q;
    if (risky_en) begin
      if (risky_val) begin
        nxt.risky_dir = risky_dir;
        nxt_risky_vld = 1'b1;
      end else if (rv_q && r_q.risky_dir == risky_dir) begin
        nxt_risky_vld = 1'b0;
      end
    end
    nxt_local_only = lo_q;
    if (ev0_en) begin
      if (!ev0_set)                             nxt_local_only[ev0_dir] = 1'b0;
      else if (!ev0_local)                      nxt_local_only[ev0_dir] = 1'b0;
      else if (!r_q.faulty[ev0_dir])            nxt_local_only[ev0_dir] = 1'b1;
    end
    if (ev1_en) nxt_local_only[ev1_dir] = 1'b0;
    owner_vld = owner_of(nxt.faulty, owner_dir);
    own_risky = ($countones(nxt.faulty) > 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q  <= '{risky_dir: DIR_W, faulty: 4'b0000, tof: TOF_OK};
      rv_q <= 1'b0;
      lo_q <= 4'b0000;
    end else if (upd) begin
      r_q  <= nxt;
      rv_q <= nxt_risky_vld;
      lo_q <= nxt_local_only;
    end
  end

  assign q           = r_q;
  assign risky_vld_q = rv_q;

endmodule
