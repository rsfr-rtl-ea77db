// rsfr_prio: output-port priority table of the RSFR routing algorithm.
//
// Given a router position (cur) and a packet destination (dest), returns the
// permitted output ports in decreasing priority, as tabulated by the scheme
// (X grows east, Y grows north):
//   dest.x >  cur.x, dest.y <  cur.y : South, West
//   dest.x >  cur.x, dest.y >  cur.y : East, North, South, West
//   dest.x >  cur.x, dest.y == cur.y : East, South, West
//   dest.x <  cur.x                  : West, South
//   dest.x == cur.x, dest.y <  cur.y : South, West
//   dest.x == cur.x, dest.y >  cur.y : North, West, South
// at_dest is set when the packet has arrived (no output port listed, cnt=0).
// Purely combinational. The first entry is the port a fault-free router is
// supposed to use; the fault detector evaluates it for the previous router
// and the port selector for the next one (path prediction).
module rsfr_prio
  import rsfr_pkg::*;
(
  input  addr_t      cur,
  input  addr_t      dest,
  output logic       at_dest,
  output logic [2:0] cnt,
  output dir_e       list [4]
);

  always_comb begin
    at_dest = 1'b0;
    cnt     = 3'd0;
    list[0] = DIR_W;
    list[1] = DIR_W;
    list[2] = DIR_W;
    list[3] = DIR_W;
    if (dest.x > cur.x) begin
      if (dest.y < cur.y) begin
        cnt = 3'd2; list[0] = DIR_S; list[1] = DIR_W;
      end else if (dest.y > cur.y) begin
        cnt = 3'd4; list[0] = DIR_E; list[1] = DIR_N; list[2] = DIR_S; list[3] = DIR_W;
      end else begin
        cnt = 3'd3; list[0] = DIR_E; list[1] = DIR_S; list[2] = DIR_W;
      end
    end else if (dest.x < cur.x) begin
      cnt = 3'd2; list[0] = DIR_W; list[1] = DIR_S;
    end else begin
      if (dest.y < cur.y) begin
        cnt = 3'd2; list[0] = DIR_S; list[1] = DIR_W;
      end else if (dest.y > cur.y) begin
        cnt = 3'd3; list[0] = DIR_N; list[1] = DIR_W; list[2] = DIR_S;
      end else begin
        at_dest = 1'b1;
      end
    end
  end

endmodule
