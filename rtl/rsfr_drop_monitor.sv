// rsfr_drop_monitor: self-test of a router for transient packet dropping,
// and the clearing of that status.
//
// A one-bit "in flight" register is set when the routing logic accepts a
// packet and cleared when the packet leaves (through an output port, into
// the local port, or by a drop the routing algorithm decided). If it is
// still set when the next packet is accepted, the previous packet vanished
// inside the router: the router becomes a transient dropper and must
// announce this (own address, TOF 00) in the next packet it forwards
// (announce_drop). After CLEARING_PERIOD successfully forwarded packets the
// router announces that it is clear again (own address, TOF 11) in the next
// forwarded packet (announce_clear) and leaves the dropper state.
//
// Interface, all sampled at the clock edge: accept = a packet is taken in
// this cycle; leave = that packet left in this cycle; fwd_ok = it was
// forwarded to a neighbour; carried_drop / carried_clear = it carried the
// pending announcement. Announcements are valid in the same cycle as accept
// (combinational from the state). Keeping an undelivered announcement
// pending until a forwarded packet carries it is this design's choice.
module rsfr_drop_monitor #(
  parameter int unsigned CLEARING_PERIOD = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic accept,
  input  logic leave,
  input  logic fwd_ok,
  input  logic carried_drop,
  input  logic carried_clear,
  output logic announce_drop,
  output logic announce_clear,
  output logic dropper,
  output logic detect          // pulse: a lost packet was detected now
);

  localparam int unsigned CW = $clog2(CLEARING_PERIOD + 1);

  logic          inflight_q, pend_q, dropper_q;
  logic [CW-1:0] cnt_q;

  assign detect         = accept && inflight_q;
  assign announce_drop  = pend_q || detect;
  assign announce_clear = dropper_q && !announce_drop && (cnt_q >= CW'(CLEARING_PERIOD));
  assign dropper        = dropper_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight_q <= 1'b0;
      pend_q     <= 1'b0;
      dropper_q  <= 1'b0;
      cnt_q      <= '0;
    end else begin
      if (accept) inflight_q <= !leave;
      if (accept && detect) begin
        dropper_q <= 1'b1;
        cnt_q     <= '0;
        pend_q    <= !carried_drop;
      end else if (accept) begin
        if (carried_drop) pend_q <= 1'b0;
        if (carried_clear) begin
          dropper_q <= 1'b0;
          cnt_q     <= '0;
        end else if (dropper_q && fwd_ok && !pend_q && cnt_q < CW'(CLEARING_PERIOD)) begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
