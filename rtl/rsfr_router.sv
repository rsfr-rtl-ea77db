// rsfr_router: a self-testing, fault-tolerant mesh router running RSFR.
//
// Structure (router figure of the scheme): one input FIFO per port, a single
// routing logic block (rsfr_rlb) that serves the FIFOs and holds the
// requisite register, and one output register per port. Ports are indexed
// 0..3 = W, E, S, N and 4 = local (the network interface of the attached
// core). A fault-injection unit (rsfr_fault_inject) between the routing
// decision and the output registers can make the router misbehave according
// to one of the scheme's fault models, selected by fcfg.
//
// Links use valid/ready: a packet moves on a cycle where valid and ready are
// both high. in_ready is the FIFO's not-full. An output register is free
// when it is empty or its packet is taken in the same cycle. A packet is
// committed when every output register it goes to is free; it is then
// written there and appears at out_valid the next cycle. Latency through an
// idle router: 1 cycle into the FIFO, 1 cycle from FIFO head to the output
// register, so a packet entering at cycle t leaves at cycle t+2.
module rsfr_router
  import rsfr_pkg::*;
#(
  parameter int unsigned NX              = 8,
  parameter int unsigned NY              = 8,
  parameter int unsigned X               = 0,
  parameter int unsigned Y               = 0,
  parameter int unsigned FIFO_DEPTH      = 4,
  parameter int unsigned CLEARING_PERIOD = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] in_valid,
  output logic [4:0] in_ready,
  input  pkt_t       in_pkt [5],
  output logic [4:0] out_valid,
  input  logic [4:0] out_ready,
  output pkt_t       out_pkt [5],
  input  fcfg_t      fcfg,
  output reqreg_t    reg_q,
  output logic       dropper,
  output stat_t      stat
);

  logic [4:0] f_valid, f_pop, want, act, free;
  pkt_t       f_pkt [5];
  logic       sel_valid, sel_local, go;
  dir_e       sel_dir;
  pkt_t       dec_pkt;
  logic [4:0] ov_q;
  pkt_t       op_q [5];

  for (genvar p = 0; p < 5; p++) begin : g_in
    rsfr_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .wr_valid(in_valid[p]), .wr_ready(in_ready[p]), .wr_pkt(in_pkt[p]),
      .rd_valid(f_valid[p]), .rd_pkt(f_pkt[p]), .rd_pop(f_pop[p])
    );
  end

  rsfr_rlb #(.NX(NX), .NY(NY), .X(X), .Y(Y), .CLEARING_PERIOD(CLEARING_PERIOD)) u_rlb (
    .clk(clk), .rst_n(rst_n), .in_valid(f_valid), .in_pkt(f_pkt), .in_pop(f_pop),
    .sel_valid(sel_valid), .sel_local(sel_local), .sel_dir(sel_dir), .want(want),
    .out_pkt(dec_pkt), .go(go), .act(act),
    .reg_q(reg_q), .dropper(dropper), .stat(stat)
  );

  rsfr_fault_inject u_fi (
    .cfg(fcfg), .in_local(sel_local), .in_dir(sel_dir), .want(want), .act(act)
  );

  assign free = ~ov_q | out_ready;
  assign go   = sel_valid && ((act & ~free) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov_q <= '0;
    end else begin
      for (int p = 0; p < 5; p++) begin
        if (go && act[p])      ov_q[p] <= 1'b1;
        else if (out_ready[p]) ov_q[p] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 5; p++)
      if (go && act[p]) op_q[p] <= dec_pkt;
  end

  assign out_valid = ov_q;
  assign out_pkt   = op_q;

endmodule
