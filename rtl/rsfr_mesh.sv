// rsfr_mesh: NX x NY mesh network of RSFR routers (top level).
//
// Router (x, y) sits at index y*NX + x; x grows to the east, y to the north.
// Neighbouring routers are joined by valid/ready packet links in both
// directions: east output to the west input of (x+1, y), north output to the
// south input of (x, y+1), and so on. At the mesh border the unused inputs
// are idle and the unused outputs always ready, so a packet a faulty router
// pushes off the mesh is lost. Each router's local port (the attachment of a
// core's network interface) is brought out as inj_* (into the network) and
// ej_* (out of it), together with its fault-injection setting, its
// requisite register, dropper status and one-cycle event flags.
//
// The default 8x8 size is the mesh of the scheme's main evaluation (it was
// evaluated from 4x4 to 16x16; coordinates are 4 bits wide, so NX and NY may
// be at most 16). TTL_INIT is the TTL a source should put in a new packet;
// the scheme sets it experimentally to the longest path seen, here it is
// 2*(NX+NY) by this design's choice. Packets are injected by the user with
// that TTL; the parameter is passed out as ttl_init for convenience.
module rsfr_mesh
  import rsfr_pkg::*;
#(
  parameter int unsigned NX              = 8,
  parameter int unsigned NY              = 8,
  parameter int unsigned FIFO_DEPTH      = 4,
  parameter int unsigned CLEARING_PERIOD = 5,
  parameter int unsigned TTL_INIT        = 2 * (NX + NY)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inj_valid [NX*NY],
  output logic             inj_ready [NX*NY],
  input  pkt_t             inj_pkt   [NX*NY],
  output logic             ej_valid  [NX*NY],
  input  logic             ej_ready  [NX*NY],
  output pkt_t             ej_pkt    [NX*NY],
  input  fcfg_t            fcfg      [NX*NY],
  output reqreg_t          req_reg   [NX*NY],
  output logic             dropper   [NX*NY],
  output stat_t            stat      [NX*NY],
  output logic [TTL_W-1:0] ttl_init
);

  localparam int unsigned N = NX * NY;

  logic [4:0] r_in_valid  [N];
  logic [4:0] r_in_ready  [N];
  pkt_t       r_in_pkt    [N][5];
  logic [4:0] r_out_valid [N];
  logic [4:0] r_out_ready [N];
  pkt_t       r_out_pkt   [N][5];

  assign ttl_init = TTL_W'(TTL_INIT);

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned I = y * NX + x;

      rsfr_router #(
        .NX(NX), .NY(NY), .X(x), .Y(y),
        .FIFO_DEPTH(FIFO_DEPTH), .CLEARING_PERIOD(CLEARING_PERIOD)
      ) u_router (
        .clk(clk), .rst_n(rst_n),
        .in_valid(r_in_valid[I]), .in_ready(r_in_ready[I]), .in_pkt(r_in_pkt[I]),
        .out_valid(r_out_valid[I]), .out_ready(r_out_ready[I]), .out_pkt(r_out_pkt[I]),
        .fcfg(fcfg[I]), .reg_q(req_reg[I]), .dropper(dropper[I]), .stat(stat[I])
      );

      // local port
      assign r_in_valid[I][4]  = inj_valid[I];
      assign r_in_pkt[I][4]    = inj_pkt[I];
      assign inj_ready[I]      = r_in_ready[I][4];
      assign ej_valid[I]       = r_out_valid[I][4];
      assign ej_pkt[I]         = r_out_pkt[I][4];
      assign r_out_ready[I][4] = ej_ready[I];

      // west input <- east output of (x-1, y); west output -> east input of (x-1, y)
      if (x > 0) begin : g_w
        assign r_in_valid[I][0]  = r_out_valid[I-1][1];
        assign r_in_pkt[I][0]    = r_out_pkt[I-1][1];
        assign r_out_ready[I][0] = r_in_ready[I-1][1];
      end else begin : g_w_edge
        assign r_in_valid[I][0]  = 1'b0;
        assign r_in_pkt[I][0]    = '0;
        assign r_out_ready[I][0] = 1'b1;
      end
      if (x < NX-1) begin : g_e
        assign r_in_valid[I][1]  = r_out_valid[I+1][0];
        assign r_in_pkt[I][1]    = r_out_pkt[I+1][0];
        assign r_out_ready[I][1] = r_in_ready[I+1][0];
      end else begin : g_e_edge
        assign r_in_valid[I][1]  = 1'b0;
        assign r_in_pkt[I][1]    = '0;
        assign r_out_ready[I][1] = 1'b1;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[I][2]  = r_out_valid[I-NX][3];
        assign r_in_pkt[I][2]    = r_out_pkt[I-NX][3];
        assign r_out_ready[I][2] = r_in_ready[I-NX][3];
      end else begin : g_s_edge
        assign r_in_valid[I][2]  = 1'b0;
        assign r_in_pkt[I][2]    = '0;
        assign r_out_ready[I][2] = 1'b1;
      end
      if (y < NY-1) begin : g_n
        assign r_in_valid[I][3]  = r_out_valid[I+NX][2];
        assign r_in_pkt[I][3]    = r_out_pkt[I+NX][2];
        assign r_out_ready[I][3] = r_in_ready[I+NX][2];
      end else begin : g_n_edge
        assign r_in_valid[I][3]  = 1'b0;
        assign r_in_pkt[I][3]    = '0;
        assign r_out_ready[I][3] = 1'b1;
      end
    end
  end

endmodule
