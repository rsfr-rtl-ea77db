// tb_rsfr_router: router (1,1) of a 3x3 mesh with its links driven by the
// testbench. Checks forwarding and ejection with the two-cycle latency,
// order under back-pressure, and the effect of stuck-at-port and
// multiple-copies fault injection on where packets leave.
module tb_rsfr_router;
  import rsfr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt [5], out_pkt [5];
  fcfg_t fcfg;
  reqreg_t reg_q;
  logic dropper;
  stat_t stat;
  int cyc = 0;

  rsfr_router #(.NX(3), .NY(3), .X(1), .Y(1), .FIFO_DEPTH(4), .CLEARING_PERIOD(5)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic pkt_t mk(int dx, int dy, int data);
    pkt_t p = '0;
    p.hdr.sop = 1; p.hdr.eop = 1; p.hdr.ttl = 12; p.hdr.dest = '{x: 4'(dx), y: 4'(dy)};
    p.hdr.faulty = '{x: 1, y: 1}; p.hdr.tof = SELF_NONE;  // names no neighbour p.hdr.pid = DIR_S;
    p.data = 32'(data);
    return p;
  endfunction

  task automatic send(int port, pkt_t p, output int t);
    @(negedge clk);
    in_valid[port] = 1; in_pkt[port] = p;
    @(posedge clk);
    t = cyc;
    #1 in_valid[port] = 0;
  endtask

  // wait for a packet on port; returns cycles after t0
  task automatic expect_out(int port, int data, int t0, int lat);
    int k = 0;
    while (!(out_valid[port] && out_ready[port]) && k < 50) begin @(negedge clk); k++; end
    check(out_valid[port] && out_pkt[port].data == 32'(data), $sformatf("packet %0d at port %0d", data, port));
    if (lat > 0) check(cyc - t0 == lat, $sformatf("latency of packet %0d: %0d", data, cyc - t0));
    @(posedge clk); #1;
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    in_valid = '0; out_ready = 5'b11111; fcfg = '{mode: FM_NONE, dir: DIR_W};
    for (int i = 0; i < 5; i++) in_pkt[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // local -> east (dest (2,1)), two cycles
    send(4, mk(2, 1, 1), t);
    @(negedge clk);
    expect_out(1, 1, t, 2);
    // from west, for us -> local port
    send(0, mk(1, 1, 2), t);
    @(negedge clk);
    expect_out(4, 2, t, 2);
    check(reg_q.faulty == 4'b0000, "no fault seen on legal traffic");
    // back-pressure on east: three packets, released later, in order
    out_ready[1] = 0;
    send(4, mk(2, 1, 10), t);
    send(4, mk(2, 1, 11), t);
    send(4, mk(2, 1, 12), t);
    repeat (5) @(negedge clk);
    check(out_valid[1] && out_pkt[1].data == 10, "held at east output");
    out_ready[1] = 1;
    expect_out(1, 10, 0, 0);
    expect_out(1, 11, 0, 0);
    expect_out(1, 12, 0, 0);
    // multiple copies: extra copy to north
    fcfg = '{mode: FM_MULTI, dir: DIR_N};
    send(4, mk(2, 1, 20), t);
    @(posedge clk); #1;
    check(out_valid[1] && out_valid[3] && out_pkt[3].data == 20 && out_pkt[1].data == 20, "two copies");
    @(posedge clk); #1;
    // stuck at south
    fcfg = '{mode: FM_SAP, dir: DIR_S};
    send(4, mk(2, 1, 21), t);
    @(negedge clk);
    expect_out(2, 21, t, 2);
    check(!out_valid[1], "nothing at east");
    // the south neighbour's view: misrouted; a packet from south that we
    // receive after (1,0) misrouted it is detected and the fault recorded
    fcfg = '{mode: FM_NONE, dir: DIR_W};
    begin
      pkt_t p = mk(2, 0, 30);  // (1,0) should have sent it east
      p.hdr.pid = DIR_W;
      send(2, p, t);
      @(negedge clk);
      expect_out(2, 30, t, 2);   // back south: a turn path through straight-faulty (1,0)
    end
    check(reg_q.faulty[DIR_S] && reg_q.tof == TOF_STRAIGHT, "straight fault of (1,0) recorded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
