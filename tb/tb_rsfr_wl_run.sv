// tb_rsfr_wl_run: one evaluation run of an NX x NY RSFR mesh, used by
// tb_rsfr_workload for the three network sizes of the evaluation.
//
// Two passes over the same mesh. The fault-free pass sends NPKT packets
// between random source/destination pairs and requires every one of them to
// arrive. The faulty pass forces 10 % of the routers (rounded) into a random
// fault model (stuck-at-port, multiple copies, turn fault, straight fault,
// or transient dropping for the first 60 cycles) and sends NPKT packets again.
// In both passes every ejected packet must be at its own destination and the
// network must drain. The faulty pass reports its drop rate (packets never
// delivered / packets sent); it is printed, not checked against a target.
// Interface: a free-running clock of its own; done rises when both passes are
// over, with checks/failures valid from then on.
module tb_rsfr_wl_run #(
  parameter int NX = 4,
  parameter int NY = 4,
  parameter int NPKT = 125
) (
  output bit done,
  output int checks,
  output int failures
);
  import rsfr_pkg::*;

  localparam int N = NX * NY;
  localparam int MAXP = 2 * NPKT;

  logic clk = 0, rst_n = 0;
  logic    inj_valid [N], inj_ready [N], ej_valid [N], ej_ready [N], dropper [N];
  pkt_t    inj_pkt [N], ej_pkt [N];
  fcfg_t   fcfg [N];
  reqreg_t req_reg [N];
  stat_t   stat [N];
  logic [TTL_W-1:0] ttl_init;

  rsfr_mesh #(.NX(NX), .NY(NY)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  int p_dest [MAXP];
  int p_got [MAXP];
  int n_ids = 0;
  int n_drop = 0, n_bt = 0, n_mis = 0;
  bit acc [N];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %0dx%0d: %s", NX, NY, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < N; i++) begin
      if (inj_valid[i] && inj_ready[i]) acc[i] = 1;
      if (rst_n) begin
        n_drop += int'(stat[i].drop) + int'(stat[i].ttl_drop);
        n_bt   += int'(stat[i].bt);
        n_mis  += int'(stat[i].misroute);
      end
      if (rst_n && ej_valid[i]) begin
        int id;
        id = int'(ej_pkt[i].data);
        check(id < n_ids && p_dest[id] == i, $sformatf("packet %0d ejected at router %0d", id, i));
        if (id < n_ids) p_got[id]++;
      end
    end
  end

  function automatic pkt_t mk(int dst, int id);
    pkt_t p = '0;
    p.hdr.sop = 1; p.hdr.eop = 1; p.hdr.ttl = ttl_init;
    p.hdr.dest = '{x: COORD_W'(dst % NX), y: COORD_W'(dst / NX)};
    p.data = 32'(id);
    return p;
  endfunction

  // NPKT packets from random sources, each source offering at most one at a time
  task automatic traffic();
    int left = NPKT;
    bit busy;
    do begin
      @(negedge clk);
      busy = left > 0;
      for (int s = 0; s < N; s++) begin
        if (inj_valid[s] && acc[s]) begin inj_valid[s] = 0; acc[s] = 0; end
        if (!inj_valid[s] && left > 0 && $urandom_range(0, 99) < 10) begin
          int d;
          do d = $urandom_range(0, N - 1); while (d == s);
          p_dest[n_ids] = d; p_got[n_ids] = 0;
          inj_pkt[s] = mk(d, n_ids);
          n_ids++;
          inj_valid[s] = 1;
          left--;
        end
        if (inj_valid[s]) busy = 1;
      end
    end while (busy);
  endtask

  task automatic wait_idle(output bit idle);
    int q = 0;
    idle = 0;
    for (int c = 0; c < 20000; c++) begin
      bit act = 0;
      @(posedge clk);
      for (int i = 0; i < N; i++) if (stat[i].accept || ej_valid[i]) act = 1;
      q = act ? 0 : q + 1;
      if (q >= 40) begin idle = 1; return; end
    end
  endtask

  initial begin
    bit idle;
    int nf, got, first;
    int faulty [N];
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < N; i++) begin
      inj_valid[i] = 0; inj_pkt[i] = '0; ej_ready[i] = 1; acc[i] = 0;
      fcfg[i] = '{mode: FM_NONE, dir: DIR_W};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // fault-free pass
    traffic();
    wait_idle(idle);
    check(idle, "fault-free network drains");
    got = 0;
    for (int id = 0; id < n_ids; id++) got += (p_got[id] > 0);
    check(got == NPKT, $sformatf("fault-free: %0d of %0d delivered", got, NPKT));

    // faulty pass: 10 % of the routers
    nf = (N + 5) / 10;
    foreach (faulty[i]) faulty[i] = 0;
    for (int k = 0; k < nf; k++) begin
      int r;
      do r = $urandom_range(0, N - 1); while (faulty[r]);
      faulty[r] = 1;
      fcfg[r] = '{mode: fmode_e'($urandom_range(1, 5)), dir: dir_e'($urandom_range(0, 3))};
    end
    first = n_ids;
    n_drop = 0; n_bt = 0; n_mis = 0;
    fork
      traffic();
      begin
        repeat (60) @(posedge clk);
        for (int i = 0; i < N; i++) if (fcfg[i].mode == FM_DROP) fcfg[i] = '{mode: FM_NONE, dir: DIR_W};
      end
    join
    wait_idle(idle);
    check(idle, "faulty network drains");
    got = 0;
    for (int id = first; id < n_ids; id++) got += (p_got[id] > 0);
    check(got > 0, "faulty: packets delivered");
    $display("%0dx%0d, %0d faulty routers: %0d packets sent, %0d delivered, drop rate %0.3f (routing drops %0d, backtracks %0d, misroutes detected %0d)",
             NX, NY, nf, NPKT, got, real'(NPKT - got) / real'(NPKT), n_drop, n_bt, n_mis);
    done = 1;
  end
endmodule
