// tb_rsfr_drop_monitor: transient-drop detection and clearing.
// A packet that is accepted but never leaves must be detected when the next
// packet is accepted; the drop announcement stays pending until a forwarded
// packet carries it; after CLEARING_PERIOD (5) successfully forwarded
// packets the clearing announcement appears and the dropper state ends.
module tb_rsfr_drop_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic accept, leave, fwd_ok, carried_drop, carried_clear;
  logic announce_drop, announce_clear, dropper, detect;

  rsfr_drop_monitor #(.CLEARING_PERIOD(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one packet through the router; carries announcements if forwarded
  task automatic pkt(bit lv, bit fw, output bit saw_drop, output bit saw_clear, output bit saw_detect);
    @(negedge clk);
    accept = 1; leave = lv; fwd_ok = fw && lv;
    #1;
    saw_drop = announce_drop; saw_clear = announce_clear; saw_detect = detect;
    carried_drop  = fw && announce_drop;
    carried_clear = fw && announce_clear;
    @(posedge clk); #1;
    accept = 0; carried_drop = 0; carried_clear = 0; leave = 0; fwd_ok = 0;
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d, c, t;
    accept = 0; leave = 0; fwd_ok = 0; carried_drop = 0; carried_clear = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      pkt(1, 1, d, c, t);
      check(!d && !c && !t && !dropper, "healthy traffic");
    end
    pkt(0, 1, d, c, t);                       // this one is lost
    check(!t, "loss not yet visible");
    pkt(1, 0, d, c, t);                       // next one: detected, ejected locally
    check(t && d, "loss detected on next accept");
    check(dropper, "dropper state");
    pkt(1, 1, d, c, t);                       // announcement still pending
    check(d && !t, "pending announcement carried by a forwarded packet");
    for (int i = 0; i < 5; i++) begin
      pkt(1, 1, d, c, t);
      check(!d && !c, $sformatf("no announcement during clearing period, packet %0d", i));
    end
    pkt(1, 0, d, c, t);                       // ejected: clear must wait
    check(c && dropper, "clear offered");
    pkt(1, 1, d, c, t);
    check(c, "clear carried");
    check(!dropper, "dropper state left after clearing");
    pkt(1, 1, d, c, t);
    check(!c && !d, "quiet afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
