// tb_rsfr_fifo: random push/pop traffic against a queue model; checks order,
// full/empty flags and that a write into a full FIFO is refused.
module tb_rsfr_fifo;
  import rsfr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_pop;
  pkt_t wr_pkt, rd_pkt;
  pkt_t model [$];
  bit   saw_full = 0;

  rsfr_fifo #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_pop = 0; wr_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < 60);
      rd_pop   = ($urandom_range(0, 99) < 45);
      wr_pkt   = pkt_t'({$urandom, $urandom});
      checks++;
      if (rd_valid != (model.size() != 0) || wr_ready != (model.size() < 4)) failures++;
      if (model.size() == 4) saw_full = 1;
      if (rd_valid) begin
        checks++;
        if (rd_pkt != model[0]) failures++;
      end
      begin
        bit do_pop, do_push;
        do_pop  = rd_pop && model.size() != 0;
        do_push = wr_valid && model.size() < 4;
        @(posedge clk);
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(wr_pkt);
      end
    end
    checks++;
    if (!saw_full) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
