// rsfr_fifo: input packet buffer of one router port.
//
// A synchronous first-word-fall-through FIFO holding whole packets (one
// packet per entry). Write side: wr_valid/wr_ready; read side: rd_valid and
// rd_pkt show the oldest entry, rd_pop removes it. A write and a pop may
// happen in the same cycle; a write into a full FIFO is refused through
// wr_ready. The router of the scheme has one such buffer per port; its depth
// is not given and defaults here to 4 packets.
module rsfr_fifo
  import rsfr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_valid,
  output logic wr_ready,
  input  pkt_t wr_pkt,
  output logic rd_valid,
  output pkt_t rd_pkt,
  input  logic rd_pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign wr_ready = (count < (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_pkt   = mem[rd_ptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_pop && rd_valid;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_pkt;
  end

endmodule
