// tb_rsfr_fault_inject: each fault model applied to every input/output
// combination, compared with the fault model definitions.
module tb_rsfr_fault_inject;
  import rsfr_pkg::*;
  int checks = 0, failures = 0;
  fcfg_t cfg;
  logic in_local;
  dir_e in_dir;
  logic [4:0] want, act;

  rsfr_fault_inject dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 6; m++)
    for (int fd = 0; fd < 4; fd++)
    for (int il = 0; il < 2; il++)
    for (int id = 0; id < 4; id++)
    for (int o = -1; o < 5; o++) begin
      logic [4:0] e, w;
      bit straight, turn;
      w = (o < 0) ? 5'b0 : 5'(1 << o);
      cfg = '{mode: fmode_e'(m), dir: dir_e'(fd)};
      in_local = il[0]; in_dir = dir_e'(id); want = w;
      #1;
      straight = !il[0] && o >= 0 && o < 4 && o == (id ^ 1);
      turn     = !il[0] && o >= 0 && o < 4 && o != (id ^ 1) && o != id;
      e = w;
      if (w != 0) begin
        case (m)
          1: e = 5'(1 << fd);
          2: e = w | 5'(1 << fd);
          3: if (turn) e = 5'(1 << fd);
          4: if (straight) e = 5'(1 << fd);
          5: e = 0;
          default: ;
        endcase
      end
      checks++;
      if (act !== e) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d fd=%0d il=%0d id=%0d o=%0d act=%b exp=%b", m, fd, il, id, o, act, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
