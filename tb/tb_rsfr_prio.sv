// tb_rsfr_prio: exhaustive check of the output-port priority table over all
// router/destination pairs of an 8x8 mesh. The expected lists are written
// as strings per (sign dx, sign dy) case; in addition the first entry must
// move the packet closer to its destination.
module tb_rsfr_prio;
  import rsfr_pkg::*;

  int checks = 0, failures = 0;
  addr_t cur, dest;
  logic at_dest;
  logic [2:0] cnt;
  dir_e list [4];

  rsfr_prio dut (.cur(cur), .dest(dest), .at_dest(at_dest), .cnt(cnt), .list(list));

  function automatic string expect_list(int dx, int dy);
    if (dx > 0 && dy < 0)  return "SW";
    if (dx > 0 && dy > 0)  return "ENSW";
    if (dx > 0)            return "ESW";
    if (dx < 0)            return "WS";
    if (dy < 0)            return "SW";
    if (dy > 0)            return "NWS";
    return "";
  endfunction

  function automatic byte dchar(dir_e d);
    case (d)
      DIR_W: return "W";
      DIR_E: return "E";
      DIR_S: return "S";
      default: return "N";
    endcase
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
    for (int cy = 0; cy < 8; cy++)
    for (int tx = 0; tx < 8; tx++)
    for (int ty = 0; ty < 8; ty++) begin
      string e, got;
      cur  = '{x: 4'(cx), y: 4'(cy)};
      dest = '{x: 4'(tx), y: 4'(ty)};
      #1;
      e   = expect_list(tx - cx, ty - cy);
      got = "";
      for (int k = 0; k < int'(cnt); k++) got = {got, string'(dchar(list[k]))};
      checks++;
      if (got != e || at_dest != (tx == cx && ty == cy)) begin
        failures++;
        if (failures < 10) $display("FAIL cur=(%0d,%0d) dest=(%0d,%0d) got=%s exp=%s", cx, cy, tx, ty, got, e);
      end
      if (cnt != 0) begin
        checks++;
        case (list[0])
          DIR_W: if (!(tx < cx)) failures++;
          DIR_E: if (!(tx > cx)) failures++;
          DIR_S: if (!(ty < cy)) failures++;
          DIR_N: if (!(ty > cy)) failures++;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
