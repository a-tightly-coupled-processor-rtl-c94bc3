// tb_nic_msgip -- self-checking test of the MsgIP computation.
//
// Random inputs; the expected MsgIP is rebuilt here from the rules: case 2
// (MsgIP = m1) for a valid type-0 message with no exception and neither
// queue above its threshold, otherwise CodeBase[31:14], the two threshold
// bits and a handler ID of 15 (exception), 14 (no message) or the type.
// Counts that every case was exercised.
module tb_nic_msgip;
  import nic_pkg::*;

  word_t            codebase, i1, msgip;
  logic             valid, exc, iafull, oafull;
  mtype_t           mtype;
  logic [CNT_W-1:0] icount, ocount, ithr, othr;
  int checks = 0, failures = 0;
  int n_case2 = 0, n_exc = 0, n_nomsg = 0, n_type = 0, n_ia = 0, n_oa = 0;

  nic_msgip dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic   e_ia, e_oa;
      int     hid;
      word_t  exp;
      codebase = $urandom;
      i1       = $urandom;
      valid    = ($urandom % 4) != 0;
      exc      = ($urandom % 6) == 0;
      mtype    = ($urandom % 3 == 0) ? 4'd0 : mtype_t'($urandom % 14);
      icount   = CNT_W'($urandom % 17);
      ocount   = CNT_W'($urandom % 17);
      ithr     = ($urandom % 2) ? 5'd16 : CNT_W'($urandom % 17);
      othr     = ($urandom % 2) ? 5'd16 : CNT_W'($urandom % 17);
      #1;
      e_ia = int'(icount) > int'(ithr);
      e_oa = int'(ocount) > int'(othr);
      hid  = exc ? 15 : !valid ? 14 : int'(mtype);
      if (!exc && valid && !e_ia && !e_oa && mtype == 0) begin
        exp = i1;
        n_case2++;
      end else begin
        exp = (codebase & 32'hFFFF_C000) | (32'(e_ia) << 13) | (32'(e_oa) << 12) | (32'(hid) << 8);
        if (hid == 15) n_exc++; else if (hid == 14) n_nomsg++; else n_type++;
      end
      n_ia += int'(e_ia);
      n_oa += int'(e_oa);
      check(iafull == e_ia, "iafull");
      check(oafull == e_oa, "oafull");
      check(msgip == exp, "msgip");
    end
    check(n_case2 > 0 && n_exc > 0 && n_nomsg > 0 && n_type > 0 && n_ia > 0 && n_oa > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
