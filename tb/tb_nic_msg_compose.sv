// tb_nic_msg_compose -- self-checking test of the SEND datapath.
//
// Random output and input register contents; for each mode the expected
// message is written out word by word: plain = o0..o4, reply = i1,i2,o2,
// o3,o4, forward = o0,o1,o2,i3,i4; the type is always the SEND argument.
module tb_nic_msg_compose;
  import nic_pkg::*;

  send_mode_e mode;
  mtype_t     stype;
  logic [NWORDS-1:0][WORD_W-1:0] o, i;
  msg_t       msg;
  int checks = 0, failures = 0;

  nic_msg_compose dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s mode=%0d", what, mode);
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
    for (int n = 0; n < 1000; n++) begin
      word_t e [NWORDS];
      for (int k = 0; k < NWORDS; k++) begin
        o[k] = $urandom;
        i[k] = $urandom;
      end
      stype = mtype_t'($urandom);
      mode  = send_mode_e'(n % 4);
      #1;
      for (int k = 0; k < NWORDS; k++) e[k] = o[k];
      if (mode == SEND_REPLY)   begin e[0] = i[1]; e[1] = i[2]; end
      if (mode == SEND_FORWARD) begin e[3] = i[3]; e[4] = i[4]; end
      check(msg.mtype == stype, "type");
      for (int k = 0; k < NWORDS; k++) check(msg.w[k] == e[k], $sformatf("word m%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
