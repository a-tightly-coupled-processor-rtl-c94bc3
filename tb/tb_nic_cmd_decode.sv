// tb_nic_cmd_decode -- self-checking test of the NIC address decoder.
//
// Checks the worked example of the address-line table (a load of register
// 6 = i1 with SEND reply of type 7 and NEXT), then random addresses inside
// and outside the window against fields extracted independently here.
module tb_nic_cmd_decode;
  import nic_pkg::*;

  localparam logic [15:0] BASE = 16'h1234;

  logic [31:0] addr;
  logic        hit;
  nic_cmd_t    cmd;
  int checks = 0, failures = 0;

  nic_cmd_decode #(.BASE(BASE)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s addr=%h", what, addr);
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
    addr = {BASE, 16'b0010_1001_1101_1000};   // 0b10100111011000
    #1;
    check(hit, "example hit");
    check(cmd.regnum == R_I1, "example register i1");
    check(cmd.mode == SEND_REPLY, "example send reply");
    check(cmd.stype == 4'd7, "example type 7");
    check(cmd.next, "example NEXT");
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] lo;
      lo   = 16'($urandom);
      addr = {(n % 2 == 0) ? BASE : 16'($urandom), lo};
      #1;
      check(hit == (addr[31:16] == BASE), "hit");
      check(int'(cmd.regnum) == int'(lo) / 4 % 16, "register number");
      check(int'(cmd.stype) == int'(lo) / 64 % 16, "type");
      check(cmd.next == ((int'(lo) / 2048) % 2 == 1), "next");
      check(int'(cmd.mode) == int'(lo) / 4096 % 4, "mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
