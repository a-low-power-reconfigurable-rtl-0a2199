// tb_acs_round: checks the rounder, y = upper half of sat32(x + 8000h).
module tb_acs_round;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sat(input longint v, input int bits);
    longint hi = (longint'(1) <<< (bits - 1)) - 1;
    longint lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  logic [31:0] x; logic [15:0] y;
  acs_round dut (.x(x), .y(y));

  task automatic check(input logic [31:0] xv);
    longint s; logic [15:0] exp;
    x = xv; #1;
    s = ref_sat(longint'($signed(xv)) + 32768, 32);
    exp = 16'(s >>> 16);
    checks++;
    if (y !== exp) begin failures++; $display("FAIL x=%h y=%h exp=%h", xv, y, exp); end
  endtask

  initial begin
    check(32'h7FFF_FFFF); check(32'h7FFF_8000); check(32'h7FFF_7FFF); check(32'h8000_0000);
    check(32'h0000_7FFF); check(32'h0000_8000); check(32'hFFFF_7FFF); check(32'hFFFF_8000);
    repeat (3000) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
