// tb_acs_shift: checks the scaling shifter against x * 2^(16-n) computed with
// 64-bit integer arithmetic, for all n and corner plus random x.
module tb_acs_shift;
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
  logic [15:0] x; logic [3:0] n; logic [31:0] y;
  acs_shift dut (.x(x), .n(n), .y(y));

  task automatic check(input logic [15:0] xv, input logic [3:0] nv);
    longint exp;
    x = xv; n = nv; #1;
    exp = longint'($signed(xv)) * (longint'(1) <<< (16 - nv));
    checks++;
    if (longint'($signed(y)) != exp) begin
      failures++; $display("FAIL x=%h n=%0d y=%h exp=%h", xv, nv, y, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      check(16'h7FFF, 4'(k)); check(16'h8000, 4'(k)); check(16'h0001, 4'(k)); check(16'hFFFF, 4'(k));
    end
    repeat (2000) check(16'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
