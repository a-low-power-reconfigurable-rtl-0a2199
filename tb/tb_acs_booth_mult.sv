// tb_acs_booth_mult: checks the Booth multiplier, y = sat32(2*a*b), on corner
// operands and random pairs.
module tb_acs_booth_mult;
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
  logic [15:0] a, b; logic [31:0] y;
  acs_booth_mult dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [15:0] av, input logic [15:0] bv);
    longint exp;
    a = av; b = bv; #1;
    exp = ref_sat(2 * longint'($signed(av)) * longint'($signed(bv)), 32);
    checks++;
    if (longint'($signed(y)) != exp) begin
      failures++; if (failures < 10) $display("FAIL a=%h b=%h y=%h exp=%h", av, bv, y, exp);
    end
  endtask

  initial begin
    logic [15:0] c [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h5555};
    foreach (c[i]) foreach (c[j]) check(c[i], c[j]);
    repeat (20000) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
