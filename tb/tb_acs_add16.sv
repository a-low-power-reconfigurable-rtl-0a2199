// tb_acs_add16: checks the 16-bit saturating adder/subtracter.
module tb_acs_add16;
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
  logic [15:0] a, b, y; logic sub;
  acs_add16 dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [15:0] av, input logic [15:0] bv, input logic sv);
    longint exp;
    a = av; b = bv; sub = sv; #1;
    exp = ref_sat(sv ? longint'($signed(av)) - longint'($signed(bv))
                     : longint'($signed(av)) + longint'($signed(bv)), 16);
    checks++;
    if (longint'($signed(y)) != exp) begin
      failures++; $display("FAIL a=%h b=%h sub=%b y=%h exp=%h", av, bv, sv, y, exp);
    end
  endtask

  initial begin
    check(16'h7FFF, 16'h0001, 1'b0); check(16'h8000, 16'hFFFF, 1'b0);
    check(16'h8000, 16'h0001, 1'b1); check(16'h7FFF, 16'hFFFF, 1'b1);
    repeat (5000) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
