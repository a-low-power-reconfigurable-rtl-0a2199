// tb_acs_square: checks the squaring unit, y = sat16((x*x) >> 15), exhaustively.
module tb_acs_square;
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
  logic [15:0] x; logic [15:0] y;
  acs_square dut (.x(x), .y(y));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      longint p, exp;
      x = 16'(v); #1;
      p = longint'($signed(x)) * longint'($signed(x));
      exp = ref_sat(p >>> 15, 16);
      checks++;
      if (longint'($signed(y)) != exp) begin
        failures++; if (failures < 10) $display("FAIL x=%h y=%h exp=%h", x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
