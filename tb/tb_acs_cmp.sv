// tb_acs_cmp: checks the signed comparator on edge cases and random operands.
module tb_acs_cmp;
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
  logic [31:0] a, b; logic gt;
  acs_cmp dut (.a(a), .b(b), .gt(gt));

  task automatic check(input logic [31:0] av, input logic [31:0] bv);
    logic exp;
    a = av; b = bv; #1;
    exp = longint'($signed(av)) > longint'($signed(bv));
    checks++;
    if (gt !== exp) begin failures++; $display("FAIL a=%h b=%h gt=%b", av, bv, gt); end
  endtask

  initial begin
    check(32'h0000_0001, 32'h0); check(32'h0, 32'h0); check(32'hFFFF_FFFF, 32'h0);
    check(32'h7FFF_FFFF, 32'h8000_0000); check(32'h8000_0000, 32'h7FFF_FFFF);
    repeat (3000) check($urandom, $urandom);
    repeat (500) begin
      logic [31:0] v;
      v = $urandom;
      check(v, v);                      // equal operands are not "better"
      check(v, v + 32'd1);
      check(v + 32'd1, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
