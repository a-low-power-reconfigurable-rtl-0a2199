// tb_acs_sac: checks the shift-accumulate unit, y = sat32(acc + x*2^(16-n)),
// against an integer model; includes both saturation limits.
module tb_acs_sac;
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
  logic [15:0] x; logic [31:0] acc; logic [3:0] n; logic [31:0] y;
  acs_sac dut (.x(x), .acc(acc), .n(n), .y(y));

  task automatic check(input logic [15:0] xv, input logic [31:0] av, input logic [3:0] nv);
    longint exp;
    x = xv; acc = av; n = nv; #1;
    exp = ref_sat(longint'($signed(av)) + longint'($signed(xv)) * (longint'(1) <<< (16 - nv)), 32);
    checks++;
    if (longint'($signed(y)) != exp) begin
      failures++; $display("FAIL x=%h acc=%h n=%0d y=%h exp=%h", xv, av, nv, y, exp);
    end
  endtask

  initial begin
    check(16'h7FFF, 32'h7FFF_0000, 4'd0);   // positive saturation
    check(16'h8000, 32'h8000_1000, 4'd0);   // negative saturation
    check(16'h1000, 32'h0000_0010, 4'd3);   // 1/8 scaling
    check(16'hF000, 32'h0000_0000, 4'd4);
    repeat (3000) check(16'($urandom), $urandom, 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
