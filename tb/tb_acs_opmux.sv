// tb_acs_opmux: checks selection, the zero output of a disabled (isolated)
// multiplexer and of an out-of-range select, for a 5-input 16-bit instance.
module tb_acs_opmux;
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
  logic [4:0][15:0] d; logic [2:0] sel; logic en; logic [15:0] y;
  acs_opmux #(.W(16), .N(5), .SW(3)) dut (.d(d), .sel(sel), .en(en), .y(y));

  initial begin
    repeat (500) begin
      logic [15:0] exp;
      for (int i = 0; i < 5; i++) d[i] = 16'($urandom);
      sel = 3'($urandom); en = 1'($urandom);
      #1;
      exp = (en && sel < 5) ? d[sel] : 16'h0;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL sel=%0d en=%b y=%h exp=%h", sel, en, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
