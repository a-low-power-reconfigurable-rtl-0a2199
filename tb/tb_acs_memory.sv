// tb_acs_memory: writes random words, then reads them back through all read
// ports at once and checks data and the one-cycle read latency.
module tb_acs_memory;
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
  localparam int DEPTH = 2048, NRD = 10;
  logic we; logic [10:0] waddr; logic [15:0] wdata;
  logic [NRD-1:0][10:0] raddr; logic [NRD-1:0][15:0] rdata;
  logic [15:0] model [DEPTH];

  acs_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    we = 0; raddr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 11'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (400) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) raddr[p] = 11'($urandom);
      @(posedge clk); #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++; $display("FAIL port %0d addr %0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
