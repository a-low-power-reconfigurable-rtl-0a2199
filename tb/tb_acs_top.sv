// tb_acs_top: end-to-end test of the ACS subsystem at its default size.
//
// The testbench plays the host controller. It writes a 40-sample subframe of
// random search data into the memory - the correlation vector dn[40] and the
// symmetric correlation matrix rr[40][40] - and then runs the nested search of
// one pulse pair (i2, i3) for several (i0, i1) starts, exactly as the speech
// codec's algebraic codebook search does for one pair of tracks:
//
//   outer step (one cycle per i2): ps1  = dn[i0] + dn[i1] + dn[i2]
//                                  alp1 = rr[i0][i0]/16 + rr[i1][i1]/16 + rr[i0][i1]/8
//                                       + rr[i2][i2]/16 + rr[i0][i2]/8 + rr[i1][i2]/8
//     (two 16-bit adds and six chained SACs in a single configuration)
//   inner step A (per i3):  ps2 = ps1 + dn[i3];  sq2 = ps2^2
//                           rrv = round(rr[i3][i3]/8 + rr[i0][i3]/4 + rr[i1][i3]/4)
//                           alp2 = alp1 + rrv/2 + rr[i2][i3]/8;  alp16 = round(alp2)
//                           REG2 = sq*alp16 (sq, alp: best so far)
//   inner step B:           s = alp*sq2 - REG2;  o_CMP = (s > 0);  REG3 = alp16
//
// The best sq/alp so far are supplied on the direct host-data inputs; when
// o_CMP is set the host updates them. The chosen
// pair and every intermediate register value are checked against a reference
// search written with integer versions of the codec's fractional operators.
// Mechanisms counted (each must occur): direct host operands, two independent datapaths built in the
// same configuration, chained dependent operations in one cycle, reconfiguration between consecutive cycles, register feedback,
// comparator "better" and "not better" outcomes, saturation, and isolation of
// an unused unit. Also checks the two-cycle issue-to-result latency.
module tb_acs_top;
  import acs_pkg::*;

  localparam int L = 40;        // subframe length
  localparam int STEP = 5;      // track step
  localparam int A_DN   = 0;
  localparam int A_RR   = 64;   // rr[i][j] at A_RR + 40*i + j
  localparam int A_PS1  = 1800;
  localparam int A_ALP1 = 1802; // low word; high word at +1

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, mem_we, cfg_valid, o_cmp;
  logic [10:0] mem_waddr;
  logic [15:0] mem_wdata;
  logic [NUM_RD-1:0][10:0] mem_raddr;
  acs_cfg_t cfg;
  logic [NUM_HD-1:0][15:0] host_data;
  logic [31:0] reg1, reg2;
  logic [15:0] reg3;

  acs_top dut (.clk(clk), .rst_n(rst_n), .mem_we(mem_we), .mem_waddr(mem_waddr),
               .mem_wdata(mem_wdata), .mem_raddr(mem_raddr), .cfg_valid(cfg_valid),
               .host_data(host_data), .cfg(cfg), .reg1(reg1), .reg2(reg2), .reg3(reg3), .o_cmp(o_cmp));

  // ------------------------------------------------------------- reference operators
  function automatic longint sat(input longint v, input int bits);
    longint hi = (longint'(1) <<< (bits - 1)) - 1;
    longint lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  function automatic longint add(input longint a, input longint b);    return sat(a + b, 16); endfunction
  function automatic longint L_mult(input longint a, input longint b); return sat(2 * a * b, 32); endfunction
  function automatic longint L_mac(input longint c, input longint a, input longint b);
    return sat(c + L_mult(a, b), 32);
  endfunction
  function automatic longint mult(input longint a, input longint b);  return sat((a * b) >>> 15, 16); endfunction
  function automatic longint rnd(input longint x);                    return sat(x + 32768, 32) >>> 16; endfunction
  localparam longint Q_1_2 = 16384, Q_1_4 = 8192, Q_1_8 = 4096, Q_1_16 = 2048;

  // ------------------------------------------------------------- data
  longint dn [L];
  longint rr [L][L];

  // mechanism counters
  int n_direct = 0, n_chain = 0, n_parallel = 0, n_reconf = 0, n_feedback = 0, n_better = 0, n_worse = 0, n_sat = 0, n_iso = 0;

  task automatic mem_write(input int addr, input logic [15:0] data);
    @(negedge clk);
    mem_we = 1'b1; mem_waddr = 11'(addr); mem_wdata = data;
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  // Issue one configuration; returns after the results are in the registers.
  task automatic issue(input acs_cfg_t k, input int addr [NUM_RD]);
    @(negedge clk);
    for (int p = 0; p < NUM_RD; p++) mem_raddr[p] = 11'(addr[p]);
    cfg = k; cfg_valid = 1'b1;
    @(negedge clk);
    cfg_valid = 1'b0; cfg = '0;
    @(negedge clk);
  endtask

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int rra(input int i, input int j); return A_RR + L * i + j; endfunction

  // ------------------------------------------------------------- host program
  task automatic search(input int i0, input int i1, input int ipos2, input int ipos3,
                        output int best2, output int best3);
    acs_cfg_t ko, ka, kb;
    int ad [NUM_RD];
    longint r_ps1, r_alp1, r_ps2, r_rrv, r_alp2, r_alp16, r_sq2, r_s;
    longint sq, alp, got_sq2;
    // host-side best, as the codec initialises it
    sq = -1; alp = 1;
    best2 = -1; best3 = -1;

    // outer-step configuration: two 16-bit adds and six chained SACs
    ko = '0;
    ko.add16a = '{en: 1'b1, sub: 1'b0, a: S16_H0, b: S16_H1};
    ko.add16b = '{en: 1'b1, sub: 1'b0, a: S16_ADD16A, b: S16_H2};
    ko.sac[0] = '{en: 1'b1, d: S16_H3, acc: S32_ZERO, n: 4'd4};
    ko.sac[1] = '{en: 1'b1, d: S16_H4, acc: S32_SAC1, n: 4'd4};
    ko.sac[2] = '{en: 1'b1, d: S16_H5, acc: S32_SAC2, n: 4'd3};
    ko.sac[3] = '{en: 1'b1, d: S16_H6, acc: S32_SAC3, n: 4'd4};
    ko.sac[4] = '{en: 1'b1, d: S16_H7, acc: S32_SAC4, n: 4'd3};
    ko.sac[5] = '{en: 1'b1, d: S16_H8, acc: S32_SAC5, n: 4'd3};
    ko.regs.we1 = 1'b1; ko.regs.sel1 = 4'd5;      // REG1 <= SAC6 (alp1)
    ko.regs.we3 = 1'b1; ko.regs.sel3 = MR3_ADD16; // REG3 <= ADD16B (ps1)

    // inner step A
    ka = '0;
    ka.add16a = '{en: 1'b1, sub: 1'b0, a: S16_H0, b: S16_H1};      // ps2
    ka.sq     = '{en: 1'b1, in: S16_ADD16A};                       // sq2
    ka.sac[0] = '{en: 1'b1, d: S16_H2, acc: S32_ZERO, n: 4'd3};
    ka.sac[1] = '{en: 1'b1, d: S16_H3, acc: S32_SAC1, n: 4'd2};
    ka.sac[2] = '{en: 1'b1, d: S16_H4, acc: S32_SAC2, n: 4'd2};
    ka.rnd1   = '{en: 1'b1, in: S32_SAC3};                         // rrv
    ka.sac[4] = '{en: 1'b1, d: S16_RND1, acc: S32_HP3, n: 4'd1};   // alp1 + rrv/2
    ka.sac[5] = '{en: 1'b1, d: S16_H5, acc: S32_SAC5, n: 4'd3};    // alp2
    ka.rnd2   = '{en: 1'b1, in: S32_SAC6};                         // alp16
    ka.mult   = '{en: 1'b1, a: S16_HD0, b: S16_RND2};              // sq*alp16, sq from the host
    ka.regs   = '{we1: 1'b1, sel1: 4'd5, we2: 1'b1, sel2: MR2_MULT, we3: 1'b1, sel3: MR3_SQ};

    // inner step B
    kb = '0;
    kb.mult  = '{en: 1'b1, a: S16_HD1, b: S16_REG3};               // alp*sq2, alp from the host
    kb.add32 = '{en: 1'b1, sub: 1'b1, a: S32_MULT, b: S32_REG2};   // s
    kb.cmp   = '{en: 1'b1, a: S32_ADD32, b: S32_ZERO};
    kb.rnd2  = '{en: 1'b1, in: S32_REG1};                          // alp16 again
    kb.regs  = '{we1: 1'b0, sel1: 4'd0, we2: 1'b1, sel2: MR2_ADD32, we3: 1'b1, sel3: MR3_RND2};

    for (int i2 = ipos2; i2 < L; i2 += STEP) begin
      ad = '{A_DN + i0, A_DN + i1, A_DN + i2, rra(i0, i0), rra(i1, i1), rra(i0, i1),
             rra(i2, i2), rra(i0, i2), rra(i1, i2), 0};
      issue(ko, ad);
      n_chain++;
      n_parallel++;                 // ADD16 chain -> REG3 and SAC chain -> REG1 side by side
      r_ps1  = add(add(dn[i0], dn[i1]), dn[i2]);
      r_alp1 = L_mult(rr[i0][i0], Q_1_16);
      r_alp1 = L_mac(r_alp1, rr[i1][i1], Q_1_16);
      r_alp1 = L_mac(r_alp1, rr[i0][i1], Q_1_8);
      r_alp1 = L_mac(r_alp1, rr[i2][i2], Q_1_16);
      r_alp1 = L_mac(r_alp1, rr[i0][i2], Q_1_8);
      r_alp1 = L_mac(r_alp1, rr[i1][i2], Q_1_8);
      expect_eq("ps1", longint'($signed(reg3)), r_ps1);
      expect_eq("alp1", longint'($signed(reg1)), r_alp1);
      if (dn[i0] + dn[i1] + dn[i2] > 32767 && reg3 == 16'h7FFF) n_sat++;
      // host stores the loop invariants for the inner loop
      mem_write(A_PS1, reg3);
      mem_write(A_ALP1, reg1[15:0]);
      mem_write(A_ALP1 + 1, reg1[31:16]);

      for (int i3 = ipos3; i3 < L; i3 += STEP) begin
        ad = '{A_PS1, A_DN + i3, rra(i3, i3), rra(i0, i3), rra(i1, i3), rra(i2, i3),
               A_ALP1, A_ALP1 + 1, 0, 0};
        // step A and step B issued back to back (B reads A's registers)
        @(negedge clk);
        for (int p = 0; p < NUM_RD; p++) mem_raddr[p] = 11'(ad[p]);
        cfg = ka; cfg_valid = 1'b1;
        host_data[0] = 16'(sq); host_data[1] = 16'(alp);   // best so far, supplied directly
        n_direct++;
        @(negedge clk);
        cfg = kb; cfg_valid = 1'b1;     // reconfigure: next cycle is step B
        n_reconf++;
        @(negedge clk);
        cfg_valid = 1'b0; cfg = '0;
        // REG1..3 now hold step A's results while step B executes
        r_ps2   = add(r_ps1, dn[i3]);
        r_sq2   = mult(r_ps2, r_ps2);
        r_rrv   = rnd(sat(sat(L_mult(rr[i3][i3], Q_1_8) + L_mult(rr[i0][i3], Q_1_4), 32)
                          + L_mult(rr[i1][i3], Q_1_4), 32));
        r_alp2  = L_mac(r_alp1, r_rrv, Q_1_2);
        r_alp2  = L_mac(r_alp2, rr[i2][i3], Q_1_8);
        r_alp16 = rnd(r_alp2);
        expect_eq("sq2", longint'($signed(reg3)), r_sq2);
        expect_eq("alp2", longint'($signed(reg1)), r_alp2);
        expect_eq("sq*alp16", longint'($signed(reg2)), L_mult(sq, r_alp16));
        got_sq2 = longint'($signed(reg3));
        // isolation: units left out of step B see zero operands
        checks++;
        if (dut.u_core.sq_x !== 16'h0 || dut.u_core.shift_x !== 16'h0 ||
            dut.u_core.g_sac[0].x !== 16'h0 || dut.u_core.g_sac[0].acc !== 32'h0) begin
          failures++; $display("FAIL isolation");
        end else n_iso++;
        @(negedge clk);
        n_feedback++;
        r_s = sat(L_mult(alp, r_sq2) - L_mult(sq, r_alp16), 32);
        expect_eq("s", longint'($signed(reg2)), r_s);
        expect_eq("alp16", longint'($signed(reg3)), r_alp16);
        expect_eq("o_cmp", longint'(o_cmp), longint'(r_s > 0));
        if (o_cmp) begin
          n_better++;
          sq = got_sq2; alp = longint'($signed(reg3));
          best2 = i2; best3 = i3;
        end else n_worse++;
      end
    end
  endtask

  // reference search, written straight from the codec loop
  task automatic ref_search(input int i0, input int i1, input int ipos2, input int ipos3,
                            output int best2, output int best3);
    longint sq, alp, ps1, alp1, ps2, sq2, rrv, alp2, alp16, s;
    sq = -1; alp = 1; best2 = -1; best3 = -1;
    for (int i2 = ipos2; i2 < L; i2 += STEP) begin
      ps1  = add(add(dn[i0], dn[i1]), dn[i2]);
      alp1 = L_mult(rr[i0][i0], Q_1_16);
      alp1 = L_mac(alp1, rr[i1][i1], Q_1_16);
      alp1 = L_mac(alp1, rr[i0][i1], Q_1_8);
      alp1 = L_mac(alp1, rr[i2][i2], Q_1_16);
      alp1 = L_mac(alp1, rr[i0][i2], Q_1_8);
      alp1 = L_mac(alp1, rr[i1][i2], Q_1_8);
      for (int i3 = ipos3; i3 < L; i3 += STEP) begin
        ps2   = add(ps1, dn[i3]);
        sq2   = mult(ps2, ps2);
        rrv   = rnd(sat(sat(L_mult(rr[i3][i3], Q_1_8) + L_mult(rr[i0][i3], Q_1_4), 32)
                        + L_mult(rr[i1][i3], Q_1_4), 32));
        alp2  = L_mac(alp1, rrv, Q_1_2);
        alp2  = L_mac(alp2, rr[i2][i3], Q_1_8);
        alp16 = rnd(alp2);
        s     = sat(L_mult(alp, sq2) - L_mult(sq, alp16), 32);
        if (s > 0) begin sq = sq2; alp = alp16; best2 = i2; best3 = i3; end
      end
    end
  endtask

  initial begin
    int b2, b3, r2, r3;
    int t0, cycles;
    rst_n = 1'b0; mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0;
    mem_raddr = '0; cfg = '0; cfg_valid = 1'b0; host_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    for (int trial = 0; trial < 3; trial++) begin
      // search data: dn in a range that the sums can saturate in trial 2
      for (int i = 0; i < L; i++) begin
        dn[i] = (trial == 2) ? longint'($urandom_range(12000, 32767))
                             : longint'($signed(16'($urandom_range(0, 16383) - 8192)));
      end
      for (int i = 0; i < L; i++)
        for (int j = i; j < L; j++) begin
          rr[i][j] = (i == j) ? longint'($urandom_range(4000, 32767))
                              : longint'($signed(16'($urandom_range(0, 32767) - 16384)));
          rr[j][i] = rr[i][j];
        end
      for (int i = 0; i < L; i++) mem_write(A_DN + i, 16'(dn[i]));
      for (int i = 0; i < L; i++)
        for (int j = 0; j < L; j++) mem_write(rra(i, j), 16'(rr[i][j]));

      t0 = $time;
      search(trial, 5 + trial, 2, 3, b2, b3);
      cycles = int'(($time - t0) / 10);
      ref_search(trial, 5 + trial, 2, 3, r2, r3);
      expect_eq("best i2", b2, r2);
      expect_eq("best i3", b3, r3);
      $display("trial %0d: pair (%0d,%0d), reference (%0d,%0d), %0d host cycles", trial, b2, b3, r2, r3, cycles);
    end

    // latency of one configuration: registers change exactly two edges after issue
    begin
      acs_cfg_t k;
      int ad [NUM_RD];
      k = '0;
      k.add16b = '{en: 1'b1, sub: 1'b1, a: S16_H0, b: S16_H1};
      k.regs.we3 = 1'b1; k.regs.sel3 = MR3_ADD16;
      ad = '{A_DN, A_DN + 1, 0, 0, 0, 0, 0, 0, 0, 0};
      dn[1] = dn[0] + 1;            // result -1 differs from the alp16 left in REG3
      mem_write(A_DN + 1, 16'(dn[1]));
      @(negedge clk);
      for (int p = 0; p < NUM_RD; p++) mem_raddr[p] = 11'(ad[p]);
      cfg = k; cfg_valid = 1'b1;
      @(negedge clk); cfg_valid = 1'b0; cfg = '0;
      expect_eq("latency: not yet", longint'(reg3 == 16'(sat(dn[0] - dn[1], 16))), 0);
      @(negedge clk);
      expect_eq("latency: after 2 edges", longint'($signed(reg3)), sat(dn[0] - dn[1], 16));
    end

    $display("mechanisms: direct=%0d parallel=%0d chained=%0d reconfig=%0d feedback=%0d better=%0d worse=%0d saturation=%0d isolation=%0d",
             n_direct, n_parallel, n_chain, n_reconf, n_feedback, n_better, n_worse, n_sat, n_iso);
    if (n_direct == 0 || n_parallel == 0 || n_chain == 0 || n_reconf == 0 || n_feedback == 0 || n_better == 0 || n_worse == 0 ||
        n_sat == 0 || n_iso == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
