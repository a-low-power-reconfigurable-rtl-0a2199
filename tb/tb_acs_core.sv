// tb_acs_core: self-checking testbench of the reconfigurable datapath.
//
// Drives random configuration words, random memory words and random direct host
// words into the core, one configuration per clock, and compares REG1..REG3 and o_CMP with a behavioural
// model that evaluates the units one after another in datapath order, reading a
// table of source values in which a unit's entry is still zero until the unit
// has been evaluated. The model uses its own integer arithmetic (fractional
// multiply, saturating add, rounding), not the RTL's. It also checks the cycle
// timing (results appear the second edge after the configuration is presented)
// and that an idle cycle writes no register.
module tb_acs_core;
  import acs_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, cfg_valid, o_cmp;
  acs_cfg_t cfg;
  logic [NUM_RD-1:0][15:0] h;
  logic [NUM_HD-1:0][15:0] hd;
  logic [31:0] reg1, reg2;
  logic [15:0] reg3;

  acs_core dut (.clk(clk), .rst_n(rst_n), .cfg_valid(cfg_valid), .cfg(cfg), .h(h), .hd(hd),
                .reg1(reg1), .reg2(reg2), .reg3(reg3), .o_cmp(o_cmp));

  // ------------------------------------------------------------- reference arithmetic
  function automatic longint sat(input longint v, input int bits);
    longint hi = (longint'(1) <<< (bits - 1)) - 1;
    longint lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  function automatic longint s16(input logic [15:0] v); return longint'($signed(v)); endfunction
  function automatic longint s32(input logic [31:0] v); return longint'($signed(v)); endfunction
  function automatic longint f_round(input longint x); return sat(x + 32768, 32) >>> 16; endfunction
  function automatic longint f_scale(input longint x, input int n); return x * (longint'(1) <<< (16 - n)); endfunction

  // model state
  longint m_reg1, m_reg2, m_reg3;
  logic   m_cmp;

  task automatic model_step(input acs_cfg_t k, input logic [NUM_RD-1:0][15:0] hv,
                          input logic [NUM_HD-1:0][15:0] hdv);
    longint v16 [N_SRC16];
    longint v32 [N_SRC32];
    longint a, b, mr;
    foreach (v16[i]) v16[i] = 0;
    foreach (v32[i]) v32[i] = 0;
    for (int i = 0; i < NUM_RD; i++) v16[int'(S16_H0) + i] = s16(hv[i]);
    for (int i = 0; i < NUM_RD / 2; i++) v32[int'(S32_HP0) + i] = s32({hv[2*i+1], hv[2*i]});
    v16[S16_HD0] = s16(hdv[0]); v16[S16_HD1] = s16(hdv[1]); v32[S32_HDP] = s32({hdv[1], hdv[0]});
    v16[S16_REG3] = m_reg3; v32[S32_REG1] = m_reg1; v32[S32_REG2] = m_reg2;
    // ADD16A, ADD16B
    a = k.add16a.en ? v16[k.add16a.a] : 0; b = k.add16a.en ? v16[k.add16a.b] : 0;
    v16[S16_ADD16A] = sat(k.add16a.sub ? a - b : a + b, 16);
    a = k.add16b.en ? v16[k.add16b.a] : 0; b = k.add16b.en ? v16[k.add16b.b] : 0;
    v16[S16_ADD16B] = sat(k.add16b.sub ? a - b : a + b, 16);
    // SQUARE
    a = k.sq.en ? v16[k.sq.in] : 0;
    v16[S16_SQ] = sat((a * a) >>> 15, 16);
    // SHIFT
    a = k.shift.en ? v16[k.shift.in] : 0;
    v32[S32_SHIFT] = f_scale(a, int'(k.shift.n));
    // SACs with ROUND1 after the fourth
    for (int s = 0; s < NUM_SAC; s++) begin
      if (s == RND1_TAP) begin
        a = k.rnd1.en ? v32[k.rnd1.in] : 0;
        v16[S16_RND1] = f_round(a);
      end
      a = k.sac[s].en ? v16[k.sac[s].d] : 0;
      b = k.sac[s].en ? v32[k.sac[s].acc] : 0;
      v32[int'(S32_SAC1) + s] = sat(b + f_scale(a, int'(k.sac[s].n)), 32);
    end
    // ROUND2
    a = k.rnd2.en ? v32[k.rnd2.in] : 0;
    v16[S16_RND2] = f_round(a);
    // MULT
    a = k.mult.en ? v16[k.mult.a] : 0; b = k.mult.en ? v16[k.mult.b] : 0;
    v32[S32_MULT] = sat(2 * a * b, 32);
    // ADD32
    a = k.add32.en ? v32[k.add32.a] : 0; b = k.add32.en ? v32[k.add32.b] : 0;
    v32[S32_ADD32] = sat(k.add32.sub ? a - b : a + b, 32);
    // CMP and registers
    a = k.cmp.en ? v32[k.cmp.a] : 0; b = k.cmp.en ? v32[k.cmp.b] : 0;
    if (k.cmp.en) m_cmp = (a > b);
    if (k.regs.we1) m_reg1 = (k.regs.sel1 == 4'd9) ? v16[S16_RND1] : (k.regs.sel1 < 4'd9 ? v32[int'(S32_SAC1) + int'(k.regs.sel1)] : 0);
    if (k.regs.we2) begin
      case (k.regs.sel2)
        MR2_MULT:  mr = v32[S32_MULT];
        MR2_ADD32: mr = v32[S32_ADD32];
        MR2_ADD16: mr = v16[S16_ADD16A];
        MR2_SHIFT: mr = v32[S32_SHIFT];
        MR2_SAC3:  mr = v32[S32_SAC3];
        MR2_SAC5:  mr = v32[S32_SAC5];
        MR2_SAC7:  mr = v32[S32_SAC7];
        default:   mr = v32[S32_SAC9];
      endcase
      m_reg2 = mr;
    end
    if (k.regs.we3) begin
      case (k.regs.sel3)
        MR3_ADD16: m_reg3 = v16[S16_ADD16B];
        MR3_SQ:    m_reg3 = v16[S16_SQ];
        MR3_RND2:  m_reg3 = v16[S16_RND2];
        default:   m_reg3 = 0;
      endcase
    end
  endtask

  // ------------------------------------------------------------- random stimulus
  function automatic src16_e r16(); return src16_e'(5'($urandom_range(0, N_SRC16 - 1))); endfunction
  function automatic src32_e r32(); return src32_e'(5'($urandom_range(0, N_SRC32 - 1))); endfunction

  function automatic acs_cfg_t rand_cfg();
    acs_cfg_t k;
    k = '0;
    k.add16a = '{en: 1'($urandom), sub: 1'($urandom), a: r16(), b: r16()};
    k.add16b = '{en: 1'($urandom), sub: 1'($urandom), a: r16(), b: r16()};
    k.sq     = '{en: 1'($urandom), in: r16()};
    k.shift  = '{en: 1'($urandom), in: r16(), n: 4'($urandom)};
    for (int s = 0; s < NUM_SAC; s++)
      k.sac[s] = '{en: ($urandom_range(0, 3) != 0), d: r16(),
                   acc: src32_e'(5'($urandom_range(0, int'(S32_SAC1) + s - 1))), n: 4'($urandom)};
    k.rnd1   = '{en: 1'($urandom), in: r32()};
    k.rnd2   = '{en: 1'($urandom), in: r32()};
    k.mult   = '{en: 1'($urandom), a: r16(), b: r16()};
    k.add32  = '{en: 1'($urandom), sub: 1'($urandom), a: r32(), b: r32()};
    k.cmp    = '{en: 1'($urandom), a: r32(), b: r32()};
    k.regs   = '{we1: 1'($urandom), sel1: 4'($urandom_range(0, 9)), we2: 1'($urandom),
                 sel2: mr2_e'(3'($urandom)), we3: 1'($urandom), sel3: mr3_e'(2'($urandom_range(0, 2)))};
    return k;
  endfunction

  task automatic compare(input string what);
    checks++;
    if (s32(reg1) != m_reg1 || s32(reg2) != m_reg2 || s16(reg3) != m_reg3 || o_cmp != m_cmp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: reg1=%h/%h reg2=%h/%h reg3=%h/%h cmp=%b/%b", what,
                 reg1, 32'(m_reg1), reg2, 32'(m_reg2), reg3, 16'(m_reg3), o_cmp, m_cmp);
    end
  endtask

  initial begin
    acs_cfg_t k;
    logic [NUM_RD-1:0][15:0] hv;
    logic [NUM_HD-1:0][15:0] hdv;
    rst_n = 1'b0; cfg_valid = 1'b0; cfg = '0; h = '0; hd = '0;
    m_reg1 = 0; m_reg2 = 0; m_reg3 = 0; m_cmp = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    // Directed timing check: one configuration, REG3 <= ADD16B(H0 + H1), then idle.
    k = '0;
    k.add16b = '{en: 1'b1, sub: 1'b0, a: S16_H0, b: S16_H1};
    k.regs.we3 = 1'b1; k.regs.sel3 = MR3_ADD16;
    cfg = k; cfg_valid = 1'b1;
    @(negedge clk);                 // configuration loaded at this cycle's rising edge
    cfg_valid = 1'b0; cfg = '0;
    h[0] = 16'd1000; h[1] = 16'd234; // memory words arrive with the configuration
    checks++;
    if (reg3 !== 16'd0) begin failures++; $display("FAIL result visible too early"); end
    @(negedge clk);
    h = '0;
    checks++;
    if (reg3 !== 16'd1234) begin failures++; $display("FAIL timing: reg3=%0d", reg3); end
    m_reg3 = 1234;
    @(negedge clk);                 // idle cycle must not write
    compare("idle");

    // Random configurations, one per cycle, pipelined.
    for (int t = 0; t < 3000; t++) begin
      k = rand_cfg();
      for (int i = 0; i < NUM_RD; i++) hv[i] = 16'($urandom);
      if (t % 7 == 0) hv[0] = 16'h7FFF;   // push towards saturation
      if (t % 11 == 0) hv[1] = 16'h8000;
      for (int i = 0; i < NUM_HD; i++) hdv[i] = 16'($urandom);
      cfg = k; cfg_valid = 1'b1; hd = hdv;
      @(negedge clk);
      h = hv;
      cfg_valid = 1'b0;
      hd = '0;
      model_step(k, hv, hdv);
      @(negedge clk);
      compare($sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
