// acs_core: the reconfigurable ACS datapath (the "ACS IP core").
//
// A pool of arithmetic units - nine shift-accumulate units (SAC1..SAC9), a
// stand-alone shifter, two rounders, a squaring unit, a Booth multiplier, two
// 16-bit adders, a 32-bit adder and a comparator - sits behind operand
// multiplexers. A configuration word chooses, for every unit, where each operand
// comes from: a memory word, a word driven by the host, a result register, or
// the output of another unit.
// Dependent operations are therefore chained combinationally and a whole dataflow
// graph (for example "s = a + b; s = s + c") completes in a single clock cycle.
// Three result multiplexers choose what is written into REG1 (32 bit), REG2
// (32 bit) and REG3 (16 bit); the comparator result is written into the o_CMP flag.
// A unit whose enable bit is clear has its operands forced to zero (isolation).
//
// Timing: cfg/cfg_valid are registered into the configuration register at a
// clock edge; during the following cycle the datapath evaluates with that
// configuration and the h[] words (which the memory delivers in the same cycle),
// and the next clock edge writes REG1..REG3 and o_CMP. A cycle without cfg_valid
// loads an all-zero configuration: every unit idle, no register written.
//
// Interface: h[] are the NUM_RD 16-bit words read from the data memory; hd[]
// are NUM_HD words the host drives directly, registered together with cfg; reg1,
// reg2, reg3 and o_cmp go back to the host controller and can also be fed back
// as operands.
//
// Follows the document: the unit pool, the widths, MUXREG1 with ten inputs
// (SAC1..SAC9 and ROUND1), MUXREG2 with eight (MULT, ADD32, ADD16, SHIFT and the
// odd SACs 3, 5, 7, 9), MUXREG3 with the three 16-bit units, saturation
// everywhere, operand isolation, host-written configuration bits.
// This design's choices: the source lists of the operand multiplexers, which
// only offer results computed earlier in a fixed unit order
//   ADD16A, ADD16B, SQUARE, SHIFT, SAC1..SAC4, ROUND1, SAC5..SAC9, ROUND2,
//   MULT, ADD32, CMP
// so that no configuration closes a combinational loop; the fixed position of
// ROUND1 after SAC4; the 32-bit memory operands formed from word pairs; the
// number of direct host words (two, also usable as one 32-bit pair); the
// registered configuration word and the synchronous reset.
module acs_core
  import acs_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_valid,
  input  acs_cfg_t                 cfg,
  input  logic [NUM_RD-1:0][15:0]  h,
  input  logic [NUM_HD-1:0][15:0]  hd,
  output logic [31:0]              reg1,
  output logic [31:0]              reg2,
  output logic [15:0]              reg3,
  output logic                     o_cmp
);

  typedef logic [N_SRC16-1:0][15:0] snap16_t;
  typedef logic [N_SRC32-1:0][31:0] snap32_t;

  // ---------------------------------------------------------------- config register
  acs_cfg_t c;
  logic [NUM_HD-1:0][15:0] hd_q;   // direct host data, aligned with the configuration
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c    <= '0;
      hd_q <= '0;
    end else if (cfg_valid) begin
      c    <= cfg;
      hd_q <= hd;
    end else begin
      c    <= '0;
      hd_q <= '0;
    end
  end

  // ---------------------------------------------------------------- primary sources
  snap16_t s16_0, s16_1, s16_2, s16_3, s16_4, s16_5;
  snap32_t s32_0, s32_1, s32_m, s32_a;

  always_comb begin
    s16_0 = '0;
    for (int i = 0; i < NUM_RD; i++) s16_0[int'(S16_H0) + i] = h[i];
    for (int i = 0; i < NUM_HD; i++) s16_0[int'(S16_HD0) + i] = hd_q[i];
    s16_0[S16_REG3] = reg3;
  end

  always_comb begin
    s32_0 = '0;
    for (int i = 0; i < NUM_RD / 2; i++) s32_0[int'(S32_HP0) + i] = {h[2*i+1], h[2*i]};
    s32_0[S32_HDP]  = {hd_q[1], hd_q[0]};
    s32_0[S32_REG1] = reg1;
    s32_0[S32_REG2] = reg2;
  end

  // ---------------------------------------------------------------- ADD16A
  logic [15:0] add16a_a, add16a_b, add16a_y;
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_add16a_a (.d(s16_0), .sel(c.add16a.a), .en(c.add16a.en), .y(add16a_a));
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_add16a_b (.d(s16_0), .sel(c.add16a.b), .en(c.add16a.en), .y(add16a_b));
  acs_add16 u_add16a (.a(add16a_a), .b(add16a_b), .sub(c.add16a.sub), .y(add16a_y));
  always_comb begin
    s16_1 = s16_0;
    s16_1[S16_ADD16A] = add16a_y;
  end

  // ---------------------------------------------------------------- ADD16B
  logic [15:0] add16b_a, add16b_b, add16b_y;
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_add16b_a (.d(s16_1), .sel(c.add16b.a), .en(c.add16b.en), .y(add16b_a));
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_add16b_b (.d(s16_1), .sel(c.add16b.b), .en(c.add16b.en), .y(add16b_b));
  acs_add16 u_add16b (.a(add16b_a), .b(add16b_b), .sub(c.add16b.sub), .y(add16b_y));
  always_comb begin
    s16_2 = s16_1;
    s16_2[S16_ADD16B] = add16b_y;
  end

  // ---------------------------------------------------------------- SQUARE (MUX SQ)
  logic [15:0] sq_x, sq_y;
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_sq (.d(s16_2), .sel(c.sq.in), .en(c.sq.en), .y(sq_x));
  acs_square u_square (.x(sq_x), .y(sq_y));
  always_comb begin
    s16_3 = s16_2;
    s16_3[S16_SQ] = sq_y;
  end

  // ---------------------------------------------------------------- SHIFT
  logic [15:0] shift_x;
  logic [31:0] shift_y;
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_shift (.d(s16_3), .sel(c.shift.in), .en(c.shift.en), .y(shift_x));
  acs_shift u_shift (.x(shift_x), .n(c.shift.n), .y(shift_y));
  always_comb begin
    s32_1 = s32_0;
    s32_1[S32_SHIFT] = shift_y;
  end

  // ---------------------------------------------------------------- SAC1..SAC9 (MUX[1..9])
  logic [15:0] rnd1_y;
  logic [31:0] rnd1_x;
  logic [NUM_SAC-1:0][31:0] sac_y;

  for (genvar k = 0; k < NUM_SAC; k++) begin : g_sac
    snap16_t d_src;
    snap32_t acc_src, snap;
    logic [15:0] x;
    logic [31:0] acc, y;

    if (k == 0) begin : g_first
      assign acc_src = s32_1;
    end else begin : g_next
      assign acc_src = g_sac[k-1].snap;
    end
    if (k < RND1_TAP) begin : g_pre_rnd
      assign d_src = s16_3;
    end else begin : g_post_rnd
      assign d_src = s16_4;
    end

    acs_opmux #(.W(16), .N(N_SRC16)) u_mux_d   (.d(d_src),   .sel(c.sac[k].d),   .en(c.sac[k].en), .y(x));
    acs_opmux #(.W(32), .N(N_SRC32)) u_mux_acc (.d(acc_src), .sel(c.sac[k].acc), .en(c.sac[k].en), .y(acc));
    acs_sac u_sac (.x(x), .acc(acc), .n(c.sac[k].n), .y(y));

    always_comb begin
      snap = acc_src;
      snap[int'(S32_SAC1) + k] = y;
    end
    assign sac_y[k] = y;

    // A SAC may only accumulate onto a result that exists before it.
    a_sac_order: assert property (@(posedge clk) disable iff (!rst_n)
      c.sac[k].en |-> 32'(c.sac[k].acc) < 32'(S32_SAC1) + k)
      else $error("SAC%0d accumulates a later result", k + 1);
  end

  // ---------------------------------------------------------------- ROUND1 (after SAC4)
  acs_opmux #(.W(32), .N(N_SRC32)) u_mux_rnd1 (.d(g_sac[RND1_TAP-1].snap), .sel(c.rnd1.in), .en(c.rnd1.en), .y(rnd1_x));
  acs_round u_round1 (.x(rnd1_x), .y(rnd1_y));
  always_comb begin
    s16_4 = s16_3;
    s16_4[S16_RND1] = rnd1_y;
  end

  // ---------------------------------------------------------------- ROUND2 (MUX RND)
  logic [31:0] rnd2_x;
  logic [15:0] rnd2_y;
  acs_opmux #(.W(32), .N(N_SRC32)) u_mux_rnd2 (.d(g_sac[NUM_SAC-1].snap), .sel(c.rnd2.in), .en(c.rnd2.en), .y(rnd2_x));
  acs_round u_round2 (.x(rnd2_x), .y(rnd2_y));
  always_comb begin
    s16_5 = s16_4;
    s16_5[S16_RND2] = rnd2_y;
  end

  // ---------------------------------------------------------------- MULT
  logic [15:0] mult_a, mult_b;
  logic [31:0] mult_y;
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_mult_a (.d(s16_5), .sel(c.mult.a), .en(c.mult.en), .y(mult_a));
  acs_opmux #(.W(16), .N(N_SRC16)) u_mux_mult_b (.d(s16_5), .sel(c.mult.b), .en(c.mult.en), .y(mult_b));
  acs_booth_mult u_mult (.a(mult_a), .b(mult_b), .y(mult_y));
  always_comb begin
    s32_m = g_sac[NUM_SAC-1].snap;
    s32_m[S32_MULT] = mult_y;
  end

  // ---------------------------------------------------------------- ADD32
  logic [31:0] add32_a, add32_b, add32_y;
  acs_opmux #(.W(32), .N(N_SRC32)) u_mux_add32_a (.d(s32_m), .sel(c.add32.a), .en(c.add32.en), .y(add32_a));
  acs_opmux #(.W(32), .N(N_SRC32)) u_mux_add32_b (.d(s32_m), .sel(c.add32.b), .en(c.add32.en), .y(add32_b));
  acs_add32 u_add32 (.a(add32_a), .b(add32_b), .sub(c.add32.sub), .y(add32_y));
  always_comb begin
    s32_a = s32_m;
    s32_a[S32_ADD32] = add32_y;
  end

  // ---------------------------------------------------------------- CMP (MUX CMP)
  logic [31:0] cmp_a, cmp_b;
  logic        cmp_gt;
  acs_opmux #(.W(32), .N(N_SRC32)) u_mux_cmp_a (.d(s32_a), .sel(c.cmp.a), .en(c.cmp.en), .y(cmp_a));
  acs_opmux #(.W(32), .N(N_SRC32)) u_mux_cmp_b (.d(s32_a), .sel(c.cmp.b), .en(c.cmp.en), .y(cmp_b));
  acs_cmp u_cmp (.a(cmp_a), .b(cmp_b), .gt(cmp_gt));

  // ---------------------------------------------------------------- MUXREG1..3
  logic [9:0][31:0] mr1_d;
  logic [7:0][31:0] mr2_d;
  logic [2:0][15:0] mr3_d;
  logic [31:0]      mr1_y, mr2_y;
  logic [15:0]      mr3_y;

  assign mr1_d = {{{16{rnd1_y[15]}}, rnd1_y}, sac_y};
  assign mr2_d = {sac_y[8], sac_y[6], sac_y[4], sac_y[2],
                  shift_y, {{16{add16a_y[15]}}, add16a_y}, add32_y, mult_y};
  assign mr3_d = {rnd2_y, sq_y, add16b_y};

  acs_opmux #(.W(32), .N(10), .SW(4)) u_muxreg1 (.d(mr1_d), .sel(c.regs.sel1), .en(c.regs.we1), .y(mr1_y));
  acs_opmux #(.W(32), .N(8),  .SW(3)) u_muxreg2 (.d(mr2_d), .sel(c.regs.sel2), .en(c.regs.we2), .y(mr2_y));
  acs_opmux #(.W(16), .N(3),  .SW(2)) u_muxreg3 (.d(mr3_d), .sel(c.regs.sel3), .en(c.regs.we3), .y(mr3_y));

  // ---------------------------------------------------------------- REG1..3, o_CMP
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg1  <= '0;
      reg2  <= '0;
      reg3  <= '0;
      o_cmp <= 1'b0;
    end else begin
      if (c.regs.we1) reg1  <= mr1_y;
      if (c.regs.we2) reg2  <= mr2_y;
      if (c.regs.we3) reg3  <= mr3_y;
      if (c.cmp.en)   o_cmp <= cmp_gt;
    end
  end

endmodule
