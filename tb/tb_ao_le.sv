// tb_ao_le: self-checking testbench of the arithmetic logic element.
//
// Part 1 drives random configuration words and random inputs and compares
// every output with a reference model written from the truth-table view of
// the LE: the LUT-3 as one 8-entry table {lut_b, lut_a} indexed by (A,D,C),
// the sum as the parity of the two LUT-2 results and the carry as "both
// LUT-2 results or both C and D". The model tracks the two
// registers itself, which checks that a registered output appears exactly
// one clock after its input.
// Part 2 configures the LE as a gated full adder (partial product of the two
// broadcast operands plus two local inputs) and checks all 16 input
// combinations.
// Part 3 repeats the gated full adder with only the smaller operand and
// output selection of the published LE, over all 256 input combinations.
module tb_ao_le;
  import efpga_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n;
  le_cfg_t       cfg;
  logic          g_h;
  logic [BV-1:0] g_v_in, g_v_out;
  logic          loc_nw, loc_ne, loc_e;
  logic [1:0]    loc_n;
  logic          out_w, out_sw, out_se;
  logic [1:0]    out_s;

  int checks = 0;
  int failures = 0;

  ao_le dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic q0e, q1e, d0e, d1e;

  function automatic logic pick(input logic [2:0] s);
    case (s)
      3'd0: return g_h;
      3'd1: return g_v_in[0];
      3'd2: return g_v_in[1];
      3'd3: return loc_nw;
      3'd4: return loc_n[0];
      3'd5: return loc_n[1];
      3'd6: return loc_ne;
      default: return loc_e;
    endcase
  endfunction

  task automatic model(output logic d0, output logic d1);
    logic a, b, c, d, fa, t, fb, sum, cy;
    logic [7:0] tab3;
    a = pick(cfg.src_a);
    b = pick(cfg.src_b);
    c = pick(cfg.src_c);
    d = pick(cfg.src_d);
    tab3 = {cfg.lut_b, cfg.lut_a};
    fa = cfg.lut_a[2*b + a];
    fb = cfg.lut_b[2*d + c];
    t  = cfg.lut3 ? tab3[4*a + 2*d + c] : fa;
    sum = ^{fa, fb};
    cy  = (fa && fb) || (c && d);
    d0 = cfg.d0_sum ? sum : t;
    d1 = cfg.d1_carry ? cy : fb;
  endtask

  task automatic check_outputs();
    logic o0, o1;
    logic [1:0] gv;
    model(d0e, d1e);
    o0 = cfg.reg0 ? q0e : d0e;
    o1 = cfg.reg1 ? q1e : d1e;
    gv[0] = (cfg.bdrv0 == BDRV_O0) ? o0 : (cfg.bdrv0 == BDRV_O1) ? o1 : g_v_in[0];
    gv[1] = (cfg.bdrv1 == BDRV_O0) ? o0 : (cfg.bdrv1 == BDRV_O1) ? o1 : g_v_in[1];
    checks++;
    if (out_s !== {o1, o0} || out_w !== (cfg.w_o1 ? o1 : o0) ||
        out_sw !== (cfg.sw_o1 ? o1 : o0) || out_se !== (cfg.se_o1 ? o1 : o0) ||
        g_v_out !== gv) begin
      failures++;
      if (failures < 10)
        $display("mismatch cfg=%h s=%b w=%b sw=%b se=%b gv=%b exp o0=%b o1=%b gv=%b",
                 cfg, out_s, out_w, out_sw, out_se, g_v_out, o0, o1, gv);
    end
  endtask

  int n_pp_ok;

  initial begin
    rst_n = 1'b0;
    cfg = '0;
    {g_h, g_v_in, loc_nw, loc_n, loc_ne, loc_e} = '0;
    q0e = 1'b0;
    q1e = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ---------------- part 1: random configurations
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      cfg = le_cfg_t'($urandom);
      {g_h, g_v_in, loc_nw, loc_n, loc_ne, loc_e} = 8'($urandom);
      #1;
      check_outputs();
      @(posedge clk);
      q0e = d0e;
      q1e = d1e;
    end

    // ---------------- part 2: gated full adder
    @(negedge clk);
    cfg = '0;
    cfg.src_a    = SRC_GV0;  // multiplicand bit (vertical broadcast)
    cfg.src_b    = SRC_GH;   // multiplier bit (horizontal broadcast)
    cfg.src_c    = SRC_NW;   // partial sum from the upper-left
    cfg.src_d    = SRC_E;    // carry from the right
    cfg.lut_a    = LUT_AND;
    cfg.lut_b    = LUT_XOR;
    cfg.d0_sum   = 1'b1;
    cfg.d1_carry = 1'b1;
    n_pp_ok = 0;
    for (int v = 0; v < 16; v++) begin
      int total;
      {g_v_in[0], g_h, loc_nw, loc_e} = 4'(v);
      #1;
      total = int'(g_v_in[0] & g_h) + int'(loc_nw) + int'(loc_e);
      checks++;
      if (out_s !== 2'(total)) begin
        failures++;
        $display("gated FA: in=%b got %b exp %0d", 4'(v), out_s, total);
      end else n_pp_ok++;
    end

    // ---------------- part 3: the smaller published selection
    // A = GV0, B = GH, C = NE, D = N1; o0 down, south-west and onto line 0,
    // o1 down, west, south-east and onto line 1. Gated full adder again,
    // with every input of the LE toggled.
    @(negedge clk);
    cfg = '0;
    cfg.src_a    = SRC_GV0;
    cfg.src_b    = SRC_GH;
    cfg.src_c    = SRC_NE;
    cfg.src_d    = SRC_N1;
    cfg.lut_a    = LUT_AND;
    cfg.lut_b    = LUT_XOR;
    cfg.d0_sum   = 1'b1;
    cfg.d1_carry = 1'b1;
    cfg.w_o1     = 1'b1;
    cfg.se_o1    = 1'b1;
    cfg.bdrv0    = BDRV_O0;
    cfg.bdrv1    = BDRV_O1;
    for (int v = 0; v < 256; v++) begin
      int total;
      logic s0, s1;
      {g_h, g_v_in, loc_nw, loc_n, loc_ne, loc_e} = 8'(v);
      #1;
      total = int'(g_v_in[0] & g_h) + int'(loc_ne) + int'(loc_n[1]);
      {s1, s0} = 2'(total);
      checks++;
      if (out_s !== {s1, s0} || out_sw !== s0 || out_w !== s1 || out_se !== s1 ||
          g_v_out !== {s1, s0}) begin
        failures++;
        if (failures < 10) $display("published selection: in=%b got s=%b w=%b sw=%b se=%b gv=%b",
                                    8'(v), out_s, out_w, out_sw, out_se, g_v_out);
      end else n_pp_ok++;
    end

    $display("gated full adder combinations correct: %0d of 272", n_pp_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
