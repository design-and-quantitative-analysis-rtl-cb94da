// ao_le: arithmetic-oriented logic element.
//
// The LE is built for bit-level arithmetic rather than for general logic.
// Its core has two 2-input lookup tables, dedicated sum and carry logic and
// two storage elements:
//   * Four operands A, B, C, D are each picked from the eight signals that
//     reach the LE: one horizontal broadcast line, two vertical broadcast
//     lines and five local nearest-neighbour inputs (upper-left diagonal,
//     two from above, upper-right diagonal, from the right).
//   * LUT-A computes fA = lut_a[{B,A}]. With A and B on the broadcast lines
//     and lut_a = AND it is the partial-product gate of an array multiplier.
//   * LUT-B computes fB = lut_b[{D,C}].
//   * sum = fA ^ fB, carry = fA&fB | C&D. With lut_b = XOR this is a full
//     adder on (fA, C, D): a gated full adder when fA is a partial product.
//   * LUT-3: a second decoder reads LUT-A's cells with (D,C), and A chooses
//     between that bit and fB, so the two tables form one LUT-3 on (A, D, C)
//     whose truth table is {lut_b, lut_a}. t = lut3 ? LUT-3 : fA.
//   * Path 0 carries sum or t, path 1 carries carry or fB. Each path has a
//     storage element; a configuration bit takes the output from the
//     register (pipelined) or straight from the path (transparent).
//   * Outputs o0/o1 leave downwards (s0 = o0, s1 = o1); the west and both
//     diagonal outputs each carry o0 or o1 by a configuration bit.
//   * Two broadcast-drive multiplexers can put o0 or o1 onto a vertical
//     broadcast line below the LE; otherwise the line passes through.
// The block structure follows the published LE: which signals feed the two
// LUT-2s, the second decoder, the LUT-3 multiplexer, the sum and carry gates
// and the two path multiplexers, and the multiplexers onto the broadcast
// lines. The published LE wires fewer sources to each operand (A fixed to
// vertical line 0, B from vertical line 1 or the horizontal line, C from
// above or upper-right, D from upper-left, above or right) and fixed outputs
// (o0 down, south-west and onto vertical line 0; o1 down, west, south-east
// and onto vertical line 1); here every operand multiplexer sees all eight
// sources and the output directions are selectable, a superset of those
// connections. The carry gate's exact function, and edge-triggered registers
// with a bypass in place of the published small transmission-gate latches,
// are this implementation's choices.
//
// Timing: everything is combinational from inputs to outputs except the two
// registers, which load on the rising clk edge and clear on rst_n low.
// Because the outputs can be transparent, lint tools see combinational loops
// through chains of LEs once they are wired into a fabric; a configuration
// that actually closes such a loop is illegal, as in any FPGA.
module ao_le
  import efpga_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  le_cfg_t         cfg,
  // broadcast (global) lines
  input  logic            g_h,        // horizontal broadcast line of the row
  input  logic [BV-1:0]   g_v_in,     // vertical broadcast lines from above
  output logic [BV-1:0]   g_v_out,    // vertical broadcast lines to below
  // local inputs
  input  logic            loc_nw,
  input  logic [1:0]      loc_n,
  input  logic            loc_ne,
  input  logic            loc_e,
  // local outputs
  output logic            out_w,
  output logic [1:0]      out_s,
  output logic            out_sw,
  output logic            out_se
);

  logic [7:0] srcs;
  logic       a, b, c, d;
  logic       fa, fb, fa2, t, sum, carry;
  logic       d0, d1, q0, q1, o0, o1;

  assign srcs = {loc_e, loc_ne, loc_n[1], loc_n[0], loc_nw,
                 g_v_in[1], g_v_in[0], g_h};

  always_comb begin
    a = srcs[cfg.src_a];
    b = srcs[cfg.src_b];
    c = srcs[cfg.src_c];
    d = srcs[cfg.src_d];
    fa  = cfg.lut_a[{b, a}];
    fb  = cfg.lut_b[{d, c}];
    fa2 = cfg.lut_a[{d, c}];
    t   = cfg.lut3 ? (a ? fb : fa2) : fa;
    sum   = fa ^ fb;
    carry = (fa & fb) | (c & d);
    d0 = cfg.d0_sum   ? sum   : t;
    d1 = cfg.d1_carry ? carry : fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= 1'b0;
      q1 <= 1'b0;
    end else begin
      q0 <= d0;
      q1 <= d1;
    end
  end

  always_comb begin
    o0 = cfg.reg0 ? q0 : d0;
    o1 = cfg.reg1 ? q1 : d1;
    out_s  = {o1, o0};
    out_w  = cfg.w_o1  ? o1 : o0;
    out_sw = cfg.sw_o1 ? o1 : o0;
    out_se = cfg.se_o1 ? o1 : o0;
    unique case (cfg.bdrv0)
      BDRV_O0: g_v_out[0] = o0;
      BDRV_O1: g_v_out[0] = o1;
      default: g_v_out[0] = g_v_in[0];
    endcase
    unique case (cfg.bdrv1)
      BDRV_O0: g_v_out[1] = o0;
      BDRV_O1: g_v_out[1] = o1;
      default: g_v_out[1] = g_v_in[1];
    endcase
  end

endmodule
