// ao_rs: routing switch of the global interconnect.
//
// A routing switch sits where a horizontal and a vertical global channel
// cross, at the top-right corner of each tile. The channels are built from
// unidirectional wires: on each of its four sides the switch receives
// WIRES wires and drives WIRES wires (WIRES = 8, so a channel between
// two switches holds 16 tracks, 8 in each direction).
//
// Outgoing wire t of a side is taken from wire t arriving on any side, from
// cluster output t (the bottom ends of the tile's vertical broadcast
// lines), or is 0. The choice is shared by a group of CFG_GRAN adjacent
// wires, so a four-bit word turns a corner or joins the channel with one
// 3-bit field (encoding: efpga_pkg::rs_sel_e).
//
// The published design gives the switch's place and the 16-track channel;
// the unidirectional wires, the same-index switch pattern and the shared
// group select are this implementation's choices.
//
// Purely combinational. A configuration can close a loop through several
// switches; as in any FPGA, such a configuration is illegal and is not
// produced for this fabric.
module ao_rs
  import efpga_pkg::*;
#(
  parameter int unsigned WIRES    = 8,
  parameter int unsigned CFG_GRAN = 4,
  localparam int unsigned NGRP    = WIRES / CFG_GRAN
) (
  input  logic [WIRES-1:0] in_wires  [4],  // indexed by side_e
  output logic [WIRES-1:0] out_wires [4],
  input  logic [WIRES-1:0] cl_out,         // from the tile's cluster
  input  rs_sel_e            sel [4][NGRP]
);

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      for (int t = 0; t < int'(WIRES); t++) begin
        unique case (sel[s][t / CFG_GRAN])
          RS_FROM_N:  out_wires[s][t] = in_wires[SIDE_N][t];
          RS_FROM_E:  out_wires[s][t] = in_wires[SIDE_E][t];
          RS_FROM_S:  out_wires[s][t] = in_wires[SIDE_S][t];
          RS_FROM_W:  out_wires[s][t] = in_wires[SIDE_W][t];
          RS_FROM_CL: out_wires[s][t] = cl_out[t];
          default:    out_wires[s][t] = 1'b0;
        endcase
      end
    end
  end

endmodule
