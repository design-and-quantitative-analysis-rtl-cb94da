// ao_cb: connection box from a global channel to broadcast lines.
//
// A connection box lets the wires of a global routing channel become inputs
// of a cluster. Here its outputs are the cluster's broadcast lines. The
// configuration is shared the same way as in the LEs: LINES outputs form
// groups of CFG_GRAN consecutive lines, and a group has one base select.
// Line k of a group carries track (base + k) mod TRACKS, so a whole
// operand word that arrives on adjacent tracks is routed to adjacent
// columns (or rows) with one configuration field.
//
// That the global lines reach the cluster through connection boxes and that
// global-interconnect configuration is shared are published; the rotating
// word-wise mapping is this implementation's choice.
//
// Purely combinational.
module ao_cb #(
  parameter int unsigned TRACKS   = 16,
  parameter int unsigned LINES    = 8,
  parameter int unsigned CFG_GRAN = 4,
  localparam int unsigned SW      = $clog2(TRACKS),
  localparam int unsigned NGRP    = LINES / CFG_GRAN
) (
  input  logic [TRACKS-1:0] tracks,
  input  logic [SW-1:0]     base [NGRP],
  output logic [LINES-1:0]  lines
);

  for (genvar l = 0; l < LINES; l++) begin : g_line
    logic [SW-1:0] idx;
    // modulo-TRACKS addition; TRACKS is a power of two
    assign idx      = SW'(base[l / CFG_GRAN] + SW'(l % CFG_GRAN));
    assign lines[l] = tracks[idx];
  end

endmodule
