// tb_ao_rs: self-checking testbench of the routing switch.
//
// Random wire values and random group selects on all four sides; every
// outgoing wire t must equal wire t of the selected side, cluster output t,
// or 0 for the unused encodings.
module tb_ao_rs;
  import efpga_pkg::*;

  localparam int WIRES = 8;
  localparam int GRAN  = 4;
  localparam int NGRP  = WIRES / GRAN;

  logic [WIRES-1:0] in_wires  [4];
  logic [WIRES-1:0] out_wires [4];
  logic [WIRES-1:0] cl_out;
  rs_sel_e          sel [4][NGRP];

  int checks = 0;
  int failures = 0;
  int used [8];

  ao_rs #(.WIRES(WIRES), .CFG_GRAN(GRAN)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) used[i] = 0;
    for (int it = 0; it < 2000; it++) begin
      for (int s = 0; s < 4; s++) begin
        in_wires[s] = WIRES'($urandom);
        for (int g = 0; g < NGRP; g++) sel[s][g] = rs_sel_e'($urandom_range(0, 7));
      end
      cl_out = WIRES'($urandom);
      #1;
      for (int s = 0; s < 4; s++) begin
        for (int t = 0; t < WIRES; t++) begin
          logic e;
          int k;
          k = int'(sel[s][t / GRAN]);
          used[k]++;
          // encodings 1..4 = sides N, E, S, W (side index k-1), 5 = cluster
          if (k >= 1 && k <= 4) e = in_wires[k - 1][t];
          else if (k == 5)      e = cl_out[t];
          else                  e = 1'b0;
          checks++;
          if (out_wires[s][t] !== e) begin
            failures++;
            if (failures < 10) $display("side %0d wire %0d sel %0d: got %b exp %b", s, t, k, out_wires[s][t], e);
          end
        end
      end
      #9;
    end
    for (int i = 0; i < 8; i++) if (used[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
