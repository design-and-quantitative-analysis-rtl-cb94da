// tb_ao_cb: self-checking testbench of the connection box.
//
// Random track values and random group bases; every broadcast line must
// carry track (base of its group + its place in the group) mod 16.
module tb_ao_cb;

  localparam int TRACKS = 16;
  localparam int LINES  = 8;
  localparam int GRAN   = 4;
  localparam int NGRP   = LINES / GRAN;

  logic [TRACKS-1:0] tracks;
  logic [3:0]        base [NGRP];
  logic [LINES-1:0]  lines;

  int checks = 0;
  int failures = 0;

  ao_cb #(.TRACKS(TRACKS), .LINES(LINES), .CFG_GRAN(GRAN)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      tracks = TRACKS'($urandom);
      for (int g = 0; g < NGRP; g++) base[g] = 4'($urandom);
      #1;
      for (int l = 0; l < LINES; l++) begin
        int idx;
        idx = (int'(base[l / GRAN]) + (l % GRAN)) % TRACKS;
        checks++;
        if (lines[l] !== tracks[idx]) begin
          failures++;
          if (failures < 10) $display("line %0d: got %b exp track %0d = %b", l, lines[l], idx, tracks[idx]);
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
