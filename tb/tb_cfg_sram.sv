// tb_cfg_sram: self-checking testbench of the configuration memory.
//
// Writes random words to random addresses (with and without write enable),
// keeps a shadow copy and compares both the parallel configuration outputs
// and the read-back port with it after every clock. Also checks that reset
// clears every word and that a write takes effect on the next rising edge.
module tb_cfg_sram;

  localparam int WORDS = 6;
  localparam int W     = 32;
  localparam int AW    = $clog2(WORDS);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          we;
  logic [AW-1:0] addr;
  logic [W-1:0]  wdata;
  logic [W-1:0]  rdata;
  logic [W-1:0]  cfg_q [WORDS];
  logic [W-1:0]  shadow [WORDS];

  int checks = 0;
  int failures = 0;

  cfg_sram #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (cfg_q[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h exp %h", i, cfg_q[i], shadow[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    we = 1'b0;
    addr = '0;
    wdata = '0;
    for (int i = 0; i < WORDS; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    compare_all();
    @(negedge clk);
    rst_n = 1'b1;

    // a write is visible only after the rising edge
    we = 1'b1;
    addr = AW'(2);
    wdata = 32'hA5A5_5A5A;
    #1;
    checks++;
    if (cfg_q[2] !== '0) failures++;
    @(posedge clk);
    #1;
    checks++;
    if (cfg_q[2] !== 32'hA5A5_5A5A) failures++;
    shadow[2] = 32'hA5A5_5A5A;

    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = AW'($urandom_range(0, WORDS - 1));
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++;
        if (failures < 10) $display("readback %0d: got %h exp %h", addr, rdata, shadow[addr]);
      end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1;
      compare_all();
    end

    // reset clears everything
    @(negedge clk);
    we = 1'b0;
    rst_n = 1'b0;
    for (int i = 0; i < WORDS; i++) shadow[i] = '0;
    #1;
    compare_all();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
