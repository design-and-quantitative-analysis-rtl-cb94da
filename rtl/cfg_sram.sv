// cfg_sram: configuration memory of one tile.
//
// The fabric is configured by writing words into SRAM cells; every cell
// drives the configuration input of the logic or routing it controls all
// the time, so all words are available in parallel on cfg_q. Writes use a
// simple synchronous port: on a rising clk edge with we high, word addr
// takes wdata. rdata returns word addr combinationally, for read-back.
//
// That configuration is held in SRAM next to each cluster is the published
// structure. The word width, the write/read-back port and the clear on
// reset (so an unconfigured fabric drives only zeros) are this
// implementation's choices; the array is written as registers.
module cfg_sram #(
  parameter int unsigned WORDS = 8,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  output logic [W-1:0]  cfg_q [WORDS]
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (we && (32'(addr) < WORDS)) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata = (32'(addr) < WORDS) ? mem[addr] : '0;

  for (genvar i = 0; i < WORDS; i++) begin : g_q
    assign cfg_q[i] = mem[i];
  end

endmodule
