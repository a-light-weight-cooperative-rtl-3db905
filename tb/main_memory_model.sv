// main_memory_model: behavioural model of the off-chip main memory, for
// testbenches only (the memory chip is not part of the design).
//
// Word-organised array of WORDS 32-bit words, indexed by addr[..:2] modulo
// WORDS. A request (ext_req with we/addr/wdata held) is answered after
// LATENCY cycles: ext_ack is high in the LATENCY-th cycle of the request,
// with ext_rdata for a read; a write lands at the end of that cycle. The
// requester must drop ext_req after the ack. Testbenches may read and write
// `mem` directly. Contents start at zero.
module main_memory_model #(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ext_req,
  input  logic        ext_we,
  input  logic [31:0] ext_addr,
  input  logic [31:0] ext_wdata,
  output logic        ext_ack,
  output logic [31:0] ext_rdata
);

  logic [31:0] mem [WORDS];
  int unsigned cnt;
  int unsigned idx;

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;

  assign idx       = (ext_addr >> 2) % WORDS;
  assign ext_ack   = ext_req && (cnt == LATENCY - 1);
  assign ext_rdata = ext_ack && !ext_we ? mem[idx] : 32'h0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= 0;
    else if (ext_ack || !ext_req) cnt <= 0;
    else cnt <= cnt + 1;
  end

  always @(posedge clk) if (ext_ack && ext_we) mem[idx] <= ext_wdata;

endmodule
