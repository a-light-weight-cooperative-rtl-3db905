// rr_arbiter: round-robin arbiter for the masters of the central bus.
//
// grant is one-hot (or zero when nothing requests) and picks the first
// requester at or after the position following the last winner. The pointer
// moves only when `advance` is high, i.e. when the grant is taken. Purely
// combinational grant; the pointer is a register reset to master 0.
module rr_arbiter #(
  parameter int unsigned N   = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  request,
  input  logic          advance,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx
);

  logic [IW-1:0] last_q;   // index of the last winner

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = 1; k <= int'(N); k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (request[idx] && grant == '0) begin
        grant[idx] = 1'b1;
        grant_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          last_q <= IW'(N - 1);
    else if (advance && grant != '0)     last_q <= grant_idx;
  end

endmodule
