// rr_arbiter: round-robin arbiter with a registered grant enable.
//
// Structure: a combinational grant-enable generator looks at the requests and
// at the current grant-enable vector, a register holds the chosen one-hot
// grant enable, and each grant is its enable ANDed with its own request, so a
// grant lasts exactly as long as the winner keeps requesting. This split into
// generator, register and per-requester gating follows the arbiter diagram;
// the active-high polarity of the grants is this design's own choice.
//
// Policy: when `update` is high at a clock edge the register moves to the
// first requester found by scanning upward (wrapping) from the position just
// after the current enable. The requester that was served last is therefore
// scanned last, i.e. has the lowest priority in the next round. With no
// request the register keeps its value. After reset the enable sits on
// requester N-1, so requester 0 has the highest priority first.
//
// Timing: update at edge t, grant valid after edge t (one cycle latency).
// winner_idx is the binary index of the enable, for a multiplexer select.
module rr_arbiter #(
  parameter int unsigned N = noc_pkg::NPORTS
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N-1:0]           req,
  input  logic                   update,
  output logic [N-1:0]           grant,
  output logic [N-1:0]           grant_enable,
  output logic [$clog2(N)-1:0]   winner_idx
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0] ge_q, ge_d;
  logic [IW-1:0] cur_idx;

  // Binary index of the current one-hot enable.
  always_comb begin
    cur_idx = '0;
    for (int unsigned i = 0; i < N; i++)
      if (ge_q[i]) cur_idx = IW'(i);
  end

  // Grant-enable generation: first requester after cur_idx, circularly.
  always_comb begin
    ge_d = ge_q;
    for (int unsigned k = N; k >= 1; k--) begin
      int unsigned j;
      j = (int'(cur_idx) + k) % N;
      if (req[j]) ge_d = N'(1) << j;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)         ge_q <= N'(1) << (N - 1);
    else if (update) ge_q <= ge_d;
  end

  assign grant        = ge_q & req;
  assign grant_enable = ge_q;
  assign winner_idx   = cur_idx;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(ge_q));

endmodule
