// rr_arbiter - round-robin arbiter with a clock-enabled priority pointer.
//
// grant is one-hot among the set bits of req (all zero when req is zero).
// The search starts one position after the last input that was granted and
// completed a transfer. A grant that was given on an enabled edge but not
// completed (advance = 0) is locked until it completes, so a newly arriving
// request cannot take the output away from a flit that is already on offer -
// what a valid/ready link needs. The requester of a locked grant must keep
// its request up (a router input keeps its head flit until it is sent).
// All state changes only on edges with en = 1.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic          locked;
  logic [N-1:0]  held;
  logic [N-1:0]  rr_grant;

  always_comb begin
    rr_grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (req[idx] && rr_grant == '0) rr_grant[idx] = 1'b1;
    end
  end

  assign grant = locked ? (held & req) : rr_grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last   <= IW'(N - 1);
      locked <= 1'b0;
      held   <= '0;
    end else if (en) begin
      if (advance) begin
        locked <= 1'b0;
        for (int unsigned i = 0; i < N; i++)
          if (grant[i]) last <= IW'(i);
      end else if (grant != '0) begin
        locked <= 1'b1;
        held   <= grant;
      end
    end
  end
endmodule
