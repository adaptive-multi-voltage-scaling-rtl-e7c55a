// wi_medium_arbiter: shares the single wireless channel among the WIs.
// Only one wireless link may be active at a time, so a WI that wants to
// transmit raises req and waits for its grant. Grants are given round
// robin, starting after the last winner, and a grant is held for as long
// as its request stays high (the whole packet); the WI drops req after its
// last symbol. The round-robin policy is a choice of this implementation.
// Timing: grant is registered; it rises the cycle after req when the
// channel is free and falls the cycle after req falls.
module wi_medium_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant <= '0;
      last  <= IW'(N-1);
    end else if ((grant & req) != '0) begin
      grant <= grant & req;            // hold for the whole packet
    end else begin
      logic [N-1:0] g;
      g = '0;
      for (int i = N; i >= 1; i--) begin
        int c;
        c = (int'(last) + i) % N;
        if (req[c]) g = N'(1) << c;
      end
      grant <= g;
      for (int c = 0; c < N; c++)
        if (g[c]) last <= IW'(c);
    end
  end

  a_one_link: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
