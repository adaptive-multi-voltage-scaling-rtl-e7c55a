// ucu: utilization computing unit.
// Every flit written into the router's input buffers has already been
// through the header decoder and route computation, so its output port is
// known. The UCU keeps, per output direction, the number of buffered flits
// that will leave through that port; for the four mesh directions this is
// the load this router is about to hand to the one-hop downstream router,
// and is sent to it as an 8-bit utilization estimate (saturating). It also
// reports the total input-buffer occupancy (the router's own input load).
// Counting flits (not packets) and saturating at 255 are choices of this
// implementation; the 8-bit width follows the published design.
// Timing: counters update on the clock edge of each write or read; the
// outputs are registers.
module ucu
  import wnoc_pkg::*;
#(
  parameter int NP = 5          // router ports (5, or 6 with a wireless port)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NP-1:0]     wr_en,               // flit written at input p
  input  logic [PORT_W-1:0] wr_route [NP],       // its output port
  input  logic [NP-1:0]     rd_en,               // flit read from input p
  input  logic [PORT_W-1:0] rd_route [NP],
  output logic [UGS_W-1:0]  ugs_out  [4],        // to N, E, S, W neighbour
  output logic [9:0]        occupancy            // flits in all input buffers
);
  logic [9:0] per_port [NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NP; o++) per_port[o] <= '0;
      occupancy <= '0;
    end else begin
      logic [9:0] nocc;
      nocc = occupancy;
      for (int o = 0; o < NP; o++) begin
        logic [9:0] n;
        n = per_port[o];
        for (int p = 0; p < NP; p++) begin
          if (wr_en[p] && wr_route[p] == PORT_W'(o)) n = n + 1'b1;
          if (rd_en[p] && rd_route[p] == PORT_W'(o)) n = n - 1'b1;
        end
        per_port[o] <= n;
      end
      for (int p = 0; p < NP; p++) begin
        if (wr_en[p]) nocc = nocc + 1'b1;
        if (rd_en[p]) nocc = nocc - 1'b1;
      end
      occupancy <= nocc;
    end
  end

  always_comb begin
    for (int d = 0; d < 4; d++)
      ugs_out[d] = (per_port[d+1] > 10'd255) ? 8'd255 : per_port[d+1][7:0];
  end
endmodule
