// wi_deserializer: receive side of a wireless interface (WI): the WI
// address decoder, the deserializer and the "data flit received" buffer.
//
// Symbols come from the LNA/demodulator. An address control symbol is
// decoded at once: addr_valid pulses and addr_match tells whether the
// packet is for this WI (WI_ID). Only then are data symbols taken: four
// 8-bit symbols (least significant byte first) make one flit. A flit is
// held back until the next one or the end-of-packet symbol arrives, so
// the last flit can be marked as tail; the first is marked head. Complete
// flits are written to a buffer that feeds the router's wireless input
// port on VC 0. Nothing on the air can push back, so the buffer holds
// DEPTH flits (default: one whole 64-flit packet) and `room` tells the
// channel arbitration that a whole packet fits; a transfer only starts to
// this WI while room is high. A flit that still finds the buffer full is
// lost and sets the sticky overflow flag.
// Timing: addr_valid, addr_match and rx_done are registered pulses, one
// cycle after the symbol that causes them. Symbol format and buffer depth
// are choices of this implementation.
module wi_deserializer
  import wnoc_pkg::*;
#(
  parameter int              DEPTH = 64,
  parameter logic [WI_W-1:0] WI_ID = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_valid,
  input  logic             rx_ctrl,
  input  logic [SYM_W-1:0] rx_sym,
  output logic             addr_valid,
  output logic             addr_match,
  output logic             rx_done,
  output logic             overflow,
  output logic             room,          // space for a whole packet
  // to the router's wireless input port
  output flit_t            out_flit,
  output logic             out_valid,
  input  logic             out_ready
);
  logic             recv;          // address matched, taking data
  logic [1:0]       k;
  logic [FLIT_W-1:0] shreg;
  flit_t            pend;
  logic             pend_v, first;
  logic             push, empty, full;
  flit_t            wflit;
  logic [$clog2(DEPTH):0] cnt;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .push, .wdata(wflit),
    .pop  (out_valid && out_ready),
    .rdata(out_flit),
    .empty, .full, .count(cnt)
  );
  assign out_valid = !empty;

  // The channel arbiter only starts a transfer to this WI while the buffer
  // can hold a full packet, so a granted packet is never dropped.
  localparam int ROOM = (DEPTH > PKT_FLITS) ? DEPTH - PKT_FLITS : 0;
  assign room = (int'(cnt) <= ROOM);

  logic is_addr, is_eop, flit_done;
  assign is_addr   = rx_valid && rx_ctrl && (rx_sym[7:WI_W] == SYM_ADDR[7:WI_W]);
  assign is_eop    = rx_valid && rx_ctrl && (rx_sym == SYM_EOP);
  assign flit_done = recv && rx_valid && !rx_ctrl && (k == 2'(SYMS_PER_FLIT - 1));

  always_comb begin
    push  = 1'b0;
    wflit = pend;
    if (recv && pend_v && (flit_done || is_eop)) begin
      push = 1'b1;
      wflit.tail = is_eop;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      recv       <= 1'b0;
      k          <= '0;
      shreg      <= '0;
      pend       <= '0;
      pend_v     <= 1'b0;
      first      <= 1'b0;
      addr_valid <= 1'b0;
      addr_match <= 1'b0;
      rx_done    <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      addr_valid <= 1'b0;
      rx_done    <= 1'b0;
      if (push && full) overflow <= 1'b1;
      if (is_addr) begin
        addr_valid <= 1'b1;
        addr_match <= (rx_sym[WI_W-1:0] == WI_ID);
        recv       <= (rx_sym[WI_W-1:0] == WI_ID);
        k          <= '0;
        pend_v     <= 1'b0;
        first      <= 1'b1;
      end else if (recv && is_eop) begin
        recv    <= 1'b0;
        pend_v  <= 1'b0;
        rx_done <= 1'b1;
      end else if (recv && rx_valid && !rx_ctrl) begin
        shreg[8*k +: 8] <= rx_sym;
        k <= k + 1'b1;
        if (flit_done) begin
          pend.data <= {rx_sym, shreg[FLIT_W-9:0]};
          pend.head <= first;
          pend.tail <= 1'b0;
          pend.vc   <= '0;
          pend_v    <= 1'b1;
          first     <= 1'b0;
        end
      end
    end
  end
endmodule
