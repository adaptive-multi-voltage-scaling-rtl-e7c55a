// wi_serializer: transmit side of a wireless interface (WI): the
// "data to be transmitted" flit buffer and the serializer.
//
// Flits that the router sends to its wireless port are buffered here
// (DEPTH flits). When a head flit is at the front, the serializer asks the
// channel arbiter for the wireless channel (tx_req). Once granted it waits
// for the power amplifier to be awake (pa_ready), sends PRE_CYCLES cycles
// of bare carrier so the receivers' LNAs can wake, then one control symbol
// with the address of the destination WI (the WI nearest the packet's
// destination), then every flit as four 8-bit symbols (least significant
// byte first), and finally an end-of-packet control symbol. tx_done
// pulses with that last symbol and the request is dropped.
//
// Rate: a symbol may be sent in SYM_NUM of every SYM_DEN cycles
// (fractional strobe). The defaults, 4 of 5, give 32 bits per 5 cycles,
// i.e. 16 Gb/s at a 2.5 GHz clock, the published link rate and clock.
// Symbol format, preamble, addressing and buffer depth are choices of this
// implementation.
module wi_serializer
  import wnoc_pkg::*;
#(
  parameter int DEPTH      = 4,
  parameter int SYM_NUM    = 4,
  parameter int SYM_DEN    = 5,
  parameter int PRE_CYCLES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the router's wireless output port
  input  flit_t            in_flit,
  input  logic             in_valid,
  output logic             in_ready,
  // channel access
  output logic             tx_req,
  output logic [WI_W-1:0]  tx_dst,        // WI addressed by this request
  input  logic             tx_grant,
  input  logic             pa_ready,
  // to the modulator / PA
  output logic             tx_valid,
  output logic             tx_ctrl,
  output logic [SYM_W-1:0] tx_sym,
  output logic             tx_done
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_WAKE, S_PRE, S_ADDR, S_DATA, S_EOP} state_e;
  state_e state;

  flit_t      front;
  logic       empty, full, pop;
  logic [$clog2(DEPTH):0] cnt;
  logic [7:0] acc;
  logic       strobe;
  logic [1:0] k;                 // symbol index within the flit
  logic [7:0] pre;
  logic [WI_W-1:0] dst_wi;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .push (in_valid && !full),
    .wdata(in_flit),
    .pop,
    .rdata(front),
    .empty, .full, .count(cnt)
  );
  assign in_ready = !full;

  // fractional symbol strobe
  assign strobe = (8'(acc) + 8'(SYM_NUM)) >= 8'(SYM_DEN);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (state == S_IDLE || state == S_WAIT || state == S_WAKE) acc <= '0;
    else acc <= strobe ? acc + 8'(SYM_NUM) - 8'(SYM_DEN) : acc + 8'(SYM_NUM);
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_ctrl  = 1'b0;
    tx_sym   = '0;
    pop      = 1'b0;
    tx_done  = 1'b0;
    unique case (state)
      S_ADDR: if (strobe) begin
        tx_valid = 1'b1;
        tx_ctrl  = 1'b1;
        tx_sym   = SYM_ADDR | 8'(dst_wi);
      end
      S_DATA: if (strobe && !empty) begin
        tx_valid = 1'b1;
        tx_sym   = front.data[8*k +: 8];
        pop      = (k == 2'(SYMS_PER_FLIT - 1));
      end
      S_EOP: if (strobe) begin
        tx_valid = 1'b1;
        tx_ctrl  = 1'b1;
        tx_sym   = SYM_EOP;
        tx_done  = 1'b1;
      end
      default: ;
    endcase
  end

  assign tx_req = (state != S_IDLE);
  assign tx_dst = dst_wi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k      <= '0;
      pre    <= '0;
      dst_wi <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!empty && front.head) begin
          state  <= S_WAIT;
          dst_wi <= nearest_wi(front.data[NODE_W-1:0]);
        end
        S_WAIT: if (tx_grant) state <= S_WAKE;
        S_WAKE: if (pa_ready) begin
          state <= S_PRE;
          pre   <= 8'(PRE_CYCLES);
        end
        S_PRE: begin
          if (pre <= 8'd1) state <= S_ADDR;
          pre <= pre - 1'b1;
        end
        S_ADDR: if (strobe) begin
          state <= S_DATA;
          k     <= '0;
        end
        S_DATA: if (strobe && !empty) begin
          k <= k + 1'b1;
          if (pop && front.tail) state <= S_EOP;
        end
        S_EOP: if (strobe) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
