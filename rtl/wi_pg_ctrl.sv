// wi_pg_ctrl: power-gating part of the AMS controller for one wireless
// interface (WI). It keeps the power amplifier (PA) and the low-noise
// amplifier (LNA) asleep unless they are needed.
//
// Transmit: when the router's arbiter grants this WI the wireless channel,
// PG_PA goes high (PA supplied) and stays high until the whole packet has
// been sent (tx_done); then the PA is gated again.
// Receive: when the receiver-end comparator sees RF power above the noise
// threshold, PG_LNA goes high so the LNA wakes and the WI address can be
// decoded. If the decoded address is not this WI's, the LNA is gated again
// at once; otherwise it stays on until the packet is complete (rx_done).
// This follows the published control flow. After a mismatch or a finished
// packet the controller waits for the channel to fall quiet before it can
// wake the LNA again, so that one transmission does not wake it twice; that
// lockout is a choice of this implementation.
// Timing: outputs are registered; a PA/LNA request is seen one cycle after
// its cause.
module wi_pg_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic grant_wi,     // arbiter grant for the wireless channel
  input  logic tx_done,      // last symbol of the packet sent
  input  logic rx_detect,    // comparator: RX power > noise threshold
  input  logic addr_valid,   // WI address decoder finished
  input  logic addr_match,   // decoded address equals this WI
  input  logic rx_done,      // received packet complete
  output logic pg_pa,        // 1: PA supplied
  output logic pg_lna,       // 1: LNA supplied
  output logic lna_reject    // pulse: LNA gated after an address mismatch
);
  typedef enum logic [1:0] {RX_SLEEP, RX_ADDR, RX_DATA, RX_LOCKOUT} rx_state_e;
  rx_state_e rx_st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pg_pa <= 1'b0;
    end else if (!pg_pa && grant_wi) begin
      pg_pa <= 1'b1;
    end else if (pg_pa && tx_done) begin
      pg_pa <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_st      <= RX_SLEEP;
      lna_reject <= 1'b0;
    end else begin
      lna_reject <= 1'b0;
      unique case (rx_st)
        RX_SLEEP:   if (rx_detect) rx_st <= RX_ADDR;
        RX_ADDR: begin
          if (!rx_detect) rx_st <= RX_SLEEP;
          else if (addr_valid) begin
            if (addr_match) rx_st <= RX_DATA;
            else begin
              rx_st      <= RX_LOCKOUT;
              lna_reject <= 1'b1;
            end
          end
        end
        RX_DATA:    if (rx_done) rx_st <= RX_LOCKOUT;
        RX_LOCKOUT: if (!rx_detect) rx_st <= RX_SLEEP;
        default:    rx_st <= RX_SLEEP;
      endcase
    end
  end

  assign pg_lna = (rx_st == RX_ADDR) || (rx_st == RX_DATA);
endmodule
