// rx_comparator: behavioural model (analog part) of the receiver-end
// comparator. It watches the power at the WI antenna, with the LNA asleep,
// and raises detect while that power is above NOISE_TH, telling the AMSC to
// wake the LNA. The RF power is abstracted as an 8-bit value; the
// threshold's value is a choice of this model.
module rx_comparator
  import wnoc_pkg::*;
#(
  parameter logic [7:0] NOISE_TH = 8'd20
) (
  input  rf_t  rf_in,
  output logic detect
);
  assign detect = rf_in.power > NOISE_TH;
endmodule
