// pulse_detect -- finds the first possible tag pulse.
//
// Once the threshold stage is ready, every filtered value is compared with the
// threshold. The first value above it sets `ps`, which stays high until the
// algorithm reset; `ps_pulse` marks that value for one clock. `ps` also freezes the
// threshold stage and starts the start-bit stage. Both outputs are registered: they
// appear on the clock after the in_valid that carried the value. The compare and
// the hold-until-reset are the document's; the extra one-clock pulse is this
// design's, for the start-bit stage.
module pulse_detect
  import rfid_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  algo_rst,
  input  logic  ready,
  input  logic  in_valid,
  input  filt_t in_data,
  input  filt_t threshold,
  output logic  ps,
  output logic  ps_pulse
);

  always_ff @(posedge clk) begin
    if (rst || algo_rst) begin
      ps       <= 1'b0;
      ps_pulse <= 1'b0;
    end else begin
      ps_pulse <= 1'b0;
      if (ready && in_valid && !ps && in_data > threshold) begin
        ps       <= 1'b1;
        ps_pulse <= 1'b1;
      end
    end
  end

endmodule
