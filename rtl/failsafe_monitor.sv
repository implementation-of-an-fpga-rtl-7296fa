// failsafe_monitor: compares one kind of readout with two thresholds and
// reacts according to the severity of a violation.
//
// Every readout on the CMI input is taken at once (in_next is low). Its
// value is compared with WARN_TH and CRIT_TH: with ABOVE=1 a value at or
// above a threshold violates it, with ABOVE=0 a value at or below it does.
// The result for the latest readout is shown in `level` (SEV_OK, SEV_WARN
// or SEV_CRIT) one cycle after the readout. The two severities lead to two
// actions: `warn` simply follows the latest readout, whereas `failsafe`,
// the failsafe reaction, is set by the first critical readout and stays set
// until `clear` is pulsed - a later good readout does not release it.
//
// Comparing a readout with a given threshold and acting by severity level
// follow the original design; the two levels, the latching of the critical action
// and the compare direction are this design's choices.
module failsafe_monitor
  import ssdr_pkg::*;
#(
  parameter data_t WARN_TH = 32'd1000,
  parameter data_t CRIT_TH = 32'd2000,
  parameter bit    ABOVE   = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  readout_t  in_data,
  input  logic      in_vld,
  output logic      in_next,
  input  logic      clear,
  output severity_t level,
  output logic      warn,
  output logic      failsafe
);

  function automatic logic violates(data_t v, data_t th);
    return ABOVE ? (v >= th) : (v <= th);
  endfunction

  severity_t sev;

  assign in_next = 1'b0;

  always_comb begin
    if (violates(in_data.data, CRIT_TH))      sev = SEV_CRIT;
    else if (violates(in_data.data, WARN_TH)) sev = SEV_WARN;
    else                                      sev = SEV_OK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level    <= SEV_OK;
      warn     <= 1'b0;
      failsafe <= 1'b0;
    end else begin
      if (in_vld) begin
        level <= sev;
        warn  <= (sev != SEV_OK);
      end
      if (in_vld && sev == SEV_CRIT) begin
        failsafe <= 1'b1;
      end else if (clear) begin
        failsafe <= 1'b0;
      end
    end
  end

endmodule
