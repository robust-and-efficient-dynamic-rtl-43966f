// osc_model: behavioural model of an on-chip oscillator whose frequency
// depends on supply voltage, process and temperature, for simulation only.
// It stands in for the process-identification ring oscillator and for the
// critical-path replica, which are analog circuits.
//
// Model: f = F0 + P_MHZ*proc + SLOPE*(1 - TC*(temp-25))*(V - 1.0 V) in MHz,
// with V = vdd_code * 10 mV and proc in thousandths (0 slow, 1000 typical,
// 2000 fast). Temperature only changes the slope, so every part runs at the
// same speed at 1.0 V whatever its temperature, the property the process
// identifier relies on. The constants are illustrative.
module osc_model #(
  parameter real F0_MHZ    = 105.0,  // slow corner at 1.0 V
  parameter real P_MHZ     = 60.0,   // speed-up per corner step at 1.0 V
  parameter real SLOPE_MHZ = 300.0,  // MHz per volt at 25 C
  parameter real TC        = 0.002   // relative slope loss per degree
) (
  input  logic [7:0] vdd_code,
  input  int         proc_milli,
  input  int         temp_c,
  output logic       osc
);
  real f_mhz;

  function automatic real freq(input logic [7:0] v, input int p, input int t);
    real fv;
    fv = F0_MHZ + P_MHZ * real'(p) / 1000.0
       + SLOPE_MHZ * (1.0 - TC * real'(t - 25)) * (real'(v) / 100.0 - 1.0);
    if (fv < 5.0) fv = 5.0;
    return fv;
  endfunction

  initial osc = 1'b0;
  always begin
    f_mhz = freq(vdd_code, proc_milli, temp_c);
    #(500.0 / f_mhz) osc = ~osc;
  end
endmodule
