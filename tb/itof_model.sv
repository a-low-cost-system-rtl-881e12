// itof_model: behavioural model of the external current-to-frequency converter (simulation
// only, not synthesizable).
//
// The board circuit senses the FPGA core current with a 0.5 ohm shunt in front of the core
// regulator, converts the shunt voltage into a scaled-down current (ratio R_shunt / R_gain,
// R_gain = 1.5 kohm) that charges the timing capacitor of a micropower 555 timer from 0 V up to
// a 2.048 V reference; the timer then discharges it and holds it for about t_d = 1.2 us. The
// output frequency is therefore
//     f(I) = 1 / (R_gain * C_T * V_ref / (R_shunt * I) + t_d),
// about 8 kHz at 5 mA and 136 kHz at 100 mA with C_T = 100 pF. The model produces that pulse
// train on f_out: high for HIGH_NS at the end of each cycle (the discharge), low otherwise. The
// current i_ma (in mA) is read at the start of each cycle. pulses counts the rising edges it
// produced, for the testbench's reference.
module itof_model #(
  parameter real R_SHUNT = 0.5,       // ohm
  parameter real R_GAIN  = 1500.0,    // ohm
  parameter real C_T     = 100.0e-12, // F, timer's internal capacitor
  parameter real V_REF   = 2.048,     // V
  parameter real T_D     = 1.2e-6,    // s
  parameter real HIGH_NS = 1200.0     // output high time, ns
) (
  input  real     i_ma,
  input  logic    enable,
  output logic    f_out,
  output longint  pulses
);

  function automatic real period_ns(input real ma);
    return 1.0e9 * (R_GAIN * C_T * V_REF / (R_SHUNT * ma * 1.0e-3) + T_D);
  endfunction

  initial begin
    f_out  = 1'b0;
    pulses = 0;
    forever begin
      real p;
      wait (enable);
      p = period_ns(i_ma);
      #(p - HIGH_NS);
      f_out = 1'b1;
      pulses++;
      #(HIGH_NS);
      f_out = 1'b0;
    end
  end

endmodule
